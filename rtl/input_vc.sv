// input_vc: one input virtual circuit (IVC) of the SDM router.
//
// The IVC is a chain of NSTAGE qdi_stage's, Stage NSTAGE-1 facing the link
// and Stage0 facing the crossbar, with three controllers around Stage0:
//  * xy_controller reads the head flit waiting in front of Stage0 and
//    raises the routing request rt_r;
//  * buffer_controller opens Stage0 (acken low) once the allocator has
//    granted the path (rt_ack) and closes it again after the tail flit;
//    ackeop = C(eop at the output of Stage0, cia) tells it that the output
//    took the tail;
//  * for the Release operation, three multiplexers in front of Stage0
//    switch when err_conf is high: the data rails of Stage0's input are
//    forced to spacer, its eop comes from eop_generator, and the stage in
//    front of Stage0 is acknowledged by a completion-detector sink instead
//    of by Stage0.
//
// Signals watched by the fault detector: ipdia (ack into the stage in front
// of Stage0), ipdoa (ack from the crossbar into Stage0, i.e. cia) and ipeop
// (eop at Stage0's input).
//
// Interface: link side d_i/eop_i in, ack_o out; crossbar side d_o/eop_o
// out, cia in; allocator rt_r out, rt_ack in.  All handshakes are 4-phase.
// Timing: all state is on eclk (one eclk per element); err_conf may come from
// another clock domain, as it only switches while the VC is deadlocked.
// The structure follows the router's input buffer and its Release
// modification; the head-flit format is set in xy_controller.
module input_vc
  import sdm_pkg::*;
#(
  parameter int ND     = 16,
  parameter int NSTAGE = 2,
  parameter int X_POS  = 0,
  parameter int Y_POS  = 0
) (
  input  logic             eclk,
  input  logic             rst_n,
  // link
  input  logic [4*ND-1:0]  d_i,
  input  logic             eop_i,
  output logic             ack_o,
  // crossbar
  output logic [4*ND-1:0]  d_o,
  output logic             eop_o,
  input  logic             cia,
  // allocator
  output logic [NPORT-1:0] rt_r,
  input  logic             rt_ack,
  // fault detection
  input  logic             err_conf,
  output logic             ipdia,
  output logic             ipdoa,
  output logic             ipeop
);

  logic [NSTAGE-1:0][4*ND-1:0] sin_d, sout_d;
  logic [NSTAGE-1:0]           sin_eop, sout_eop, s_ia, s_oa, s_en;

  logic [4*ND-1:0] pre_d;     // word in front of Stage0
  logic            pre_eop;
  logic            sink_ack;
  logic            rt_en, acken, rt_rst, ackeop, eop_err;

  for (genvar k = 0; k < NSTAGE; k++) begin : g_stage
    qdi_stage #(.ND(ND)) u_stage (
      .eclk  (eclk),
      .rst_n (rst_n),
      .d_i   (sin_d[k]),
      .eop_i (sin_eop[k]),
      .oa    (s_oa[k]),
      .set_en(s_en[k]),
      .d_o   (sout_d[k]),
      .eop_o (sout_eop[k]),
      .ia    (s_ia[k])
    );
  end

  if (NSTAGE > 1) begin : g_pre
    assign pre_d   = sout_d[1];
    assign pre_eop = sout_eop[1];
    assign ack_o   = s_ia[NSTAGE-1];
  end else begin : g_pre1
    assign pre_d   = d_i;
    assign pre_eop = eop_i;
    assign ack_o   = ipdia;
  end

  always_comb begin
    for (int k = 0; k < NSTAGE; k++) begin
      s_en[k] = 1'b1;
      if (k == NSTAGE-1 && k != 0) begin
        sin_d[k]   = d_i;
        sin_eop[k] = eop_i;
      end else if (k != 0) begin
        sin_d[k]   = sout_d[(k+1) % NSTAGE];
        sin_eop[k] = sout_eop[(k+1) % NSTAGE];
      end else begin
        // Release multiplexers in front of Stage0
        sin_d[k]   = err_conf ? '0 : pre_d;
        sin_eop[k] = err_conf ? eop_err : pre_eop;
        s_en[k]    = !acken;
      end
      if (k == 0)      s_oa[k] = cia;
      else if (k == 1) s_oa[k] = ipdia;
      else             s_oa[k] = s_ia[(k-1) % NSTAGE];
    end
  end

  // sink of the Release operation
  qdi_cd #(.ND(ND)) u_sink (
    .eclk(eclk), .rst_n(rst_n), .d(pre_d), .eop(pre_eop), .ack(sink_ack)
  );

  assign ipdia = err_conf ? sink_ack : s_ia[0];
  assign ipdoa = cia;
  assign ipeop = pre_eop;

  assign d_o   = sout_d[0];
  assign eop_o = sout_eop[0];

  // ackeop = C(eop, cia)
  always_ff @(posedge eclk or negedge rst_n) begin
    if (!rst_n)                    ackeop <= 1'b0;
    else if (sout_eop[0] && cia)   ackeop <= 1'b1;
    else if (!sout_eop[0] && !cia) ackeop <= 1'b0;
  end

  xy_controller #(.ND(ND), .X_POS(X_POS), .Y_POS(Y_POS)) u_xy (
    .eclk(eclk), .rst_n(rst_n), .d(pre_d), .eop(pre_eop),
    .rt_en(rt_en), .rt_rst(rt_rst), .rt_r(rt_r)
  );

  buffer_controller u_bc (
    .eclk(eclk), .rst_n(rst_n), .rt_ack(rt_ack), .ackeop(ackeop),
    .rt_en(rt_en), .acken(acken), .rt_rst(rt_rst)
  );

  eop_generator u_eopg (
    .eclk(eclk), .rst_n(rst_n), .acken(acken), .cia(cia),
    .err_conf(err_conf), .eop_err(eop_err)
  );

endmodule
