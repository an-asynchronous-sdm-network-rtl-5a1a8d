// output_vc: one output virtual circuit (OVC) with its fault-detection and
// Drain circuits (the upstream half of the link monitor).
//
// Datapath: a chain of NSTAGE qdi_stage's, Stage0 driving the link.  For
// the Drain operation a multiplexer in front of Stage0 forces its input to
// spacer when err_conf is high, and the upstream ack is then taken from a
// completion-detector sink, so the flits still queued in upstream routers
// flow into the sink and their tail releases those routers one by one.
//
// Allocation state: the allocator's vc_busy passes through an asymmetric
// C-element (blk) before the inverter that gives vc_rdy.  blk rises with
// vc_busy and falls only when vc_busy and err_conf are both low, so a
// confirmed fault keeps vc_rdy low and the VC is never allocated again
// until err_conf is withdrawn.
//
// Fault detection (enabled by err_r from the downstream input VC):
//   AckSeqo  = err_r & ((opdia == opdoa) | !vc_busy)
//              high means "not an upstream router of a faulty link";
//   TranDeto = transition detector on opdoa (the link ack).
// opdia is the ack of Stage0 and opdoa the ack arriving from the link.
//
// Interface: crossbar side d_i/eop_i in, ack_o out; link side d_o/eop_o
// out, oa in.  Timing: state on eclk; err_r/err_conf come from the detector
// clock domain.  The structure follows the design's modified output buffer
// and monitor; AckSeqo is a plain AND with err_r here.
module output_vc #(
  parameter int ND     = 16,
  parameter int NSTAGE = 1
) (
  input  logic            eclk,
  input  logic            rst_n,
  // crossbar
  input  logic [4*ND-1:0] d_i,
  input  logic            eop_i,
  output logic            ack_o,
  // link
  output logic [4*ND-1:0] d_o,
  output logic            eop_o,
  input  logic            oa,
  // allocator
  input  logic            vc_busy,
  output logic            vc_rdy,
  // fault-detection wires
  input  logic            err_r,
  input  logic            err_conf,
  output logic            trandeto,
  output logic            ackseqo
);

  logic [NSTAGE-1:0][4*ND-1:0] sin_d, sout_d;
  logic [NSTAGE-1:0]           sin_eop, sout_eop, s_ia, s_oa;

  logic [4*ND-1:0] pre_d;
  logic            pre_eop;
  logic            pre_ack;   // ack returned to the word in front of Stage0
  logic            sink_ack;
  logic            blk_q;
  logic            opdia, opdoa;

  for (genvar k = 0; k < NSTAGE; k++) begin : g_stage
    qdi_stage #(.ND(ND)) u_stage (
      .eclk  (eclk),
      .rst_n (rst_n),
      .d_i   (sin_d[k]),
      .eop_i (sin_eop[k]),
      .oa    (s_oa[k]),
      .set_en(1'b1),
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
    assign ack_o   = pre_ack;
  end

  always_comb begin
    for (int k = 0; k < NSTAGE; k++) begin
      if (k == 0) begin
        sin_d[k]   = err_conf ? '0 : pre_d;
        sin_eop[k] = err_conf ? 1'b0 : pre_eop;
        s_oa[k]    = oa;
      end else begin
        sin_d[k]   = (k == NSTAGE-1) ? d_i   : sout_d[(k+1) % NSTAGE];
        sin_eop[k] = (k == NSTAGE-1) ? eop_i : sout_eop[(k+1) % NSTAGE];
        s_oa[k]    = (k == 1) ? pre_ack : s_ia[(k-1) % NSTAGE];
      end
    end
  end

  // sink of the Drain operation
  qdi_cd #(.ND(ND)) u_sink (
    .eclk(eclk), .rst_n(rst_n), .d(pre_d), .eop(pre_eop), .ack(sink_ack)
  );

  assign pre_ack = err_conf ? sink_ack : s_ia[0];
  assign d_o     = sout_d[0];
  assign eop_o   = sout_eop[0];

  // blocking element in front of the vc_rdy inverter
  always_ff @(posedge eclk or negedge rst_n) begin
    if (!rst_n)                    blk_q <= 1'b0;
    else if (vc_busy)              blk_q <= 1'b1;
    else if (!err_conf)            blk_q <= 1'b0;
  end
  assign vc_rdy = !blk_q;

  assign opdia   = s_ia[0];
  assign opdoa   = oa;
  assign ackseqo = err_r && (!(opdia ^ opdoa) || !vc_busy);

  transition_detector u_td (
    .eclk(eclk), .rst_n(rst_n), .ena(err_r), .sig(opdoa), .act(trandeto)
  );

endmodule
