// sdm_router: five-port asynchronous SDM router protected against permanent
// faults on its links.
//
// Each of the ports South, West, North, East and Local is split into VN
// independent virtual circuits of DW/VN bits (ND = DW/VN/2 digits of 1-of-4
// code).  Channel c = port*VN + vc.  Per input channel there is an
// input_vc and an ivc_fault_detector; per output channel an output_vc;
// per output port a switch_allocator; one crossbar joins the 5*VN input
// channels to the 5*VN output channels; one timeout_counter serves all
// detectors.  Routing is XY dimension-ordered, switching is wormhole.
//
// Every link channel carries, besides its rails, eop and ack, four
// fault-detection wires: err_r and err_conf go upstream from the input
// VC's detector to the output VC of the neighbour, TranDeto and AckSeqo come
// back.  On the input side these are in_err_r/in_err_conf (outputs) and
// in_trandeto/in_ackseqo (inputs); on the output side the mirror images.
//
// Timing: eclk clocks the asynchronous logic (one eclk per state-holding
// element), clk the detectors' state machines and the time-out counter; the
// two clocks are unrelated.  The organisation follows the design; channel
// numbering and the port order are this implementation's.  The detectors'
// start, ackseqi and trandeti outputs are observation points for testbenches
// and are left unconnected here.
module sdm_router
  import sdm_pkg::*;
#(
  parameter int X_POS          = 0,
  parameter int Y_POS          = 0,
  parameter int DW             = 64,
  parameter int VN             = 2,
  parameter int IN_STAGES      = 2,
  parameter int OUT_STAGES     = 1,
  parameter int TIMEOUT_CYCLES = 67
) (
  input  logic                                    eclk,
  input  logic                                    clk,
  input  logic                                    rst_n,
  // input channels
  input  logic [NPORT*VN-1:0][2*DW/VN-1:0]        in_d,
  input  logic [NPORT*VN-1:0]                     in_eop,
  output logic [NPORT*VN-1:0]                     in_ack,
  output logic [NPORT*VN-1:0]                     in_err_r,
  output logic [NPORT*VN-1:0]                     in_err_conf,
  input  logic [NPORT*VN-1:0]                     in_trandeto,
  input  logic [NPORT*VN-1:0]                     in_ackseqo,
  // output channels
  output logic [NPORT*VN-1:0][2*DW/VN-1:0]        out_d,
  output logic [NPORT*VN-1:0]                     out_eop,
  input  logic [NPORT*VN-1:0]                     out_ack,
  input  logic [NPORT*VN-1:0]                     out_err_r,
  input  logic [NPORT*VN-1:0]                     out_err_conf,
  output logic [NPORT*VN-1:0]                     out_trandeto,
  output logic [NPORT*VN-1:0]                     out_ackseqo
);

  localparam int ND = DW / VN / 2;
  localparam int NC = NPORT * VN;

  logic timeout;

  logic [NC-1:0][4*ND-1:0] ivc_d, ovc_d;
  logic [NC-1:0]           ivc_eop, ovc_eop, cia, ovc_ack;
  logic [NC-1:0][NPORT-1:0] rt_r;
  logic [NC-1:0]           rt_ack;
  logic [NC-1:0]           ipdia, ipdoa, ipeop;
  logic [NC-1:0]           vc_busy, vc_rdy;
  logic [NPORT-1:0][NC-1:0][VN-1:0] pcfg;
  logic [NPORT-1:0][NC-1:0] pgnt;
  logic [NC-1:0][NC-1:0]   xcfg;

  timeout_counter #(.TIMEOUT_CYCLES(TIMEOUT_CYCLES)) u_to (
    .clk(clk), .rst_n(rst_n), .timeout(timeout)
  );

  for (genvar c = 0; c < NC; c++) begin : g_ch
    input_vc #(.ND(ND), .NSTAGE(IN_STAGES), .X_POS(X_POS), .Y_POS(Y_POS)) u_ivc (
      .eclk(eclk), .rst_n(rst_n),
      .d_i(in_d[c]), .eop_i(in_eop[c]), .ack_o(in_ack[c]),
      .d_o(ivc_d[c]), .eop_o(ivc_eop[c]), .cia(cia[c]),
      .rt_r(rt_r[c]), .rt_ack(rt_ack[c]),
      .err_conf(in_err_conf[c]),
      .ipdia(ipdia[c]), .ipdoa(ipdoa[c]), .ipeop(ipeop[c])
    );

    ivc_fault_detector u_fd (
      .eclk(eclk), .clk(clk), .rst_n(rst_n), .timeout(timeout),
      .rt_ack(rt_ack[c]), .ipdia(ipdia[c]), .ipdoa(ipdoa[c]), .ipeop(ipeop[c]),
      .trandeto(in_trandeto[c]), .ackseqo(in_ackseqo[c]),
      .err_r(in_err_r[c]), .err_conf(in_err_conf[c]), .start(),
      .ackseqi(), .trandeti()
    );

    output_vc #(.ND(ND), .NSTAGE(OUT_STAGES)) u_ovc (
      .eclk(eclk), .rst_n(rst_n),
      .d_i(ovc_d[c]), .eop_i(ovc_eop[c]), .ack_o(ovc_ack[c]),
      .d_o(out_d[c]), .eop_o(out_eop[c]), .oa(out_ack[c]),
      .vc_busy(vc_busy[c]), .vc_rdy(vc_rdy[c]),
      .err_r(out_err_r[c]), .err_conf(out_err_conf[c]),
      .trandeto(out_trandeto[c]), .ackseqo(out_ackseqo[c])
    );
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_alloc
    logic [NC-1:0] preq;
    for (genvar c = 0; c < NC; c++) begin : g_req
      assign preq[c] = rt_r[c][p];
    end
    switch_allocator #(.NREQ(NC), .VN(VN)) u_sa (
      .eclk(eclk), .rst_n(rst_n),
      .req(preq), .vc_rdy(vc_rdy[p*VN +: VN]),
      .cfg(pcfg[p]), .gnt(pgnt[p]), .vc_busy(vc_busy[p*VN +: VN])
    );
  end

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      rt_ack[c] = 1'b0;
      for (int p = 0; p < NPORT; p++) rt_ack[c] |= pgnt[p][c];
    end
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < VN; v++)
        for (int c = 0; c < NC; c++)
          xcfg[p*VN+v][c] = pcfg[p][c][v];
  end

  crossbar #(.NIN(NC), .ND(ND)) u_xbar (
    .in_d(ivc_d), .in_eop(ivc_eop), .in_ack(cia),
    .out_d(ovc_d), .out_eop(ovc_eop), .out_ack(ovc_ack),
    .cfg(xcfg)
  );

endmodule
