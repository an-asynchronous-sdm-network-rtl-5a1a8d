// sdm_noc: 2D-mesh asynchronous SDM network-on-chip that detects permanent
// faults on its links and recovers from them.
//
// NX x NY sdm_router's; router n = y*NX + x sits at (x, y).  East of
// (x, y) is (x+1, y) and North is (x, y+1).  Every inter-router link is
// VN independent 1-of-4 virtual circuits (rails, eop, ack) plus the four
// fault-detection wires per circuit.  When a wire of a circuit is stuck,
// the packet on it deadlocks; the downstream router's detector recognises
// the deadlock pattern within two to four time-out periods, confirms it
// with the upstream router, blocks the circuit in the upstream allocator,
// drains the upstream part of the stalled packet and releases the
// downstream part with a fake tail.  Later packets take the other circuits
// of the same link.  If the wire recovers, the circuit is unblocked.
//
// Local ports: lin_* inject (the network acknowledges on lin_ack) and
// lout_* eject (the receiver acknowledges on lout_ack), indexed
// [router][vc], all 4-phase 1-of-4.  The local ports and the mesh edge are
// not monitored: their detector inputs are tied so that no fault is ever
// confirmed there.
//
// fault_sa0/fault_sa1 force wires of the link leaving router n towards
// direction d (0 S, 1 W, 2 N, 3 E), circuit v, to 0 or 1: bits
// [2*DW/VN-1:0] are the rails, bit 2*DW/VN the eop wire and bit 2*DW/VN+1
// the ack wire coming back.  They model the physical wire and are tied low
// in use.  err_conf reports the Confirm state of every input circuit.
//
// Timing: eclk steps the asynchronous logic, clk runs the detectors.
// The defaults are the evaluated network: 4x4 routers, DW = 64, VN = 2,
// two input stages, one output stage, time-out of 67 clk cycles (1.5 MHz
// from 100 MHz).
module sdm_noc
  import sdm_pkg::*;
#(
  parameter int NX             = 4,
  parameter int NY             = 4,
  parameter int DW             = 64,
  parameter int VN             = 2,
  parameter int IN_STAGES      = 2,
  parameter int OUT_STAGES     = 1,
  parameter int TIMEOUT_CYCLES = 67
) (
  input  logic                                      eclk,
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic [NX*NY-1:0][VN-1:0][2*DW/VN-1:0]     lin_d,
  input  logic [NX*NY-1:0][VN-1:0]                  lin_eop,
  output logic [NX*NY-1:0][VN-1:0]                  lin_ack,
  output logic [NX*NY-1:0][VN-1:0][2*DW/VN-1:0]     lout_d,
  output logic [NX*NY-1:0][VN-1:0]                  lout_eop,
  input  logic [NX*NY-1:0][VN-1:0]                  lout_ack,
  input  logic [NX*NY-1:0][3:0][VN-1:0][2*DW/VN+1:0] fault_sa0,
  input  logic [NX*NY-1:0][3:0][VN-1:0][2*DW/VN+1:0] fault_sa1,
  output logic [NX*NY-1:0][NPORT-1:0][VN-1:0]       err_conf
);

  localparam int NN = NX * NY;
  localparam int RW = 2 * DW / VN;
  localparam int NC = NPORT * VN;

  logic [NN-1:0][NC-1:0][RW-1:0] r_in_d, r_out_d;
  logic [NN-1:0][NC-1:0] r_in_eop, r_in_ack, r_in_err_r, r_in_err_conf, r_in_trandeto, r_in_ackseqo;
  logic [NN-1:0][NC-1:0] r_out_eop, r_out_ack, r_out_err_r, r_out_err_conf, r_out_trandeto, r_out_ackseqo;

  for (genvar n = 0; n < NN; n++) begin : g_node
    localparam int X = n % NX;
    localparam int Y = n / NX;

    sdm_router #(
      .X_POS(X), .Y_POS(Y), .DW(DW), .VN(VN), .IN_STAGES(IN_STAGES),
      .OUT_STAGES(OUT_STAGES), .TIMEOUT_CYCLES(TIMEOUT_CYCLES)
    ) u_router (
      .eclk(eclk), .clk(clk), .rst_n(rst_n),
      .in_d(r_in_d[n]), .in_eop(r_in_eop[n]), .in_ack(r_in_ack[n]),
      .in_err_r(r_in_err_r[n]), .in_err_conf(r_in_err_conf[n]),
      .in_trandeto(r_in_trandeto[n]), .in_ackseqo(r_in_ackseqo[n]),
      .out_d(r_out_d[n]), .out_eop(r_out_eop[n]), .out_ack(r_out_ack[n]),
      .out_err_r(r_out_err_r[n]), .out_err_conf(r_out_err_conf[n]),
      .out_trandeto(r_out_trandeto[n]), .out_ackseqo(r_out_ackseqo[n])
    );

    for (genvar v = 0; v < VN; v++) begin : g_vc
      localparam int CL = int'(PORT_L) * VN + v;
      // local port: not monitored
      assign r_in_d[n][CL]        = lin_d[n][v];
      assign r_in_eop[n][CL]      = lin_eop[n][v];
      assign lin_ack[n][v]        = r_in_ack[n][CL];
      assign r_in_trandeto[n][CL] = 1'b0;
      assign r_in_ackseqo[n][CL]  = 1'b1;
      assign lout_d[n][v]         = r_out_d[n][CL];
      assign lout_eop[n][v]       = r_out_eop[n][CL];
      assign r_out_ack[n][CL]     = lout_ack[n][v];
      assign r_out_err_r[n][CL]   = 1'b0;
      assign r_out_err_conf[n][CL] = 1'b0;
      for (genvar p = 0; p < NPORT; p++) begin : g_ec
        assign err_conf[n][p][v] = r_in_err_conf[n][p*VN+v];
      end

      // inter-router ports: d is the direction of the output port of n
      for (genvar d = 0; d < 4; d++) begin : g_dir
        localparam int DX   = (d == int'(PORT_E)) ? 1 : (d == int'(PORT_W)) ? -1 : 0;
        localparam int DY   = (d == int'(PORT_N)) ? 1 : (d == int'(PORT_S)) ? -1 : 0;
        localparam bit HAS  = (X + DX >= 0) && (X + DX < NX) && (Y + DY >= 0) && (Y + DY < NY);
        localparam int M    = HAS ? (Y + DY) * NX + (X + DX) : n;  // neighbour
        localparam int OPP  = (d + 2) % 4;                           // its input port
        localparam int CO   = d * VN + v;                            // channel at n
        localparam int CI   = OPP * VN + v;                          // channel at m
        if (HAS) begin : g_link
          // link wires n -> m with stuck-at insertion
          assign r_in_d[M][CI]   = (r_out_d[n][CO] | fault_sa1[n][d][v][RW-1:0]) & ~fault_sa0[n][d][v][RW-1:0];
          assign r_in_eop[M][CI] = (r_out_eop[n][CO] | fault_sa1[n][d][v][RW]) & ~fault_sa0[n][d][v][RW];
          assign r_out_ack[n][CO] = (r_in_ack[M][CI] | fault_sa1[n][d][v][RW+1]) & ~fault_sa0[n][d][v][RW+1];
          // fault-detection wires
          assign r_out_err_r[n][CO]    = r_in_err_r[M][CI];
          assign r_out_err_conf[n][CO] = r_in_err_conf[M][CI];
          assign r_in_trandeto[M][CI]  = r_out_trandeto[n][CO];
          assign r_in_ackseqo[M][CI]   = r_out_ackseqo[n][CO];
        end else begin : g_edge
          // mesh edge: no neighbour on this side
          assign r_out_ack[n][CO]      = 1'b0;
          assign r_out_err_r[n][CO]    = 1'b0;
          assign r_out_err_conf[n][CO] = 1'b0;
          assign r_in_d[n][d*VN+v]        = '0;
          assign r_in_eop[n][d*VN+v]      = 1'b0;
          assign r_in_trandeto[n][d*VN+v] = 1'b0;
          assign r_in_ackseqo[n][d*VN+v]  = 1'b1;
        end
      end
    end
  end

endmodule
