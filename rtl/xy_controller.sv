// xy_controller: XY dimension-ordered routing request of one input VC.
//
// The head flit waiting in front of Stage0 carries the destination: digit 0
// is the x coordinate and digit 1 the y coordinate, each a 1-of-4 code (so
// meshes up to 4x4).  When rt_en is high, no request is pending and both
// address digits are valid codes with eop low, the controller raises one bit
// of rt_r: East/West until x matches X_POS, then North/South until y matches
// Y_POS, then Local.  The request is held until rt_rst clears it.  A head
// flit with a missing or extra rail (a polluted head) raises no request.
//
// Dimension-ordered routing follows the design; the address format and the
// direction convention (East = x+1, North = y+1) are this design's choices.
//
// Timing: rt_r is a flip-flop on eclk, so the request follows a valid head by
// one eclk; rt_rst has priority.  The whole word is the port so the
// controller sits on the Stage0 input bus as drawn; only digits 0 and 1 are
// read, and lint reports the others as unused.
module xy_controller
  import sdm_pkg::*;
#(
  parameter int ND    = 16,
  parameter int X_POS = 0,
  parameter int Y_POS = 0
) (
  input  logic             eclk,
  input  logic             rst_n,
  input  logic [4*ND-1:0]  d,
  input  logic             eop,
  input  logic             rt_en,
  input  logic             rt_rst,
  output logic [NPORT-1:0] rt_r
);

  logic       hdr_ok;
  logic [1:0] dx, dy;
  port_e      dir;

  always_comb begin
    hdr_ok = digit_valid(d[3:0]) && digit_valid(d[7:4]) && !eop;
    dx     = digit_value(d[3:0]);
    dy     = digit_value(d[7:4]);
    if (int'(dx) > X_POS)      dir = PORT_E;
    else if (int'(dx) < X_POS) dir = PORT_W;
    else if (int'(dy) > Y_POS) dir = PORT_N;
    else if (int'(dy) < Y_POS) dir = PORT_S;
    else                       dir = PORT_L;
  end

  always_ff @(posedge eclk or negedge rst_n) begin
    if (!rst_n)                            rt_r <= '0;
    else if (rt_rst)                       rt_r <= '0;
    else if (rt_en && rt_r == '0 && hdr_ok) rt_r <= NPORT'(1) << dir;
  end

endmodule
