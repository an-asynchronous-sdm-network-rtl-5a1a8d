// sdm_pkg: types and constants shared by the SDM router and mesh.
//
// Ports are numbered South, West, North, East, Local (the order the router
// is drawn in).  Every virtual circuit (VC) carries 4-phase 1-of-4 words:
// a word of ND digits is 4*ND rails, digit k being rails [4k+3:4k] with the
// value given by which rail is high, plus one eop wire for the tail flit.
// The fault-detection state machine is encoded by its three flip-flops
// {err_conf, err_r, start}.
package sdm_pkg;

  localparam int NPORT = 5;

  typedef enum logic [2:0] {
    PORT_S = 3'd0,
    PORT_W = 3'd1,
    PORT_N = 3'd2,
    PORT_E = 3'd3,
    PORT_L = 3'd4
  } port_e;

  // {err_conf, err_r, start}
  typedef enum logic [2:0] {
    FD_IDLE    = 3'b000,
    FD_START   = 3'b001,
    FD_ENQUIRY = 3'b011,
    FD_CONFIRM = 3'b111
  } fd_state_e;

  // Value (0..3) of a 1-of-4 digit; meaningful only for a valid code.
  function automatic logic [1:0] digit_value(input logic [3:0] r);
    logic [1:0] v;
    v = 2'd0;
    for (int i = 0; i < 4; i++)
      if (r[i]) v = 2'(i);
    return v;
  endfunction

  // A 1-of-4 digit is valid when exactly one rail is high.
  function automatic logic digit_valid(input logic [3:0] r);
    return (r == 4'b0001) || (r == 4'b0010) || (r == 4'b0100) || (r == 4'b1000);
  endfunction

endpackage
