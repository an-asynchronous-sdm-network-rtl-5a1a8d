// buffer_controller: flit-flow control of one input virtual circuit.
//
// It follows the signal transition graph of the controller: after the
// allocator grants a path (rt_ack+) the XY-controller is disabled (rt_en-)
// and Stage0 is opened (acken-); when the output has taken the tail flit
// (ackeop+) Stage0 is closed (acken+); once the tail is withdrawn
// (ackeop-) the XY-controller is reset (rt_rst+), which drops the request
// and hence rt_ack, after which rt_rst falls and rt_en rises again.
//
// One C-element c = C(rt_ack, ackeop) remembers that the tail has been
// taken.  The outputs are
//   rt_en  = !rt_ack
//   acken  = !rt_ack | c
//   rt_rst =  c & !ackeop
// These equations are derived here from the transition graph; the gate
// netlist of the original controller is not reproduced.
//
// Timing: c is a flip-flop on eclk; the outputs are combinational.
module buffer_controller (
  input  logic eclk,
  input  logic rst_n,
  input  logic rt_ack,
  input  logic ackeop,
  output logic rt_en,
  output logic acken,
  output logic rt_rst
);

  logic c_q;

  always_ff @(posedge eclk or negedge rst_n) begin
    if (!rst_n)                 c_q <= 1'b0;
    else if (rt_ack && ackeop)  c_q <= 1'b1;
    else if (!rt_ack && !ackeop) c_q <= 1'b0;
  end

  assign rt_en  = !rt_ack;
  assign acken  = !rt_ack || c_q;
  assign rt_rst = c_q && !ackeop;

endmodule
