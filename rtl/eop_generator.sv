// eop_generator: makes the fake tail flit of the Release operation.
//
// n = NOT C(acken, cia) is high while the buffer controller is waiting for a
// tail flit and the output is empty.  eop_err is an asymmetric C-element:
// it rises when n and err_conf are both high and falls as soon as n falls
// (err_conf takes part only in the rising edge).  Once the fault is
// confirmed, eop_err replaces the eop at the input of Stage0: a high eop_err
// creates a tail flit for a path halted in the middle of a packet, a low one
// withdraws a tail that a stuck wire would hold forever.
//
// The two C-elements and their connection follow the original generator.
// Timing: both C-elements are flip-flops on eclk.
module eop_generator (
  input  logic eclk,
  input  logic rst_n,
  input  logic acken,
  input  logic cia,
  input  logic err_conf,
  output logic eop_err
);

  logic c1_q;
  logic n;

  always_ff @(posedge eclk or negedge rst_n) begin
    if (!rst_n)              c1_q <= 1'b0;
    else if (acken && cia)   c1_q <= 1'b1;
    else if (!acken && !cia) c1_q <= 1'b0;
  end

  assign n = !c1_q;

  always_ff @(posedge eclk or negedge rst_n) begin
    if (!rst_n)               eop_err <= 1'b0;
    else if (n && err_conf)   eop_err <= 1'b1;
    else if (!n)              eop_err <= 1'b0;
  end

endmodule
