// qdi_cd: completion detector of a 1-of-4 word, used as a sink.
//
// Each digit slice is complete when one of its rails or the eop wire is
// high; a multi-input C-element over the slices gives ack, which rises once
// a complete word is present and falls once the word has returned to a full
// spacer.  Fed back as the ack of the stage that drives d/eop, it swallows
// every word it sees: this is the sink of the Drain operation at an output
// VC and of the Release operation at an input VC.
//
// Timing: ack is a flip-flop on eclk (one eclk of element delay).
module qdi_cd #(
  parameter int ND = 16
) (
  input  logic            eclk,
  input  logic            rst_n,
  input  logic [4*ND-1:0] d,
  input  logic            eop,
  output logic            ack
);

  logic [ND-1:0] slice_done;

  always_comb begin
    for (int k = 0; k < ND; k++)
      slice_done[k] = (|d[4*k +: 4]) | eop;
  end

  always_ff @(posedge eclk or negedge rst_n) begin
    if (!rst_n)            ack <= 1'b0;
    else if (&slice_done)  ack <= 1'b1;
    else if (~|slice_done) ack <= 1'b0;
  end

endmodule
