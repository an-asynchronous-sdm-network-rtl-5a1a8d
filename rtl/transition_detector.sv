// transition_detector: reports whether a signal has changed since enabling.
//
// While ena is low the detector is disabled, outputs act = 1 and keeps a
// reference copy of sig.  Once ena is high the reference is frozen; as
// soon as sig differs from it, act is set and stays set until ena falls.
// A low act while enabled therefore means "no transition seen".
//
// The behaviour (output 1 when disabled, high act after a change of sig)
// is the detector the fault detection relies on; its construction from two
// flip-flops instead of the two asymmetric C-elements and the output gate
// of the original circuit is this design's choice.  The flag is sticky, so a
// signal that toggles and returns is still reported.
//
// Timing: both flip-flops are on eclk; act rises one eclk after sig changes.
module transition_detector (
  input  logic eclk,
  input  logic rst_n,
  input  logic ena,
  input  logic sig,
  output logic act
);

  logic ref_q;
  logic seen_q;

  always_ff @(posedge eclk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q  <= 1'b0;
      seen_q <= 1'b0;
    end else if (!ena) begin
      ref_q  <= sig;
      seen_q <= 1'b0;
    end else if (sig != ref_q) begin
      seen_q <= 1'b1;
    end
  end

  assign act = !ena || seen_q;

endmodule
