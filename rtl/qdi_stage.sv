// qdi_stage: one stage of a 4-phase 1-of-4 quasi-delay-insensitive pipeline.
//
// Every rail has a C-element latch whose inputs are the incoming rail and
// the inverted ack of the next stage (oa): the rail is set when the input
// rail is high and oa is low, and cleared when the input rail is low and oa
// is high.  Each digit has an OR completion detector; all of them feed a
// multi-input C-element that gives the stage ack (ia): high once a complete
// word is held, low once a full spacer is held.
//
// The eop wire is a single rail.  A tail flit is eop alone with every data
// rail low, so a digit slice counts as complete when it holds a valid rail
// or eop is high.  set_en inhibits only the setting of rails (the
// reset phase is never blocked); the input buffer uses it to hold a head
// flit in front of Stage0 until the path is allocated.
//
// Timing: every state-holding element is a flip-flop on eclk, so a rail
// changes one eclk after its inputs allow it and ia one eclk after that.
// The latch-and-C-element structure follows the pipeline the design is
// built on; the eop completion rule and set_en are this design's choices.
module qdi_stage #(
  parameter int ND = 16
) (
  input  logic            eclk,
  input  logic            rst_n,
  input  logic [4*ND-1:0] d_i,
  input  logic            eop_i,
  input  logic            oa,
  input  logic            set_en,
  output logic [4*ND-1:0] d_o,
  output logic            eop_o,
  output logic            ia
);

  logic [ND-1:0] slice_done;

  always_ff @(posedge eclk or negedge rst_n) begin
    if (!rst_n) begin
      d_o   <= '0;
      eop_o <= 1'b0;
    end else begin
      for (int r = 0; r < 4*ND; r++) begin
        if (d_i[r] && !oa && set_en) d_o[r] <= 1'b1;
        else if (!d_i[r] && oa)      d_o[r] <= 1'b0;
      end
      if (eop_i && !oa && set_en) eop_o <= 1'b1;
      else if (!eop_i && oa)      eop_o <= 1'b0;
    end
  end

  always_comb begin
    for (int k = 0; k < ND; k++)
      slice_done[k] = (|d_o[4*k +: 4]) | eop_o;
  end

  // multi-input C-element
  always_ff @(posedge eclk or negedge rst_n) begin
    if (!rst_n)              ia <= 1'b0;
    else if (&slice_done)    ia <= 1'b1;
    else if (~|slice_done)   ia <= 1'b0;
  end

endmodule
