// crossbar: the (port x VC) by (port x VC) switch of the SDM router.
//
// Every input VC and every output VC is a separate (DW/VN)-bit channel, so
// the switch is NIN x NIN channels wide.  cfg[o][i] connects input VC i
// to output VC o.  Rails and eop go forward as an AND-OR multiplexer
// per output VC; the ack of output VC o goes back to the input VC it is
// connected to (cia).  The allocator guarantees at most one tile per row
// and column.  Purely combinational; this AND-OR form is this design's
// choice.
module crossbar #(
  parameter int NIN = 10,
  parameter int ND  = 16
) (
  input  logic [NIN-1:0][4*ND-1:0] in_d,
  input  logic [NIN-1:0]           in_eop,
  output logic [NIN-1:0]           in_ack,
  output logic [NIN-1:0][4*ND-1:0] out_d,
  output logic [NIN-1:0]           out_eop,
  input  logic [NIN-1:0]           out_ack,
  input  logic [NIN-1:0][NIN-1:0]  cfg
);

  always_comb begin
    out_d   = '0;
    out_eop = '0;
    in_ack  = '0;
    for (int o = 0; o < NIN; o++) begin
      for (int i = 0; i < NIN; i++) begin
        if (cfg[o][i]) begin
          out_d[o]   |= in_d[i];
          out_eop[o] |= in_eop[i];
          in_ack[i]  |= out_ack[o];
        end
      end
    end
  end

endmodule
