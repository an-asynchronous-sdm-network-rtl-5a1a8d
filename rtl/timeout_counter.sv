// timeout_counter: time-out pulse generator of one router.
//
// Counts clk cycles and raises timeout for one cycle every TIMEOUT_CYCLES
// cycles.  The default, 67, is a 1.5 MHz time-out from a 100 MHz clock; the
// period only has to exceed the time a packet needs to cross a router.
module timeout_counter #(
  parameter int TIMEOUT_CYCLES = 67
) (
  input  logic clk,
  input  logic rst_n,
  output logic timeout
);

  localparam int CW = $clog2(TIMEOUT_CYCLES + 1);

  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      timeout <= 1'b0;
    end else if (cnt_q == CW'(TIMEOUT_CYCLES - 1)) begin
      cnt_q   <= '0;
      timeout <= 1'b1;
    end else begin
      cnt_q   <= cnt_q + 1'b1;
      timeout <= 1'b0;
    end
  end

endmodule
