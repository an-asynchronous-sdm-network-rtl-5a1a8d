// tb_timeout_counter: with a period of 7 the pulse must last one cycle and
// repeat every 7 cycles.
module tb_timeout_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic timeout;
  int checks = 0, failures = 0;
  int last, n;

  timeout_counter #(.TIMEOUT_CYCLES(7)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    last = -1; n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 100; c++) begin
      @(posedge clk); #1;
      if (timeout) begin
        if (last >= 0) check(c - last == 7, "period of 7 cycles");
        last = c;
        n++;
      end
    end
    check(n >= 13, "pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
