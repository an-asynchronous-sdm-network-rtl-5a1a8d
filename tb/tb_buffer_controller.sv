// tb_buffer_controller: walks the controller through its transition graph
// twice (two packets) and checks rt_en, acken and rt_rst at every step
// against the expected sequence:
//   rt_ack+ -> rt_en-, acken-;  ackeop+ -> acken+;  ackeop- -> rt_rst+;
//   rt_ack- -> rt_rst-, rt_en+.
module tb_buffer_controller;
  logic eclk = 1'b0, rst_n = 1'b0;
  always #5 eclk = ~eclk;
  logic rt_ack, ackeop, rt_en, acken, rt_rst;
  int checks = 0, failures = 0;

  buffer_controller dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic step(input int n = 1);
    repeat (n) @(posedge eclk);
    #1;
  endtask
  task automatic expect3(input logic en, input logic ak, input logic rs, input string what);
    check(rt_en == en && acken == ak && rt_rst == rs, what);
  endtask

  initial begin
    rt_ack = 0; ackeop = 0;
    step(2); rst_n = 1; step();
    for (int p = 0; p < 2; p++) begin
      expect3(1, 1, 0, "waiting for head: XY enabled, Stage0 blocked");
      rt_ack = 1; step(2);
      expect3(0, 0, 0, "granted: XY disabled, Stage0 open");
      step(5);
      expect3(0, 0, 0, "body flits: unchanged");
      ackeop = 1; step(2);
      expect3(0, 1, 0, "tail taken: Stage0 blocked");
      ackeop = 0; step(2);
      expect3(0, 1, 1, "tail withdrawn: XY reset");
      rt_ack = 0; step(2);
      expect3(1, 1, 0, "path released: reset withdrawn, XY enabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge eclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
