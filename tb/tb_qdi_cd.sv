// tb_qdi_cd: checks the completion-detector sink: ack rises only for a
// complete word or eop, holds for incomplete words, falls only at spacer.
module tb_qdi_cd;
  logic eclk = 1'b0, rst_n = 1'b0;
  always #5 eclk = ~eclk;
  logic [11:0] d;
  logic eop, ack;
  int checks = 0, failures = 0;

  qdi_cd #(.ND(3)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic step(input int n = 1);
    repeat (n) @(posedge eclk);
    #1;
  endtask

  initial begin
    d = 0; eop = 0;
    step(2); rst_n = 1; step();
    check(ack == 0, "reset");
    d = 12'b0001_0000_0000; step(2);
    check(ack == 0, "one digit: no ack");
    d = 12'b0001_0100_0000; step(2);
    check(ack == 0, "two digits: no ack");
    d = 12'b0001_0100_1000; step();
    check(ack == 1, "complete: ack");
    d = 12'b0000_0100_0000; step(2);
    check(ack == 1, "partial spacer: ack held");
    d = 0; step();
    check(ack == 0, "spacer: ack low");
    eop = 1; step();
    check(ack == 1, "eop alone: ack");
    eop = 0; step();
    check(ack == 0, "eop withdrawn");
    for (int i = 0; i < 20; i++) begin
      logic [11:0] w;
      w = 0;
      for (int k = 0; k < 3; k++) w[4*k + $urandom_range(0, 3)] = 1'b1;
      d = w; step(2);
      check(ack == 1, "random word acked");
      d = 0; step(2);
      check(ack == 0, "random spacer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge eclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
