// tb_transition_detector: act is 1 while disabled, 0 after enabling, set by
// any change of sig and kept even if sig changes back, cleared by disabling.
module tb_transition_detector;
  logic eclk = 1'b0, rst_n = 1'b0;
  always #5 eclk = ~eclk;
  logic ena, sig, act;
  int checks = 0, failures = 0;

  transition_detector dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic step(input int n = 1);
    repeat (n) @(posedge eclk);
    #1;
  endtask

  initial begin
    ena = 0; sig = 1;
    step(2); rst_n = 1; step(2);
    check(act == 1, "disabled outputs 1");
    ena = 1; step(3);
    check(act == 0, "enabled, no transition");
    sig = 0; step();
    check(act == 1, "falling transition detected");
    sig = 1; step(2);
    check(act == 1, "detection is kept after sig returns");
    ena = 0; step();
    check(act == 1, "disabled again");
    ena = 1; step(3);
    check(act == 0, "re-armed");
    sig = 0; step(); sig = 1; step(); sig = 0; step(2);
    check(act == 1, "pulse train detected");
    ena = 0; step(); ena = 1; step(4);
    check(act == 0, "re-armed at low level");
    sig = 1; step();
    check(act == 1, "rising transition detected");
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
