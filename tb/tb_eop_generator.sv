// tb_eop_generator: without err_conf no fake eop is made; with err_conf, a
// controller halted with Stage0 open and the output empty (acken=0, cia=0)
// gets eop_err high, which falls once the tail is taken (acken=1, cia=1) and
// stays low while the tail is withdrawn (cia falls, acken stays high).
module tb_eop_generator;
  logic eclk = 1'b0, rst_n = 1'b0;
  always #5 eclk = ~eclk;
  logic acken, cia, err_conf, eop_err;
  int checks = 0, failures = 0;

  eop_generator dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic step(input int n = 1);
    repeat (n) @(posedge eclk);
    #1;
  endtask

  initial begin
    acken = 1; cia = 0; err_conf = 0;
    step(2); rst_n = 1; step(2);
    check(eop_err == 0, "reset");
    acken = 0; step(3);
    check(eop_err == 0, "no err_conf: no fake eop");
    err_conf = 1; step(2);
    check(eop_err == 1, "halted mid-packet: fake tail");
    cia = 1; step(2);
    check(eop_err == 1, "held while output takes it");
    acken = 1; step(3);
    check(eop_err == 0, "withdrawn once the tail was taken");
    cia = 0; step(3);
    check(eop_err == 0, "stays low while tail withdrawn");
    // halted with a stuck tail: acken=1, cia=1 -> eop_err low
    err_conf = 0; step(); cia = 1; step(2); err_conf = 1; step(3);
    check(eop_err == 0, "stuck tail case gives low eop_err");
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
