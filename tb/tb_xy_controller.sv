// tb_xy_controller: router at (1,2); every destination of a 4x4 mesh is
// presented as a head flit and the request is compared with XY routing
// worked out here; polluted heads, tails and a disabled controller must
// raise no request, and rt_rst must clear it.
module tb_xy_controller;
  import sdm_pkg::*;
  logic eclk = 1'b0, rst_n = 1'b0;
  always #5 eclk = ~eclk;
  logic [7:0] d;
  logic eop, rt_en, rt_rst;
  logic [NPORT-1:0] rt_r;
  int checks = 0, failures = 0;

  xy_controller #(.ND(2), .X_POS(1), .Y_POS(2)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic step(input int n = 1);
    repeat (n) @(posedge eclk);
    #1;
  endtask

  initial begin
    d = 0; eop = 0; rt_en = 1; rt_rst = 0;
    step(2); rst_n = 1; step();
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++) begin
        logic [NPORT-1:0] exp_r;
        if (x > 1)      exp_r = 5'b01000;   // East
        else if (x < 1) exp_r = 5'b00010;   // West
        else if (y > 2) exp_r = 5'b00100;   // North
        else if (y < 2) exp_r = 5'b00001;   // South
        else            exp_r = 5'b10000;   // Local
        d = 8'(1 << x) | 8'(16 << y);
        step(2);
        check(rt_r == exp_r, $sformatf("route to (%0d,%0d)", x, y));
        d = 0; rt_rst = 1; step();
        check(rt_r == 0, "rt_rst clears request");
        rt_rst = 0;
      end
    d = 8'b0001_0011; step(3);
    check(rt_r == 0, "polluted head: no request");
    d = 8'b0000_0001; step(3);
    check(rt_r == 0, "incomplete head: no request");
    d = 0; eop = 1; step(3);
    check(rt_r == 0, "fake tail: no request");
    eop = 0; rt_en = 0; d = 8'b0001_1000; step(3);
    check(rt_r == 0, "disabled: no request");
    rt_en = 1; step(2);
    check(rt_r == 5'b01000, "enabled: request");
    d = 8'b0001_0001; step(2);
    check(rt_r == 5'b01000, "request held until reset");
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
