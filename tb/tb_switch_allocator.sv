// tb_switch_allocator: 4 requesters, 2 output VCs.  Checks at every cycle
// that no requester holds two VCs, no VC serves two requesters, grants
// only go to requesters that ask and to ready VCs; and in scenarios that
// two requests get both VCs, a third waits until one is released, a VC
// with vc_rdy low is never granted, and releases clear the tile.
module tb_switch_allocator;
  logic eclk = 1'b0, rst_n = 1'b0;
  always #5 eclk = ~eclk;
  logic [3:0] req, gnt;
  logic [1:0] vc_rdy, vc_busy;
  logic [3:0][1:0] cfg;
  int checks = 0, failures = 0;

  switch_allocator #(.NREQ(4), .VN(2)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic step(input int n = 1);
    repeat (n) @(posedge eclk);
    #1;
  endtask

  // invariants
  always @(negedge eclk) if (rst_n) begin
    for (int i = 0; i < 4; i++) begin
      check(!(cfg[i][0] && cfg[i][1]), "one VC per requester");
      check(gnt[i] == |cfg[i], "gnt is row OR");
    end
    for (int v = 0; v < 2; v++) begin
      int c;
      c = 0;
      for (int i = 0; i < 4; i++) c += int'(cfg[i][v]);
      check(c <= 1, "one requester per VC");
      check(vc_busy[v] == (c == 1), "vc_busy is column OR");
    end
  end

  initial begin
    req = 0; vc_rdy = 2'b11;
    step(2); rst_n = 1; step();
    req = 4'b0011; step(3);
    check(gnt == 4'b0011 && vc_busy == 2'b11, "two requests get both VCs");
    req = 4'b0111; step(3);
    check(gnt[2] == 0, "third request waits");
    req = 4'b0110; step(1);
    check(gnt[0] == 0, "released tile cleared");
    step(2);
    check(gnt == 4'b0110, "waiting request granted the freed VC");
    req = 0; step(2);
    check(gnt == 0 && vc_busy == 0, "all released");
    // VC 0 blocked
    vc_rdy = 2'b10;
    req = 4'b1001; step(4);
    check(cfg[0][0] == 0 && cfg[3][0] == 0, "blocked VC never granted");
    check(vc_busy == 2'b10 && $countones(gnt) == 1, "only the ready VC used");
    req = 0; step(2);
    // random stress
    vc_rdy = 2'b11;
    for (int t = 0; t < 300; t++) begin
      req = req ^ 4'($urandom_range(0, 15) & $urandom_range(0, 15));
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge eclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
