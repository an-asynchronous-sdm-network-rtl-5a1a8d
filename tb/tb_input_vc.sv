// tb_input_vc: one input VC (ND = 2, two stages) of the router at (1,1).
// A link-side driver sends 4-phase words; a crossbar-side responder plays
// the output VC (cia); a one-line allocator model grants rt_ack while a
// request is up and grant_en is set.
//  1. A head to (3,1) must raise the East request and stay in front of
//     Stage0 (nothing on the crossbar) until granted; then head, bodies and
//     tail must come out in order and the request must drop after the tail.
//  2. A head to (1,1) must raise the Local request.
//  3. Release: a packet stalls on an incomplete word (a lost rail); after
//     err_conf rises the VC must emit a fake tail, drop its request and
//     acknowledge the link from its sink.
module tb_input_vc;
  import sdm_pkg::*;
  logic eclk = 1'b0, rst_n = 1'b0;
  always #5 eclk = ~eclk;

  logic [7:0] d_i, d_o;
  logic eop_i, ack_o, eop_o, cia, rt_ack, err_conf, ipdia, ipdoa, ipeop;
  logic [NPORT-1:0] rt_r;
  logic grant_en;
  int checks = 0, failures = 0;

  input_vc #(.ND(2), .NSTAGE(2), .X_POS(1), .Y_POS(1)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic step(input int n = 1);
    repeat (n) @(posedge eclk);
    #1;
  endtask

  // allocator model
  always @(posedge eclk or negedge rst_n)
    if (!rst_n) rt_ack <= 1'b0;
    else        rt_ack <= (|rt_r) && grant_en;

  // output-VC model on the crossbar side
  logic [8:0] rx [$];
  always @(posedge eclk or negedge rst_n) begin
    if (!rst_n) cia <= 1'b0;
    else if (!cia && (eop_o || (d_o[3:0] != 0 && d_o[7:4] != 0))) begin
      cia <= 1'b1;
      rx.push_back({eop_o, d_o});
    end else if (cia && !eop_o && d_o == 0) cia <= 1'b0;
  end

  task automatic send(input logic [7:0] w, input logic e);
    d_i = w; eop_i = e;
    while (!ack_o) step();
    d_i = 0; eop_i = 0;
    while (ack_o) step();
  endtask

  logic [8:0] pkt [$];

  initial begin
    d_i = 0; eop_i = 0; err_conf = 0; grant_en = 0;
    step(2); rst_n = 1; step(2);
    // ---- 1: packet to the East ----
    pkt = '{ {1'b0, 8'b0001_1000}, {1'b0, 8'b0100_0010}, {1'b0, 8'b1000_0001}, {1'b1, 8'h00} };
    fork
      foreach (pkt[i]) send(pkt[i][7:0], pkt[i][8]);
    join_none
    step(20);
    check(rt_r == 5'b01000, "head to (3,1) requests East");
    check(d_o == 0 && eop_o == 0 && rx.size() == 0, "head held before Stage0 until granted");
    check(ipdoa == cia, "ipdoa is the crossbar ack");
    grant_en = 1;
    step(60);
    check(rx.size() == 4, "four flits delivered");
    if (rx.size() == 4) foreach (pkt[i]) check(rx[i] == pkt[i], "flit order and content");
    check(rt_r == 0 && rt_ack == 0, "request dropped after the tail");
    rx.delete();
    // ---- 2: packet to local ----
    fork
      begin send(8'b0010_0010, 0); send(8'b0001_0001, 0); send(0, 1); end
    join_none
    step(10);
    check(rt_r == 5'b10000 || rx.size() > 0, "head to (1,1) requests Local");
    step(50);
    check(rx.size() == 3 && rx[2][8], "local packet delivered with tail");
    rx.delete();
    // ---- 3: Release after a stall ----
    d_i = 8'b0001_1000; eop_i = 0;          // head to East
    while (!ack_o) step();
    d_i = 0; while (ack_o) step();
    d_i = 8'b0000_0100;                     // incomplete word: digit 1 lost
    step(40);
    check(rt_r == 5'b01000 && rt_ack == 1, "path held by the stalled packet");
    check(rx.size() == 1, "only the head went through");
    err_conf = 1;
    step(40);
    check(rx.size() >= 2 && rx[rx.size()-1][8] == 1, "fake tail emitted");
    check(rt_r == 0 && rt_ack == 0, "path released by the fake tail");
    check(ipdia == ack_o, "link acknowledged from the sink");
    d_i = 0; step(5);
    check(ack_o == 0, "sink follows the link to spacer");
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
