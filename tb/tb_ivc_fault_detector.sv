// tb_ivc_fault_detector: drives the monitored signals and the time-out
// directly and checks the state {err_conf, err_r, start} after each
// time-out against the state graph:
//  idle pattern -> Start -> Enquiry -> Confirm in three time-outs;
//  a transition in Confirm -> Idle at the next time-out (fault gone);
//  a transition during Start -> Idle; a non-deadlock ack pattern -> Idle;
//  AckSeqo in Enquiry -> Idle at the next clk without a time-out;
//  TranDeto in Enquiry -> Idle at the time-out; cases 1 and 3 reach Enquiry.
module tb_ivc_fault_detector;
  logic eclk = 1'b0, clk = 1'b0, rst_n = 1'b0;
  always #1 eclk = ~eclk;
  always #10 clk = ~clk;

  logic timeout, rt_ack, ipdia, ipdoa, ipeop, trandeto, ackseqo;
  logic err_r, err_conf, start, ackseqi, trandeti;
  int checks = 0, failures = 0;

  ivc_fault_detector dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t state %b", what, $time, {err_conf, err_r, start}); end
  endtask
  task automatic clks(input int n);
    repeat (n) @(posedge clk);
    #2;
  endtask
  task automatic tick();   // one time-out pulse after a quiet period
    clks(5);
    timeout = 1;
    clks(1);
    timeout = 0;
  endtask
  function automatic logic [2:0] st();
    return {err_conf, err_r, start};
  endfunction

  initial begin
    timeout = 0; rt_ack = 0; ipdia = 0; ipdoa = 0; ipeop = 0; trandeto = 0; ackseqo = 0;
    clks(2); rst_n = 1; clks(2);
    check(st() == 3'b000, "Idle after reset");
    check(ackseqi == 1, "case 2 pattern recognised");
    // ---- idle pattern all the way to Confirm ----
    tick(); check(st() == 3'b001, "Idle -> Start");
    clks(2); check(trandeti == 0, "no transitions in Start");
    tick(); check(st() == 3'b011, "Start -> Enquiry");
    tick(); check(st() == 3'b111, "Enquiry -> Confirm");
    tick(); check(st() == 3'b111, "stays in Confirm while quiet");
    // ---- fault disappears ----
    ipdia = 1; clks(1); ipdia = 0;
    tick(); check(st() == 3'b000, "Confirm -> Idle after a transition on ipdia");
    // ---- transition during Start ----
    tick(); check(st() == 3'b001, "Idle -> Start (2)");
    ipdoa = 1; clks(1); ipdoa = 0; clks(1);
    check(trandeti == 1, "TranDeti reports the transition");
    tick(); check(st() == 3'b000, "Start -> Idle on a transition");
    // ---- pattern that is not a deadlock ----
    rt_ack = 1; ipdia = 1; ipdoa = 0; clks(1);
    check(ackseqi == 0, "alternating acks are no deadlock");
    tick(); tick(); check(st() == 3'b000, "Start -> Idle when AckSeqi is low");
    // ---- case 1, then AckSeqo in Enquiry ----
    ipdoa = 1; clks(1);
    check(ackseqi == 1, "case 1 pattern recognised");
    tick(); tick(); check(st() == 3'b011, "case 1 reaches Enquiry");
    ackseqo = 1; clks(2);
    check(st() == 3'b000, "AckSeqo sends Enquiry to Idle without a time-out");
    ackseqo = 0;
    // ---- case 3, then TranDeto in Enquiry ----
    rt_ack = 0; ipdia = 1; ipdoa = 0; ipeop = 1; clks(1);
    check(ackseqi == 1, "case 3 pattern recognised");
    tick(); tick(); check(st() == 3'b011, "case 3 reaches Enquiry");
    trandeto = 1;
    tick(); check(st() == 3'b000, "TranDeto in Enquiry -> Idle");
    trandeto = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
