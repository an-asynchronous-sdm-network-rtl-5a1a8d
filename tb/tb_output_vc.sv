// tb_output_vc: one output VC (ND = 2, one stage).
//  1. Words from the crossbar side reach the link in order (link partner
//     modelled here).
//  2. AckSeqo: 0 without err_r; with err_r, 1 when the VC is idle or the two
//     acks are equal, 0 for the upstream deadlock pattern (busy, acks differ).
//  3. TranDeto: a change of the link ack while err_r is high is reported.
//  4. Blocking and Drain: with err_conf, vc_rdy stays low after vc_busy
//     falls, the link sees only spacer and crossbar words are swallowed by
//     the sink; when err_conf falls, vc_rdy returns.
module tb_output_vc;
  logic eclk = 1'b0, rst_n = 1'b0;
  always #5 eclk = ~eclk;

  logic [7:0] d_i, d_o;
  logic eop_i, ack_o, eop_o, oa, vc_busy, vc_rdy, err_r, err_conf, trandeto, ackseqo;
  logic link_en;
  int checks = 0, failures = 0;

  output_vc #(.ND(2), .NSTAGE(1)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic step(input int n = 1);
    repeat (n) @(posedge eclk);
    #1;
  endtask

  // link partner
  logic [8:0] rx [$];
  always @(posedge eclk or negedge rst_n) begin
    if (!rst_n) oa <= 1'b0;
    else if (link_en) begin
      if (!oa && (eop_o || (d_o[3:0] != 0 && d_o[7:4] != 0))) begin
        oa <= 1'b1;
        rx.push_back({eop_o, d_o});
      end else if (oa && !eop_o && d_o == 0) oa <= 1'b0;
    end
  end

  task automatic send(input logic [7:0] w, input logic e);
    d_i = w; eop_i = e;
    while (!ack_o) step();
    d_i = 0; eop_i = 0;
    while (ack_o) step();
  endtask

  initial begin
    d_i = 0; eop_i = 0; vc_busy = 0; err_r = 0; err_conf = 0; link_en = 1;
    step(2); rst_n = 1; step(2);
    check(vc_rdy == 1, "idle VC ready");
    vc_busy = 1; step(2);
    check(vc_rdy == 0, "busy VC not ready");
    send(8'b0001_0010, 0); send(8'b1000_0100, 0); send(0, 1);
    step(5);
    check(rx.size() == 3 && rx[0] == {1'b0, 8'b0001_0010} && rx[1] == {1'b0, 8'b1000_0100} && rx[2][8], "words reach the link in order");
    check(ackseqo == 0 && trandeto == 1, "monitor idle without err_r");
    // ---- upstream deadlock pattern: link partner stops acking with a word held ----
    link_en = 0;
    err_r = 1; step(2);
    check(ackseqo == 1, "AckSeqo high for equal acks (empty stage, link ack low)");
    fork send(8'b0001_0001, 0); join_none
    step(10);
    // stage holds the word (opdia=1), link ack low (opdoa=0)
    check(ackseqo == 0, "AckSeqo low for busy VC with unequal acks");
    check(trandeto == 0, "no transition on the link ack");
    vc_busy = 0; #1;
    check(ackseqo == 1, "AckSeqo high for an idle VC");
    vc_busy = 1;
    oa = 1; step(2);
    check(trandeto == 1, "TranDeto reports the link ack change");
    oa = 0; step(2);
    vc_busy = 1;
    err_r = 0; step(2);
    // ---- confirm: block and drain ----
    err_conf = 1; step(2);
    vc_busy = 0; step(3);
    check(vc_rdy == 0, "blocked VC stays not ready");
    step(5);
    check(d_o == 0 && eop_o == 0, "link driven with spacer during Drain");
    rx.delete();
    link_en = 0;
    send(8'b0010_0001, 0); send(8'b0100_0100, 0); send(0, 1);
    check(1'b1, "Drain sink swallowed three words");
    step(5);
    check(d_o == 0 && eop_o == 0, "nothing reaches the faulty link");
    err_conf = 0; step(3);
    check(vc_rdy == 1, "VC ready again after err_conf falls");
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
