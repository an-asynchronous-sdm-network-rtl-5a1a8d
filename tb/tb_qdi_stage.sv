// tb_qdi_stage: checks the 4-phase behaviour of one pipeline stage (ND = 2):
// data is latched only while the next stage's ack is low, held while the
// input returns to spacer, cleared only when that ack is high; ack rises
// for a complete word or a tail (eop alone) and never for an incomplete
// word; set_en low blocks setting but not resetting.
module tb_qdi_stage;
  logic eclk = 1'b0, rst_n = 1'b0;
  always #5 eclk = ~eclk;

  logic [7:0] d_i, d_o;
  logic eop_i, eop_o, oa, set_en, ia;
  int checks = 0, failures = 0;

  qdi_stage #(.ND(2)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic step(input int n = 1);
    repeat (n) @(posedge eclk);
    #1;
  endtask

  initial begin
    d_i = '0; eop_i = 0; oa = 0; set_en = 1;
    step(2); rst_n = 1; step();
    check(d_o == 0 && ia == 0, "reset to spacer");
    // complete word with oa low
    d_i = 8'b0100_0001; step();
    check(d_o == 8'b0100_0001, "word latched");
    step();
    check(ia == 1, "ack high for complete word");
    // input back to spacer, oa still low: hold
    d_i = '0; step(3);
    check(d_o == 8'b0100_0001 && ia == 1, "word held while next ack low");
    // next stage acknowledges: reset
    oa = 1; step();
    check(d_o == 0, "spacer latched after ack");
    step();
    check(ia == 0, "ack low for spacer");
    // with oa high a new word must wait
    d_i = 8'b0010_1000; step(3);
    check(d_o == 0 && ia == 0, "new word waits for next stage ack low");
    oa = 0; step(2);
    check(d_o == 8'b0010_1000 && ia == 1, "new word latched after ack low");
    d_i = 0; oa = 1; step(2);
    check(ia == 0, "second handshake complete");
    // incomplete word: one digit only
    oa = 0; d_i = 8'b0000_0100; step(3);
    check(ia == 0, "no ack for incomplete word");
    d_i = 8'b1000_0100; step(2);
    check(ia == 1, "ack once word completes");
    d_i = 0; oa = 1; step(2);
    // tail: eop only
    oa = 0; eop_i = 1; step(2);
    check(eop_o == 1 && ia == 1, "tail flit acknowledged");
    eop_i = 0; oa = 1; step(2);
    check(eop_o == 0 && ia == 0, "tail withdrawn");
    // set_en low blocks setting
    oa = 0; set_en = 0; d_i = 8'b0001_0001; step(3);
    check(d_o == 0 && ia == 0, "set blocked by set_en");
    set_en = 1; step(2);
    check(d_o == 8'b0001_0001 && ia == 1, "set after set_en");
    set_en = 0; d_i = 0; oa = 1; step(2);
    check(d_o == 0 && ia == 0, "reset not blocked by set_en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge eclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
