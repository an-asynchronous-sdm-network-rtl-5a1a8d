// tb_crossbar: random one-to-one configurations of a 4x4 channel switch;
// rails and eop must reach the configured output, acks the configured
// input, unconnected outputs must stay at spacer.
module tb_crossbar;
  logic [3:0][7:0] in_d, out_d;
  logic [3:0] in_eop, in_ack, out_eop, out_ack;
  logic [3:0][3:0] cfg;
  int checks = 0, failures = 0;

  crossbar #(.NIN(4), .ND(2)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      int src [4];
      bit used [4];
      for (int i = 0; i < 4; i++) used[i] = 0;
      cfg = '0;
      for (int o = 0; o < 4; o++) begin
        int s;
        s = $urandom_range(0, 4);   // 4 = unconnected
        if (s < 4 && !used[s]) begin
          used[s] = 1;
          cfg[o][s] = 1'b1;
          src[o] = s;
        end else src[o] = -1;
      end
      for (int i = 0; i < 4; i++) begin
        in_d[i]   = 8'($urandom);
        in_eop[i] = 1'($urandom);
        out_ack[i] = 1'($urandom);
      end
      #1;
      for (int o = 0; o < 4; o++) begin
        if (src[o] >= 0) check(out_d[o] == in_d[src[o]] && out_eop[o] == in_eop[src[o]], "forward path");
        else             check(out_d[o] == 0 && out_eop[o] == 0, "unconnected output at spacer");
      end
      for (int i = 0; i < 4; i++) begin
        logic exp_a;
        exp_a = 0;
        for (int o = 0; o < 4; o++) if (src[o] == i) exp_a = out_ack[o];
        check(in_ack[i] == exp_a, "ack path");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
