// tb_sdm_router: one router at (1,1), DW = 8, VN = 2 (2 digits per VC).
// All ten input channels inject packets concurrently (head with the
// destination, three body flits carrying source channel, sequence number
// and a check value, tail).  Destinations are chosen so that XY routing
// never turns a packet back.  Every output channel is a sink that checks the
// packet arrived at the port XY routing gives, intact, and the test checks
// that every packet arrived and that both VCs of a port carried traffic.
module tb_sdm_router;
  import sdm_pkg::*;
  localparam int VN = 2, NC = NPORT * VN, RW = 8, NPKT = 12;

  logic eclk = 1'b0, clk = 1'b0, rst_n = 1'b0;
  always #1 eclk = ~eclk;
  always #10 clk = ~clk;

  logic [NC-1:0][RW-1:0] in_d, out_d;
  logic [NC-1:0] in_eop, in_ack, in_err_r, in_err_conf, in_trandeto, in_ackseqo;
  logic [NC-1:0] out_eop, out_ack, out_err_r, out_err_conf, out_trandeto, out_ackseqo;
  int checks = 0, failures = 0;

  sdm_router #(.X_POS(1), .Y_POS(1), .DW(8), .VN(VN), .TIMEOUT_CYCLES(20)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [7:0] enc(input logic [3:0] v);
    return 8'(1 << v[1:0]) | 8'(16 << v[3:2]);
  endfunction
  function automatic logic [3:0] dec(input logic [7:0] r);
    return {digit_value(r[7:4]), digit_value(r[3:0])};
  endfunction
  function automatic int route(input int x, input int y);   // expected output port
    if (x > 1) return int'(PORT_E);
    if (x < 1) return int'(PORT_W);
    if (y > 1) return int'(PORT_N);
    if (y < 1) return int'(PORT_S);
    return int'(PORT_L);
  endfunction
  function automatic logic [3:0] chk(input int c, input int s);
    return 4'((c * 7 + s * 3 + 5) % 16);
  endfunction

  int sent = 0, got = 0;
  int dst_of [NC][NPKT];
  int used_vc [NPORT][VN];

  for (genvar gc = 0; gc < NC; gc++) begin : g_src
    initial begin
      in_d[gc] = '0; in_eop[gc] = 0;
      @(posedge rst_n);
      repeat (gc) @(posedge eclk);
      for (int s = 0; s < NPKT; s++) begin
        logic [7:0] w [5];
        int x, y;
        do begin
          x = $urandom_range(0, 3); y = $urandom_range(0, 3);
        end while (route(x, y) == gc / VN);
        dst_of[gc][s] = route(x, y);
        w[0] = enc(4'(x) | 4'(y << 2));
        w[1] = enc(4'(gc));
        w[2] = enc(4'(s));
        w[3] = enc(chk(gc, s));
        w[4] = '0;
        for (int k = 0; k < 5; k++) begin
          in_d[gc] = w[k]; in_eop[gc] = (k == 4);
          while (!in_ack[gc]) @(posedge eclk);
          in_d[gc] = '0; in_eop[gc] = 0;
          while (in_ack[gc]) @(posedge eclk);
        end
        sent++;
      end
    end
  end

  for (genvar gc = 0; gc < NC; gc++) begin : g_snk
    initial begin
      logic [7:0] w [$];
      out_ack[gc] = 0;
      @(posedge rst_n);
      forever begin
        @(posedge eclk);
        if (out_eop[gc] || (out_d[gc][3:0] != 0 && out_d[gc][7:4] != 0)) begin
          if (out_eop[gc]) begin
            int src, s;
            src = int'(dec(w[1])); s = int'(dec(w[2]));
            check(w.size() == 4, "packet length");
            if (w.size() == 4 && src < NC && s < NPKT) begin
              check(dst_of[src][s] == gc / VN, "packet left by the XY port");
              check(dec(w[3]) == chk(src, s), "packet content");
              used_vc[gc / VN][gc % VN]++;
            end else check(0, "packet header");
            got++;
            w.delete();
          end else w.push_back(out_d[gc]);
          repeat ($urandom_range(0, 3)) @(posedge eclk);
          out_ack[gc] = 1;
          while (out_eop[gc] || out_d[gc] != 0) @(posedge eclk);
          out_ack[gc] = 0;
        end
      end
    end
  end

  initial begin
    in_trandeto = '0; in_ackseqo = '1; out_err_r = '0; out_err_conf = '0;
    for (int p = 0; p < NPORT; p++) for (int v = 0; v < VN; v++) used_vc[p][v] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (got < NC * NPKT) @(posedge clk);
    repeat (20) @(posedge clk);
    check(sent == NC * NPKT && got == NC * NPKT, "all packets delivered");
    for (int p = 0; p < NPORT; p++) check(used_vc[p][0] > 0 && used_vc[p][1] > 0, "both VCs of a port used");
    check(in_err_conf == '0, "no fault confirmed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: got %0d", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
