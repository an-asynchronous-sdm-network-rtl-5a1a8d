// tb_sdm_noc_vn4: the 4x4 SDM mesh with 32-bit links split into four
// virtual circuits (DW = 32, VN = 4), the narrowest configuration of the
// evaluated set.  Each circuit is 8 bits wide (4 digits), so a 64-byte packet
// is a head flit, 64 body flits and a tail flit.
//
// The head carries destination x, y in digits 0 and 1 and the source router
// in digits 2 and 3.  Body flit k of a packet from source s carries
// hash(s, k) truncated to 8 bits; sinks check it.
//
// Phase 1: uniform random traffic, 3 packets per source circuit (192): every
//          packet must arrive intact, and all four circuits of some link
//          must be in use at once.
// Phase 2: a stuck-at-0 on rail 1 of digit 3 of circuit 2 on the East link
//          of router (1,2), inserted while circuit 2 carries a packet.  The
//          first word whose digit 3 has value 1 freezes the circuit.  The
//          downstream router (2,2) must confirm the fault on its West
//          circuit 2, the sources must all finish (Drain and Release clear
//          the frozen path), at most one packet may be lost, and the
//          circuit must stay blocked upstream.
// Phase 3: the fault is removed; the circuit must be unblocked and later
//          packets must arrive intact.
module tb_sdm_noc_vn4;
  import sdm_pkg::*;

  localparam int NX = 4, NY = 4, DW = 32, VN = 4;
  localparam int NN = NX * NY;
  localparam int RW = 2 * DW / VN;
  localparam int ND = RW / 4;
  localparam int NBODY = 512 / (DW / VN);

  logic eclk = 1'b0, clk = 1'b0, rst_n = 1'b0;
  always #1  eclk = ~eclk;
  always #10 clk  = ~clk;

  logic [NN-1:0][VN-1:0][RW-1:0] lin_d, lout_d;
  logic [NN-1:0][VN-1:0]         lin_eop, lin_ack, lout_eop, lout_ack;
  logic [NN-1:0][3:0][VN-1:0][RW+1:0] fault_sa0, fault_sa1;
  logic [NN-1:0][NPORT-1:0][VN-1:0]   err_conf;

  sdm_noc #(.NX(NX), .NY(NY), .DW(DW), .VN(VN)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [2*ND-1:0] hashv(input int src, input int k);
    logic [31:0] h;
    h = 32'(src) * 32'h9E3779B1 ^ 32'(k) * 32'h0001_9E37 ^ 32'h5A5A_1234;
    return h[2*ND-1:0] ^ h[31 -: 2*ND];
  endfunction

  function automatic logic [RW-1:0] enc(input logic [2*ND-1:0] v);
    logic [RW-1:0] r;
    r = '0;
    for (int k = 0; k < ND; k++) r[4*k + int'(v[2*k +: 2])] = 1'b1;
    return r;
  endfunction

  function automatic logic [2*ND-1:0] dec(input logic [RW-1:0] r);
    logic [2*ND-1:0] v;
    v = '0;
    for (int k = 0; k < ND; k++) v[2*k +: 2] = digit_value(r[4*k +: 4]);
    return v;
  endfunction

  function automatic bit complete(input logic [RW-1:0] w);
    for (int k = 0; k < ND; k++) if (w[4*k +: 4] == 4'b0) return 1'b0;
    return 1'b1;
  endfunction

  // ---------------- sources ----------------
  int q_dst [NN][VN][$];
  int sent_cnt = 0;

  task automatic send_word(input int n, input int v, input logic [RW-1:0] w, input logic e);
    lin_d[n][v]   = w;
    lin_eop[n][v] = e;
    while (!lin_ack[n][v]) @(posedge eclk);
    lin_d[n][v]   = '0;
    lin_eop[n][v] = 1'b0;
    while (lin_ack[n][v]) @(posedge eclk);
  endtask

  for (genvar gn = 0; gn < NN; gn++) begin : g_src
    for (genvar gv = 0; gv < VN; gv++) begin : g_v
      initial begin
        lin_d[gn][gv]   = '0;
        lin_eop[gn][gv] = 1'b0;
        @(posedge rst_n);
        forever begin
          if (q_dst[gn][gv].size() == 0) @(posedge eclk);
          else begin
            int dst;
            logic [2*ND-1:0] hv;
            dst = q_dst[gn][gv][0];
            hv  = '0;
            hv[1:0] = 2'(dst % NX);
            hv[3:2] = 2'(dst / NX);
            hv[7:4] = 4'(gn);
            send_word(gn, gv, enc(hv), 1'b0);
            for (int k = 0; k < NBODY; k++) send_word(gn, gv, enc(hashv(gn, k)), 1'b0);
            send_word(gn, gv, '0, 1'b1);
            void'(q_dst[gn][gv].pop_front());
            sent_cnt++;
          end
        end
      end
    end
  end

  // ---------------- sinks ----------------
  int intact = 0, damaged = 0;

  for (genvar gn = 0; gn < NN; gn++) begin : g_snk
    for (genvar gv = 0; gv < VN; gv++) begin : g_v
      initial begin
        int nflit, src;
        bit ok, in_pkt;
        logic [RW-1:0] w;
        logic e;
        lout_ack[gn][gv] = 1'b0;
        @(posedge rst_n);
        in_pkt = 0; nflit = 0; ok = 1; src = 0;
        forever begin
          @(posedge eclk);
          w = lout_d[gn][gv];
          e = lout_eop[gn][gv];
          if (e || complete(w)) begin
            if (e) begin
              if (in_pkt && ok && nflit == NBODY) intact++;
              else damaged++;
              in_pkt = 0;
            end else if (!in_pkt) begin
              logic [2*ND-1:0] hv;
              hv = dec(w);
              in_pkt = 1; nflit = 0;
              src = int'(hv[7:4]);
              ok  = (int'(hv[1:0]) == gn % NX) && (int'(hv[3:2]) == gn / NX);
            end else begin
              if (nflit >= NBODY || w != enc(hashv(src, nflit))) ok = 0;
              nflit++;
            end
            repeat ($urandom_range(0, 2)) @(posedge eclk);
            lout_ack[gn][gv] = 1'b1;
            while (lout_eop[gn][gv] || lout_d[gn][gv] != '0) @(posedge eclk);
            lout_ack[gn][gv] = 1'b0;
          end
        end
      end
    end
  end

  // all four circuits of one output port busy at the same time
  int n_all_busy = 0;
  for (genvar gn = 0; gn < NN; gn++) begin : g_mon
    for (genvar gp = 0; gp < 4; gp++) begin : g_p
      always @(posedge eclk)
        if (rst_n && &dut.g_node[gn].u_router.g_alloc[gp].u_sa.vc_busy) n_all_busy++;
    end
  end

  task automatic wait_drained(input int max_cycles);
    int c;
    c = 0;
    while (c < max_cycles) begin
      bit busy;
      busy = 0;
      for (int n = 0; n < NN; n++) for (int v = 0; v < VN; v++) if (q_dst[n][v].size() != 0) busy = 1;
      if (!busy) break;
      @(posedge eclk);
      c++;
    end
    repeat (1000) @(posedge eclk);
  endtask

  // router (1,2) = 9, East link to router (2,2) = 10, its West input circuit 2
  localparam int FN = 1 + 2 * NX;
  localparam int GN = 2 + 2 * NX;
  localparam int FV = 2;

  initial begin
    int s0, i0, c0;
    fault_sa0 = '0;
    fault_sa1 = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // ---- phase 1 ----
    for (int r = 0; r < 3; r++)
      for (int n = 0; n < NN; n++)
        for (int v = 0; v < VN; v++) begin
          int d;
          d = $urandom_range(0, NN - 1);
          if (d == n) d = (d + 5) % NN;
          q_dst[n][v].push_back(d);
        end
    wait_drained(150000);
    check(sent_cnt == 3 * NN * VN, "phase 1 all packets sent");
    check(intact == sent_cnt && damaged == 0, "phase 1 all packets intact");
    check(err_conf == '0, "no fault confirmed without a fault");
    check(n_all_busy > 0, "all four circuits of a link in use at once");
    $display("phase 1: sent %0d intact %0d damaged %0d at %0t", sent_cnt, intact, damaged, $time);

    // ---- phase 2: stuck-at-0 on circuit 2 of the East link of (1,2) ----
    s0 = sent_cnt; i0 = intact;
    for (int r = 0; r < 2; r++)
      for (int v = 0; v < VN; v++) begin
        q_dst[FN][v].push_back(3 + 2 * NX);
        q_dst[FN - 1][v].push_back(3 + 2 * NX);
      end
    c0 = 0;
    while (!dut.g_node[FN].u_router.g_alloc[PORT_E].u_sa.vc_busy[FV] && c0 < 50000) begin
      @(posedge eclk); c0++;
    end
    repeat (10) @(posedge eclk);
    fault_sa0[FN][PORT_E][FV][4*3 + 1] = 1'b1;
    $display("fault inserted at %0t", $time);
    c0 = 0;
    while (!err_conf[GN][PORT_W][FV] && c0 < 50000) begin
      @(posedge eclk); c0++;
    end
    check(err_conf[GN][PORT_W][FV], "fault confirmed at router (2,2) West circuit 2");
    if (!err_conf[GN][PORT_W][FV]) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    $display("fault confirmed at %0t", $time);
    for (int r = 0; r < 2; r++) q_dst[FN][FV].push_back(3 + 2 * NX);
    wait_drained(150000);
    $display("phase 2: sent %0d intact %0d", sent_cnt - s0, intact - i0);
    check(sent_cnt - s0 == 4 * VN + 2, "phase 2 all packets sent");
    check(intact - i0 >= sent_cnt - s0 - 1, "phase 2 at most one packet lost to the fault");
    check(!dut.g_node[FN].u_router.g_ch[int'(PORT_E)*VN + FV].u_ovc.vc_rdy,
          "faulty circuit blocked upstream");
    check($countones(err_conf) == 1 && err_conf[GN][PORT_W][FV], "only the faulty circuit confirmed");

    // ---- phase 3: fault removed ----
    fault_sa0 = '0;
    c0 = 0;
    while (err_conf[GN][PORT_W][FV] && c0 < 50000) begin
      @(posedge eclk); c0++;
    end
    check(!err_conf[GN][PORT_W][FV], "circuit resumed after the fault disappeared");
    repeat (200) @(posedge eclk);
    s0 = sent_cnt; i0 = intact;
    for (int v = 0; v < VN; v++) q_dst[FN][v].push_back(3 + 2 * NX);
    wait_drained(150000);
    check(sent_cnt - s0 == VN && intact - i0 == VN, "phase 3 all packets intact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
