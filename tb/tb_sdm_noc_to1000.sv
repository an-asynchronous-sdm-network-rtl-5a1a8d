// tb_sdm_noc_to1000: the end-to-end mesh test of tb_sdm_noc (same traffic,
// fault, phases, mechanism counters and latency check) with the time-out of
// the fault experiment: 10 us of a 100 MHz detection clock, i.e.
// TIMEOUT_CYCLES = 1000, about fifteen times the default.  clk runs ten times
// slower than eclk, so a time-out period is 10000 eclk cycles.  The waits for
// confirmation and recovery are scaled to match.
//
module tb_sdm_noc_to1000;
  import sdm_pkg::*;

  localparam int NX = 4, NY = 4, DW = 64, VN = 2;
  localparam int NN = NX * NY;
  localparam int RW = 2 * DW / VN;
  localparam int ND = RW / 4;
  localparam int NC = NPORT * VN;
  localparam int NBODY = 16;

  logic eclk = 1'b0, clk = 1'b0, rst_n = 1'b0;
  always #1  eclk = ~eclk;
  always #10 clk  = ~clk;

  logic [NN-1:0][VN-1:0][RW-1:0] lin_d, lout_d;
  logic [NN-1:0][VN-1:0]         lin_eop, lin_ack, lout_eop, lout_ack;
  logic [NN-1:0][3:0][VN-1:0][RW+1:0] fault_sa0, fault_sa1;
  logic [NN-1:0][NPORT-1:0][VN-1:0]   err_conf;

  sdm_noc #(.TIMEOUT_CYCLES(1000)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [31:0] hashv(input int src, input int id, input int k);
    return 32'(src) * 32'h9E3779B1 ^ 32'(id) * 32'h0001_9E37 ^ 32'(k) * 32'h0000_0061 ^ 32'h5A5A_1234;
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

  // ---------------- sources ----------------
  // pending packets per source: {dst[7:0]}
  int          q_dst [NN][VN][$];
  int          sent_cnt = 0;
  int          seq_no [NN][VN];

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
        seq_no[gn][gv]  = 0;
        @(posedge rst_n);
        forever begin
          if (q_dst[gn][gv].size() == 0) @(posedge eclk);
          else begin
            int dst, id;
            logic [2*ND-1:0] hv;
            dst = q_dst[gn][gv][0];
            id  = seq_no[gn][gv] * VN + gv;
            hv  = '0;
            hv[1:0] = 2'(dst % NX);
            hv[3:2] = 2'(dst / NX);
            hv[11:4]  = 8'(gn);
            hv[27:12] = 16'(id);
            send_word(gn, gv, enc(hv), 1'b0);
            for (int k = 0; k < NBODY; k++) send_word(gn, gv, enc(hashv(gn, id, k)), 1'b0);
            send_word(gn, gv, '0, 1'b1);
            void'(q_dst[gn][gv].pop_front());
            seq_no[gn][gv]++;
            sent_cnt++;
          end
        end
      end
    end
  end

  // ---------------- sinks ----------------
  int intact = 0, damaged = 0;
  int rx_from [NN];

  for (genvar gn = 0; gn < NN; gn++) begin : g_snk
    for (genvar gv = 0; gv < VN; gv++) begin : g_v
      initial begin
        int nflit, src, id;
        bit ok, in_pkt;
        logic [RW-1:0] w;
        logic e;
        lout_ack[gn][gv] = 1'b0;
        @(posedge rst_n);
        in_pkt = 0; nflit = 0; ok = 1; src = 0; id = 0;
        forever begin
          @(posedge eclk);
          w = lout_d[gn][gv];
          e = lout_eop[gn][gv];
          if (e || (&{1'b1, w[3:0] != 0, w[7:4] != 0, complete_rest(w)})) begin
            if (e) begin
              if (in_pkt && ok && nflit == NBODY) begin
                intact++;
                rx_from[src]++;
              end else damaged++;
              in_pkt = 0;
            end else if (!in_pkt) begin
              logic [2*ND-1:0] hv;
              hv = dec(w);
              in_pkt = 1; nflit = 0;
              src = int'(hv[11:4]) % NN;
              id  = int'(hv[27:12]);
              ok  = (int'(hv[1:0]) == gn % NX) && (int'(hv[3:2]) == gn / NX);
            end else begin
              if (nflit >= NBODY || w != enc(hashv(src, id, nflit))) ok = 0;
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

  function automatic bit complete_rest(input logic [RW-1:0] w);
    for (int k = 0; k < ND; k++) if (w[4*k +: 4] == 4'b0) return 1'b0;
    return 1'b1;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_vc1_alloc = 0, n_contend = 0, n_enq_exit = 0, n_confirm = 0, n_drain = 0;
  int n_release = 0, n_resume = 0;

  for (genvar gn = 0; gn < NN; gn++) begin : g_mon
    for (genvar gp = 0; gp < 4; gp++) begin : g_p
      logic [VN-1:0] busy_q;
      always @(posedge eclk) begin
        busy_q <= dut.g_node[gn].u_router.g_alloc[gp].u_sa.vc_busy;
        if (rst_n) begin
          if (dut.g_node[gn].u_router.g_alloc[gp].u_sa.vc_busy[1] && !busy_q[1]) n_vc1_alloc++;
          if (dut.g_node[gn].u_router.g_alloc[gp].u_sa.pending != '0 &&
              dut.g_node[gn].u_router.g_alloc[gp].u_sa.freevc == '0) n_contend++;
        end
      end
    end
    for (genvar gc = 0; gc < NC; gc++) begin : g_c
      logic ec_q, eop_err_q, sink_q;
      always @(posedge clk)
        if (rst_n && dut.g_node[gn].u_router.g_ch[gc].u_fd.st_q == FD_ENQUIRY &&
            dut.g_node[gn].u_router.g_ch[gc].u_fd.ackseqo) n_enq_exit++;
      always @(posedge eclk) begin
        ec_q      <= dut.g_node[gn].u_router.in_err_conf[gc];
        eop_err_q <= dut.g_node[gn].u_router.g_ch[gc].u_ivc.eop_err;
        sink_q    <= dut.g_node[gn].u_router.g_ch[gc].u_ovc.u_sink.ack;
        // count only after reset: the state registers start from random values
        if (rst_n) begin
          if (dut.g_node[gn].u_router.in_err_conf[gc] && !ec_q) begin
            n_confirm++;
            $display("confirm router %0d channel %0d at %0t", gn, gc, $time);
          end
          if (!dut.g_node[gn].u_router.in_err_conf[gc] && ec_q) n_resume++;
          if (dut.g_node[gn].u_router.g_ch[gc].u_ivc.eop_err && !eop_err_q) n_release++;
          if (dut.g_node[gn].u_router.out_err_conf[gc] &&
              dut.g_node[gn].u_router.g_ch[gc].u_ovc.u_sink.ack && !sink_q) n_drain++;
        end
      end
    end
  end

  // deadlock onset on the faulty circuit: the last change of any ack the
  // detectors watch (downstream rt_ack, ipdia, ipdoa; upstream link ack)
  localparam int TO_T = 1000 * 20;  // one time-out period in time units
  time last_move_t = 0;
  logic [3:0] mon_q;
  wire  [3:0] mon = {dut.g_node[2 + 2 * NX].u_router.g_ch[int'(PORT_W)*VN].u_fd.rt_ack,
                     dut.g_node[2 + 2 * NX].u_router.g_ch[int'(PORT_W)*VN].u_fd.ipdia,
                     dut.g_node[2 + 2 * NX].u_router.g_ch[int'(PORT_W)*VN].u_fd.ipdoa,
                     dut.g_node[1 + 2 * NX].u_router.g_ch[int'(PORT_E)*VN].u_ovc.oa};
  always @(posedge eclk) begin
    mon_q <= mon;
    if (mon != mon_q && !err_conf[2 + 2 * NX][PORT_W][0]) last_move_t = $time;
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
    repeat (400) @(posedge eclk);
  endtask

  // router (1,2) = 9, East link to router (2,2) = 10, its West input circuit 0
  localparam int FN = 1 + 2 * NX;
  localparam int GN = 2 + 2 * NX;

  initial begin
    int s0, i0, c0, d0;
    fault_sa0 = '0;
    fault_sa1 = '0;
    for (int n = 0; n < NN; n++) rx_from[n] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // ---- phase 1: uniform random traffic ----
    for (int r = 0; r < 3; r++)
      for (int n = 0; n < NN; n++)
        for (int v = 0; v < VN; v++) begin
          int d;
          d = $urandom_range(0, NN - 1);
          if (d == n) d = (d + 5) % NN;
          q_dst[n][v].push_back(d);
        end
    wait_drained(60000);
    repeat (2000) @(posedge eclk);
    check(sent_cnt == 3 * NN * VN, "phase 1 all packets sent");
    check(intact == sent_cnt && damaged == 0, "phase 1 all packets intact");
    $display("phase 1: sent %0d intact %0d damaged %0d at %0t", sent_cnt, intact, damaged, $time);
    check(err_conf == '0, "no fault confirmed without a fault");

    // ---- phase 2: stuck-at-1 on East link of (1,2), circuit 0 ----
    s0 = sent_cnt; i0 = intact; d0 = damaged;
    for (int r = 0; r < 4; r++) begin
      q_dst[FN][0].push_back(3 + 2 * NX);
      q_dst[FN][1].push_back(3 + 2 * NX);
      q_dst[FN - 1][0].push_back(3 + 2 * NX);
    end
    // wait until the East output of router 9 is carrying a packet on circuit 0
    c0 = 0;
    while (!dut.g_node[FN].u_router.g_alloc[PORT_E].u_sa.vc_busy[0] && c0 < 30000) begin
      @(posedge eclk); c0++;
    end
    repeat (20) @(posedge eclk);
    fault_sa1[FN][PORT_E][0][5] = 1'b1;
    $display("fault inserted at %0t", $time);
    c0 = 0;
    while (!err_conf[GN][PORT_W][0] && c0 < 80000) begin
      @(posedge eclk); c0++;
    end
    check(err_conf[GN][PORT_W][0], "fault confirmed at router (2,2) West circuit 0");
    if (!err_conf[GN][PORT_W][0]) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    $display("deadlock at %0t, confirmed at %0t: %0d.%0d time-out periods", last_move_t, $time,
             ($time - last_move_t) / TO_T, (($time - last_move_t) % TO_T) * 10 / TO_T);
    check($time - last_move_t >= 2 * TO_T && $time - last_move_t <= 4 * TO_T + 20,
          "detection two to four time-out periods after the deadlock");
    check(!dut.g_node[FN].u_router.g_ch[int'(PORT_E)*VN].u_ovc.vc_rdy, "faulty circuit blocked upstream");
    // more traffic over the same link after the fault is confirmed
    for (int r = 0; r < 4; r++) begin
      q_dst[FN][0].push_back(3 + 2 * NX);
      q_dst[FN - 1][1].push_back(2 + 2 * NX);
    end
    wait_drained(60000);
    repeat (3000) @(posedge eclk);
    $display("phase 2: sent %0d intact %0d damaged %0d", sent_cnt - s0, intact - i0, damaged - d0);
    check(sent_cnt - s0 == 20, "phase 2 all packets sent (Drain unblocked the sources)");
    check(intact - i0 >= sent_cnt - s0 - 1, "phase 2 at most one packet lost to the fault");
    check(err_conf[GN][PORT_W][0], "fault stays confirmed while it lasts");

    // ---- phase 3: fault removed ----
    fault_sa1 = '0;
    c0 = 0;
    while (err_conf[GN][PORT_W][0] && c0 < 80000) begin
      @(posedge eclk); c0++;
    end
    check(!err_conf[GN][PORT_W][0], "blocked circuit resumed after the fault disappeared");
    repeat (200) @(posedge eclk);
    check(dut.g_node[FN].u_router.g_ch[int'(PORT_E)*VN].u_ovc.vc_rdy, "circuit ready again");
    s0 = sent_cnt; i0 = intact;
    for (int r = 0; r < 3; r++) begin
      q_dst[FN][0].push_back(3 + 2 * NX);
      q_dst[FN][1].push_back(3 + 2 * NX);
    end
    wait_drained(60000);
    repeat (2000) @(posedge eclk);
    check(intact - i0 == sent_cnt - s0 && sent_cnt - s0 == 6, "phase 3 all packets intact");

    $display("mechanisms: vc1_alloc=%0d contention=%0d enquiry_exit=%0d confirm=%0d drain=%0d release=%0d resume=%0d",
             n_vc1_alloc, n_contend, n_enq_exit, n_confirm, n_drain, n_release, n_resume);
    check(n_vc1_alloc > 0, "second circuit of a link allocated");
    check(n_contend > 0, "allocation contention");
    check(n_enq_exit > 0, "Enquiry left early on AckSeqo");
    check(n_confirm == 1, "exactly one confirmation");
    check(n_drain > 0, "Drain sink took flits");
    check(n_release > 0, "Release generated a fake tail");
    check(n_resume > 0, "circuit resumed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
