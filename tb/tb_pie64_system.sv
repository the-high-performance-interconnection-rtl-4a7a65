// End-to-end testbench of pie64_system at its default size: both 64x64 networks (PAN and
// DAAN) with all 64 IUs on each, modelled by iu_ports_model, and the 64 local memories,
// each driven by random traffic from its four processor ports (lmem_traffic_model) for the
// whole run. Memory reads are checked against reference memories, and bank-conflict and
// bus-limit stalls are counted. The same network sequence runs on both networks at once:
//   1 single destination-addressed circuit: ACK after 4 clocks, then one 32-bit word per
//     clock (40 MB/s per port at a 10 MHz clock);
//   2 load information: the lowest load (reported by one IU) reaches every idle source
//     port, and a load-distribution request reaches that IU, read back by a reverse
//     transfer;
//   3 all 64 IUs open circuits at once to a random permutation (contention, waiting);
//   4 four simultaneous load-distribution requests reach distinct low-load IUs;
//   5 multicast circuits, split in the first and in the last stage;
//   6 hot spot: eight sources to one destination;
//   7 two-clock arbitration on both networks: 7 clocks for a circuit.
// Each mechanism is counted per network and a failure is counted for one that never
// occurred.
module tb_pie64_system;
  import pie_net_pkg::*;
  localparam int N = 64;
  localparam int STAGES = 3;
  localparam int LEN = 8;

  logic clk = 0, rst = 1, armode = 0;
  logic [1:0][N-1:0] go = '0;
  logic [1:0][N-1:0][1:0] kind = '0;
  logic [1:0][N-1:0][7:0] dst = '0, dst2 = '0, load, lseen, reached;
  net_fwd_t [1:0][N-1:0] src_f, dst_f;
  net_rev_t [1:0][N-1:0] src_r, dst_r;
  logic [1:0][N-1:0] done;
  int lat [2][N];
  int errors [2], words_rx [2], n_rev [2];
  int checks = 0, failures = 0, cyc = 0;
  int m_addr [2] = '{0, 0}, m_lreq [2] = '{0, 0}, m_load [2] = '{0, 0}, m_wait [2] = '{0, 0};
  int m_mcast [2] = '{0, 0}, m_arm2 = 0, m_rate [2] = '{0, 0};

  localparam int unsigned LM_AW = 10;
  logic [N-1:0][3:0] lm_req, lm_we, lm_gnt, lm_rvalid;
  logic [N-1:0][3:0][LM_AW-1:0] lm_addr;
  logic [N-1:0][3:0][31:0] lm_wdata, lm_rdata;
  logic lm_enable = 0;
  int lm_checks [N], lm_failures [N], lm_reads [N], lm_bank_stall [N], lm_bus_stall [N];

  pie64_system dut (.clk, .rst, .armode,
    .pan_src_f(src_f[0]), .pan_src_r(src_r[0]), .pan_dst_f(dst_f[0]), .pan_dst_r(dst_r[0]),
    .daan_src_f(src_f[1]), .daan_src_r(src_r[1]), .daan_dst_f(dst_f[1]), .daan_dst_r(dst_r[1]),
    .lm_req, .lm_we, .lm_addr, .lm_wdata, .lm_gnt, .lm_rvalid, .lm_rdata);

  for (genvar n = 0; n < N; n++) begin : g_lm
    lmem_traffic_model #(.AW(LM_AW), .DW(32)) tm (.clk, .rst, .enable(lm_enable),
      .req(lm_req[n]), .we(lm_we[n]), .addr(lm_addr[n]), .wdata(lm_wdata[n]),
      .gnt(lm_gnt[n]), .rvalid(lm_rvalid[n]), .rdata(lm_rdata[n]),
      .checks(lm_checks[n]), .failures(lm_failures[n]), .n_reads(lm_reads[n]),
      .n_bank_stall(lm_bank_stall[n]), .n_bus_stall(lm_bus_stall[n]));
  end

  for (genvar k = 0; k < 2; k++) begin : g_iu
    iu_ports_model #(.N(N)) iu (.clk, .rst, .go(go[k]), .kind(kind[k]), .dst(dst[k]),
      .dst2(dst2[k]), .len(LEN), .load(load[k]), .src_f(src_f[k]), .src_r(src_r[k]),
      .dst_f(dst_f[k]), .dst_r(dst_r[k]), .done(done[k]), .lat(lat[k]), .lseen(lseen[k]),
      .reached(reached[k]), .errors(errors[k]), .words_rx(words_rx[k]), .n_rev(n_rev[k]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic start(int k, logic [N-1:0] who);
    @(posedge clk); go[k] <= who;
    @(posedge clk); go[k] <= '0;
  endtask

  task automatic wait_done(int k, logic [N-1:0] who);
    do @(posedge clk); while ((done[k] & who) != who);
    @(posedge clk);
  endtask

  task automatic run_phases(int k);
      // 1: one circuit, latency and word rate
      begin
        int w0, first, last;
        kind[k][5] = 0; dst[k][5] = 8'd42;
        w0 = words_rx[k]; first = -1; last = -1;
        start(k, N'(1) << 5);
        fork
          wait_done(k, N'(1) << 5);
          forever @(posedge clk) if (words_rx[k] != w0) begin
            if (first < 0) first = cyc;
            last = cyc; w0 = words_rx[k];
          end
        join_any
        disable fork;
        chk(lat[k][5] == STAGES + 1, $sformatf("net %0d connection time %0d clocks", k, lat[k][5]));
        chk(last - first + 1 == LEN && words_rx[k] == LEN, "one word per clock");
        if (lat[k][5] == STAGES + 1) m_addr[k]++;
        if (last - first + 1 == LEN) m_rate[k]++;
      end

      // 2: load[k] information and load[k] distribution
      load[k][37] = 8'd7;
      repeat (2) @(posedge clk);
      begin
        bit all_ok = 1;
        for (int n = 0; n < N; n++) if (src_r[k][n].q[7:0] != 8'd7) all_ok = 0;
        chk(all_ok, "lowest load[k] visible on every idle source port");
        if (all_ok) m_load[k]++;
      end
      kind[k][9] = 1;
      start(k, N'(1) << 9);
      wait_done(k, N'(1) << 9);
      chk(lseen[k][9] == 8'd7 && reached[k][9] == 8'd37, $sformatf("LREQ reached[k] IU %0d", reached[k][9]));
      if (reached[k][9] == 8'd37) m_lreq[k]++;

      // 3: random permutation from all IUs at once
      begin
        int perm [N];
        int w0;
        for (int n = 0; n < N; n++) perm[n] = n;
        perm.shuffle();
        for (int n = 0; n < N; n++) begin kind[k][n] = 0; dst[k][n] = 8'(perm[n]); end
        w0 = words_rx[k];
        start(k, '1);
        wait_done(k, '1);
        chk(words_rx[k] - w0 == N * LEN, $sformatf("permutation: %0d words delivered", words_rx[k] - w0));
        for (int n = 0; n < N; n++) if (lat[k][n] > STAGES + 1) m_wait[k]++;
      end

      // 4: simultaneous load[k] distribution from four sources
      for (int n = 0; n < N; n++) load[k][n] = 8'(200 - n);  // lowest loads at IU 63, 62, ...
      begin
        logic [N-1:0] who;
        bit distinct = 1;
        who = '0;
        for (int s = 0; s < 4; s++) begin kind[k][s * 16] = 1; who[s * 16] = 1; end
        start(k, who);
        wait_done(k, who);
        for (int a = 0; a < 4; a++)
          for (int b = a + 1; b < 4; b++)
            if (reached[k][a * 16] == reached[k][b * 16]) distinct = 0;
        chk(distinct, "concurrent LREQs reach distinct IUs");
        for (int s = 0; s < 4; s++) chk(reached[k][s * 16] >= 8'd48, "LREQ went to a low-load[k] IU");
        m_lreq[k] += distinct;
      end

      // 5: multicast
      begin
        int w0;
        kind[k][3] = 2; dst[k][3] = 8'd20; dst2[k][3] = 8'd21;   // splits in the last stage
        kind[k][60] = 2; dst[k][60] = 8'd0; dst2[k][60] = 8'd63; // splits in the first stage
        w0 = words_rx[k];
        start(k, (N'(1) << 3) | (N'(1) << 60));
        wait_done(k, (N'(1) << 3) | (N'(1) << 60));
        chk(words_rx[k] - w0 == 4 * LEN, $sformatf("multicast: %0d words delivered", words_rx[k] - w0));
        if (words_rx[k] - w0 == 4 * LEN) m_mcast[k]++;
      end

      // 6: hot spot
      begin
        logic [N-1:0] who;
        int w0, maxlat;
        who = '0;
        for (int s = 0; s < 8; s++) begin kind[k][s * 8 + 1] = 0; dst[k][s * 8 + 1] = 8'd11; who[s * 8 + 1] = 1; end
        w0 = words_rx[k];
        start(k, who);
        wait_done(k, who);
        maxlat = 0;
        for (int s = 0; s < 8; s++) if (lat[k][s * 8 + 1] > maxlat) maxlat = lat[k][s * 8 + 1];
        chk(words_rx[k] - w0 == 8 * LEN, "hot spot served");
        chk(maxlat > 7 * LEN, "hot spot requests waited for each other");
        if (maxlat > STAGES + 1) m_wait[k]++;
      end

  endtask

  initial begin
    for (int k = 0; k < 2; k++)
      for (int n = 0; n < N; n++) load[k][n] = 8'(100 + (n * (k + 1)) % 50);
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    lm_enable = 1;
    fork
      run_phases(0);
      run_phases(1);
    join

    // 7: two-clock arbitration on both networks
    armode <= 1;
    for (int k = 0; k < 2; k++) begin kind[k][5] = 0; dst[k][5] = 8'd42; end
    fork
      begin start(0, N'(1) << 5); wait_done(0, N'(1) << 5); end
      begin start(1, N'(1) << 5); wait_done(1, N'(1) << 5); end
    join
    for (int k = 0; k < 2; k++) begin
      chk(lat[k][5] == 2 * STAGES + 1, $sformatf("net %0d two-clock connection time %0d", k, lat[k][5]));
      if (lat[k][5] == 2 * STAGES + 1) m_arm2++;
    end

    for (int k = 0; k < 2; k++) begin
      chk(errors[k] == 0, "no misdelivered word");
      $display("%s mechanisms: addressed=%0d load_dist=%0d load_info=%0d wait=%0d multicast=%0d reverse=%0d word_rate=%0d",
               k == 0 ? "PAN " : "DAAN", m_addr[k], m_lreq[k], m_load[k], m_wait[k], m_mcast[k], n_rev[k], m_rate[k]);
      chk(m_addr[k] > 0, "addressed circuit happened");
      chk(m_lreq[k] > 0, "load distribution happened");
      chk(m_load[k] > 0, "load information happened");
      chk(m_wait[k] > 0, "contention wait happened");
      chk(m_mcast[k] > 0, "multicast happened");
      chk(n_rev[k] > 0, "reverse transfer happened");
      chk(m_rate[k] > 0, "full word rate happened");
    end
    lm_enable = 0;
    repeat (5) @(posedge clk);
    begin
      int c, f, r, bk, bu;
      c = 0; f = 0; r = 0; bk = 0; bu = 0;
      for (int n = 0; n < N; n++) begin
        c += lm_checks[n]; f += lm_failures[n]; r += lm_reads[n];
        bk += lm_bank_stall[n]; bu += lm_bus_stall[n];
      end
      checks += c; failures += f;
      $display("LMEM: reads=%0d bank stalls=%0d bus stalls=%0d failures=%0d", r, bk, bu, f);
      chk(r > 0, "memory reads happened");
      chk(bk > 0, "bank conflicts happened");
      chk(bu > 0, "bus-limit stalls happened");
    end
    $display("two-clock arbitration: %0d", m_arm2);
    chk(m_arm2 == 2, "two-clock arbitration happened on both networks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
