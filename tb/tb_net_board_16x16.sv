// Testbench of one 16x16 two-stage network board used on its own (stages 1 and 2), with the IUs modelled by
// iu_ports_model. Phases:
//   1 single destination-addressed circuit: ACK after STAGES+1 clocks (3 for two stages),
//     then one 32-bit word per clock;
//   2 load information: with one IU reporting the lowest load, every idle source port
//     shows that load, and a load-distribution request reaches that IU;
//   3 all IUs open circuits at once to a random permutation (contention, waiting);
//   4 several simultaneous load-distribution requests reach distinct IUs;
//   5 multicast circuits, one splitting in the first and one in the last stage;
//   6 hot spot: eight sources to one destination, served one after another;
//   7 two-clock arbitration: the single circuit takes 2*STAGES+1 clocks.
// Each mechanism is counted and a failure is counted for one that never occurred.
module tb_net_board_16x16;
  import pie_net_pkg::*;
  localparam int N = 16;
  localparam int STAGES = 2;
  localparam int LEN = 8;

  logic clk = 0, rst = 1, armode = 0;
  logic [N-1:0] go = '0;
  logic [N-1:0][1:0] kind = '0;
  logic [N-1:0][7:0] dst = '0, dst2 = '0, load, lseen, reached;
  net_fwd_t [N-1:0] src_f, dst_f;
  net_rev_t [N-1:0] src_r, dst_r;
  logic [N-1:0] done;
  int lat [N];
  int errors, words_rx, n_rev;
  int checks = 0, failures = 0, cyc = 0;
  int m_addr = 0, m_lreq = 0, m_load = 0, m_wait = 0, m_mcast = 0, m_arm2 = 0, m_rate = 0;

  net_board_16x16 dut (.clk, .rst, .armode, .in_f(src_f), .in_r(src_r), .out_f(dst_f), .out_r(dst_r));
  iu_ports_model #(.N(N)) iu (.clk, .rst, .go, .kind, .dst, .dst2, .len(LEN), .load,
    .src_f, .src_r, .dst_f, .dst_r, .done, .lat, .lseen, .reached, .errors, .words_rx, .n_rev);

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

  task automatic start(logic [N-1:0] who);
    @(posedge clk); go <= who;
    @(posedge clk); go <= '0;
  endtask

  task automatic wait_done(logic [N-1:0] who);
    do @(posedge clk); while ((done & who) != who);
    @(posedge clk);
  endtask

  initial begin
    for (int n = 0; n < N; n++) load[n] = 8'(100 + n % 50);
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);

    // 1: one circuit, latency and word rate
    begin
      int w0, first, last;
      kind[5] = 0; dst[5] = 8'd12;
      w0 = words_rx; first = -1; last = -1;
      start(N'(1) << 5);
      fork
        wait_done(N'(1) << 5);
        forever @(posedge clk) if (words_rx != w0) begin
          if (first < 0) first = cyc;
          last = cyc; w0 = words_rx;
        end
      join_any
      disable fork;
      chk(lat[5] == STAGES + 1, $sformatf("connection time %0d clocks", lat[5]));
      chk(last - first + 1 == LEN && words_rx == LEN, "one word per clock");
      if (lat[5] == STAGES + 1) m_addr++;
      if (last - first + 1 == LEN) m_rate++;
    end

    // 2: load information and load distribution
    load[13] = 8'd7;
    repeat (2) @(posedge clk);
    begin
      bit all_ok = 1;
      for (int n = 0; n < N; n++) if (src_r[n].q[7:0] != 8'd7) all_ok = 0;
      chk(all_ok, "lowest load visible on every idle source port");
      if (all_ok) m_load++;
    end
    kind[9] = 1;
    start(N'(1) << 9);
    wait_done(N'(1) << 9);
    chk(lseen[9] == 8'd7 && reached[9] == 8'd13, $sformatf("LREQ reached IU %0d", reached[9]));
    if (reached[9] == 8'd13) m_lreq++;

    // 3: random permutation from all IUs at once
    begin
      int perm [N];
      int w0;
      for (int n = 0; n < N; n++) perm[n] = n;
      perm.shuffle();
      for (int n = 0; n < N; n++) begin kind[n] = 0; dst[n] = 8'(perm[n]); end
      w0 = words_rx;
      start('1);
      wait_done('1);
      chk(words_rx - w0 == N * LEN, $sformatf("permutation: %0d words delivered", words_rx - w0));
      for (int n = 0; n < N; n++) if (lat[n] > STAGES + 1) m_wait++;
    end

    // 4: simultaneous load distribution from four sources
    for (int n = 0; n < N; n++) load[n] = 8'(200 - n);  // lowest loads at IU 15, 14, ...
    begin
      logic [N-1:0] who;
      bit distinct = 1;
      who = '0;
      for (int s = 0; s < 4; s++) begin kind[s * 4] = 1; who[s * 4] = 1; end
      start(who);
      wait_done(who);
      for (int a = 0; a < 4; a++)
        for (int b = a + 1; b < 4; b++)
          if (reached[a * 4] == reached[b * 4]) distinct = 0;
      chk(distinct, "concurrent LREQs reach distinct IUs");
      for (int s = 0; s < 4; s++) chk(reached[s * 4] >= 8'd12, "LREQ went to a low-load IU");
      m_lreq += distinct;
    end

    // 5: multicast
    begin
      int w0;
      kind[3] = 2; dst[3] = 8'd8; dst2[3] = 8'd9;     // splits in the last stage
      kind[12] = 2; dst[12] = 8'd0; dst2[12] = 8'd15; // splits in the first stage
      w0 = words_rx;
      start((N'(1) << 3) | (N'(1) << 12));
      wait_done((N'(1) << 3) | (N'(1) << 12));
      chk(words_rx - w0 == 4 * LEN, $sformatf("multicast: %0d words delivered", words_rx - w0));
      if (words_rx - w0 == 4 * LEN) m_mcast++;
    end

    // 6: hot spot
    begin
      logic [N-1:0] who;
      int w0, maxlat;
      who = '0;
      for (int s = 0; s < 8; s++) begin kind[s * 2 + 1] = 0; dst[s * 2 + 1] = 8'd11; who[s * 2 + 1] = 1; end
      w0 = words_rx;
      start(who);
      wait_done(who);
      maxlat = 0;
      for (int s = 0; s < 8; s++) if (lat[s * 2 + 1] > maxlat) maxlat = lat[s * 2 + 1];
      chk(words_rx - w0 == 8 * LEN, "hot spot served");
      chk(maxlat > 7 * LEN, "hot spot requests waited for each other");
      if (maxlat > STAGES + 1) m_wait++;
    end

    // 7: two-clock arbitration
    armode <= 1;
    kind[5] = 0; dst[5] = 8'd12;
    start(N'(1) << 5);
    wait_done(N'(1) << 5);
    chk(lat[5] == 2 * STAGES + 1, $sformatf("two-clock connection time %0d", lat[5]));
    if (lat[5] == 2 * STAGES + 1) m_arm2++;

    chk(errors == 0, "no misdelivered word");
    $display("mechanisms: addressed=%0d load_dist=%0d load_info=%0d wait=%0d multicast=%0d reverse=%0d two_clock=%0d word_rate=%0d",
             m_addr, m_lreq, m_load, m_wait, m_mcast, n_rev, m_arm2, m_rate);
    chk(m_addr > 0, "addressed circuit happened");
    chk(m_lreq > 0, "load distribution happened");
    chk(m_load > 0, "load information happened");
    chk(m_wait > 0, "contention wait happened");
    chk(m_mcast > 0, "multicast happened");
    chk(n_rev > 0, "reverse transfer happened");
    chk(m_arm2 > 0, "two-clock arbitration happened");
    chk(m_rate > 0, "full word rate happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
