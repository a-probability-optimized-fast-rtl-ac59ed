// tb_toptrig_top: end-to-end test of the stave trigger at its default size.
//
// Eight link drivers play framed events (header, time-ordered hits,
// trailer) on the Aurora RX user streams at 75 MHz (2.4 Gbit/s of 32-bit
// words); the sorter runs at 75 MHz, the trigger at 150 MHz, the TX link at
// 75 MHz. Each event is built from a true candidate: photon times cluster
// around that candidate's peak bin, plus background hits, some of them more
// than 64 ns after the first hit. The hits are spread over the links at
// random. A model here merges the hits, takes the earliest as t_ref, scores
// all 200 candidates and picks the best, and the three TX words of every
// result are compared with it.
//
// Mechanisms made to happen and counted (a failure if one never does):
// merging of hits from several links, hits outside the 64 ns window,
// events without hits, a link lost in the middle of an event (closed by
// the decoder), stray link words counted as errors, an input FIFO overflow
// (one link's burst while another link lags; that event is only checked for
// its number), TX back-pressure, the trigger held by a full output FIFO
// (TX channel down), and a rewrite of PDF tables through the load port.
// The link loop-back tester beside the trigger runs during the whole test
// over a modelled 0.6 us loop and must check every word it sent without error.
// Also measured: sorter-to-trigger rate during a large event (at least
// 0.9 x 75 M time words/s) and, for single events of about 25 hits with
// the TX link free, the delay from the event's last trailer to its first TX word
// (at most 0.8 us).
`timescale 1ns/1ps
module tb_toptrig_top;
  import toptrig_pkg::*;

  logic clk_rx = 0, clk_sort = 0, clk_trig = 0, clk_tx = 0;
  logic rst = 1;
  always #6.667 clk_rx   = ~clk_rx;
  always #6.667 clk_sort = ~clk_sort;
  always #3.333 clk_trig = ~clk_trig;
  always #6.5   clk_tx   = ~clk_tx;

  logic [N_LINKS-1:0] rx_channel_up, rx_src_rdy_n;
  logic [31:0]        rx_d [N_LINKS];
  logic               lut_we = 0;
  logic [CAND_W-1:0]  lut_cand = 0;
  logic [5:0]         lut_bin = 0;
  logic [LUT_W-1:0]   lut_wdata = 0;
  logic               tx_channel_up, tx_dst_rdy_n;
  logic [31:0]        tx_d, tx_sent_cnt;
  logic               tx_src_rdy_n;
  logic [31:0]        rx_word_cnt [N_LINKS];
  logic [15:0]        rx_err_cnt [N_LINKS], rx_ovf_cnt [N_LINKS];

  toptrig_top dut (
    .clk_rx, .rst_rx(rst), .rx_channel_up, .rx_d, .rx_src_rdy_n,
    .clk_sort, .rst_sort(rst), .clk_trig, .rst_trig(rst),
    .lut_we, .lut_cand, .lut_bin, .lut_wdata,
    .clk_tx, .rst_tx(rst), .tx_channel_up, .tx_d, .tx_src_rdy_n, .tx_dst_rdy_n,
    .rx_word_cnt, .rx_err_cnt, .rx_ovf_cnt, .tx_sent_cnt,
    .lt_enable, .lt_tx_channel_up(1'b1), .lt_tx_d, .lt_tx_src_rdy_n,
    .lt_tx_dst_rdy_n(1'b0), .lt_sent_cnt, .lt_rx_channel_up(1'b1), .lt_rx_d,
    .lt_rx_src_rdy_n, .lt_checked_cnt, .lt_err_cnt, .lt_err_seen
  );

  // link tester: TX looped back to RX through a 45-word delay (0.6 us)
  logic        lt_enable = 0, lt_tx_src_rdy_n, lt_rx_src_rdy_n, lt_err_seen;
  logic [31:0] lt_tx_d, lt_rx_d, lt_sent_cnt, lt_checked_cnt, lt_err_cnt;
  logic [32:0] lt_line [$];
  always @(posedge clk_tx) lt_line.push_back({!lt_tx_src_rdy_n, lt_tx_d});
  always @(posedge clk_rx) begin
    logic [32:0] x;
    x = (lt_line.size() > 45) ? lt_line.pop_front() : 33'd0;
    lt_rx_src_rdy_n <= !x[32];
    lt_rx_d         <= x[31:0];
  end

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #3ms;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- PDF tables as the model sees them --------------------------------------
  function automatic int dflt(int c, int b);
    int pk = (c * 5) % 64, d, hw = 8 + 4 * (c / 64);
    d = b > pk ? b - pk : pk - b;
    return d < hw ? ((hw - d) * 65536) / hw + c : c % 16;
  endfunction
  int tab [200][64];
  initial for (int c = 0; c < 200; c++) for (int b = 0; b < 64; b++) tab[c][b] = dflt(c, b);

  // ---- link drivers --------------------------------------------------------------
  // item: {cmd, word}; cmd 0 = send word, 1 = idle cycle, 2 = channel down cycle
  logic [33:0] lq [N_LINKS][$];
  realtime last_trailer_t [int];    // event -> time its last trailer was sent
  for (genvar i = 0; i < N_LINKS; i++) begin : g_drv
    always @(posedge clk_rx) begin
      if (rst || lq[i].size() == 0) begin
        rx_src_rdy_n[i]  <= 1'b1;
        rx_channel_up[i] <= 1'b1;
        rx_d[i]          <= '0;
      end else begin
        logic [33:0] it;
        it = lq[i].pop_front();
        rx_channel_up[i] <= it[33:32] != 2'd2;
        rx_src_rdy_n[i]  <= it[33:32] != 2'd0;
        rx_d[i]          <= it[31:0];
        if (it[33:32] == 2'd0 && it[31:30] == 2'b11)
          last_trailer_t[int'(it[15:0])] = $realtime;
      end
    end
  end

  function automatic logic [33:0] lw(link_type_e k, int ch, int t);
    return {2'd0, k, CHAN_W'(ch), 5'd0, TIME_W'(t)};
  endfunction

  // ---- expected results ----------------------------------------------------------
  typedef struct { int evt; int nhits; int t_ref; int cand; longint score; bit only_evt; } exp_t;
  exp_t expq [$];

  function automatic exp_t model(int evt, int times[$]);
    exp_t e;
    longint best = -1;
    times.sort();
    e.evt = evt; e.only_evt = 0; e.nhits = 0;
    e.t_ref = times.size() ? times[0] : 0;
    e.cand = 0; e.score = 0;
    foreach (times[i]) if (times[i] - times[0] < 64) e.nhits++;
    if (e.nhits > 255) e.nhits = 255;
    if (times.size())
      for (int c = 0; c < 200; c++) begin
        longint s = 0;
        foreach (times[i]) if (times[i] - times[0] < 64) s += tab[c][times[i] - times[0]];
        if (s > 64'hFFF_FFFF) s = 64'hFFF_FFFF;
        if (s > best) begin best = s; e.cand = c; end
      end
    e.score = times.size() ? best : 0;
    return e;
  endfunction

  // counters of mechanisms
  int n_multi_link = 0, n_out_window = 0, n_empty = 0, n_link_lost = 0;
  int n_stray = 0, n_txbp = 0, n_outfull = 0, n_lut_rewrite = 0, n_ovf_evt = 0;

  // Build one event; mode: 0 normal, 1 link 3 lost mid-event, 2 stray words,
  // 3 overflow burst on link 0
  task automatic make_event(int evt, int ncl, int nbg, int mode);
    automatic int ctrue = $urandom % 200;
    automatic int t0 = 1000 + $urandom % 60000;
    automatic int pk = (ctrue * 5) % 64;
    automatic int times [N_LINKS][$];
    automatic int all [$];
    automatic int used_links = 0;
    automatic bit outw = 0;
    for (int h = 0; h < ncl; h++) begin
      automatic int t = t0 + pk + int'($urandom % 5) - 2;
      if (t < t0) t = t0;
      times[$urandom % N_LINKS].push_back(t);
    end
    for (int h = 0; h < nbg; h++) times[$urandom % N_LINKS].push_back(t0 + $urandom % 120);
    if (ncl + nbg > 0) times[$urandom % N_LINKS].push_back(t0);  // the earliest photon
    if (mode == 3) for (int h = 0; h < 700; h++) times[0].push_back(t0 + 10 + h % 40);
    for (int i = 0; i < N_LINKS; i++) begin
      times[i].sort();
      if (times[i].size()) used_links++;
      lq[i].push_back(lw(LW_HEADER, 0, evt));
      if (mode == 3 && i == 7) repeat (900) lq[i].push_back({2'd1, 32'd0});
      foreach (times[i][h]) begin
        if (mode == 1 && i == 3 && h == times[i].size() / 2) break;
        lq[i].push_back(lw(LW_HIT, i * 64 + h, times[i][h]));
        all.push_back(times[i][h]);
        if ($urandom % 4 == 0) lq[i].push_back({2'd1, 32'd0});
      end
      if (mode == 1 && i == 3) begin
        repeat (3) lq[i].push_back({2'd2, 32'd0});
      end else begin
        lq[i].push_back(lw(LW_TRAILER, 0, evt));
      end
      if (mode == 2 && i == 5) begin
        lq[i].push_back(lw(LW_HIT, 1, 5));        // stray hit between events
        lq[i].push_back(lw(LW_TRAILER, 0, 999));  // stray trailer
      end
      repeat ($urandom % 4) lq[i].push_back({2'd1, 32'd0});
    end
    begin
      automatic exp_t e = model(evt, all);
      automatic int mn = all.size() ? all.min()[0] : 0;
      foreach (all[k]) if (all[k] - mn >= 64) outw = 1;
      if (mode == 3) begin e.only_evt = 1; n_ovf_evt++; end
      expq.push_back(e);
    end
    if (used_links >= 2) n_multi_link++;
    if (outw) n_out_window++;
    if (all.size() == 0) n_empty++;
    if (mode == 1) n_link_lost++;
    if (mode == 2) n_stray++;
  endtask

  // ---- TX receiver -----------------------------------------------------------------
  logic [31:0] txw [$];
  int n_res = 0;
  int max_lat_ns = 0;
  bit measure_lat = 0;   // only where TX neither stalls nor is down
  always @(posedge clk_tx) begin
    if (!rst && !tx_src_rdy_n && tx_dst_rdy_n) n_txbp++;
    if (!rst && !tx_src_rdy_n && !tx_dst_rdy_n) begin
      txw.push_back(tx_d);
      if (measure_lat && txw.size() == 1 && last_trailer_t.exists(int'(tx_d[15:0]))) begin
        automatic int lat = int'($realtime - last_trailer_t[int'(tx_d[15:0])]);
        if (lat > max_lat_ns) max_lat_ns = lat;
      end
      if (txw.size() == 3) begin
        chk(expq.size() > 0, "result without event");
        if (expq.size() > 0) begin
          automatic exp_t e = expq.pop_front();
          chk(txw[0][31:30] == 2'b10 && txw[1][31:30] == 2'b01 && txw[2][31:30] == 2'b11, "TX word tags");
          chk(int'(txw[0][15:0]) == e.evt, $sformatf("event number %0d vs %0d", txw[0][15:0], e.evt));
          if (!e.only_evt) begin
            chk(int'(txw[0][23:16]) == e.nhits, $sformatf("evt %0d nhits %0d vs %0d", e.evt, txw[0][23:16], e.nhits));
            chk(int'(txw[1][15:0]) == e.t_ref, $sformatf("evt %0d t_ref %0d vs %0d", e.evt, txw[1][15:0], e.t_ref));
            chk(int'(txw[1][23:16]) == e.cand, $sformatf("evt %0d cand %0d vs %0d", e.evt, txw[1][23:16], e.cand));
            chk(longint'(txw[2][27:0]) == e.score, $sformatf("evt %0d score %0d vs %0d", e.evt, txw[2][27:0], e.score));
          end
        end
        txw.delete();
        n_res++;
      end
    end
  end
  always @(posedge clk_trig) if (!rst && dut.r_full) n_outfull++;

  // rate of the sorted stream into the trigger
  int n_tw = 0;
  always @(posedge clk_trig) if (!rst && dut.t_valid && dut.t_ready && !dut.u_trig.in_data.eoe) n_tw++;

  task automatic wait_results(int n, int max_us);
    automatic realtime t_end = $realtime + max_us * 1000.0;
    while (n_res < n && $realtime < t_end) @(posedge clk_tx);
  endtask

  initial begin
    automatic int evt = 0;
    tx_channel_up = 1; tx_dst_rdy_n = 0;
    repeat (5) @(posedge clk_rx);
    rst = 0;
    repeat (5) @(posedge clk_rx);

    lt_enable = 1;   // link loop-back test runs alongside

    // 1) normal events, power-up tables, random TX back-pressure
    fork
      begin
        for (int k = 0; k < 30; k++) begin
          make_event(evt, 10 + $urandom % 30, $urandom % 10, (k == 7) ? 1 : (k == 11) ? 2 : 0);
          evt++;
          if (k % 9 == 4) begin make_event(evt, 0, 0, 0); evt++; end
        end
      end
      begin
        repeat (3000) @(negedge clk_tx) tx_dst_rdy_n = ($urandom % 3) == 0;
        tx_dst_rdy_n = 0;
      end
    join
    wait_results(evt, 200);
    chk(n_res == evt, $sformatf("phase 1: %0d of %0d results", n_res, evt));
    chk(rx_err_cnt[3] == 1, $sformatf("link 3 loss counted: %0d", rx_err_cnt[3]));
    chk(rx_err_cnt[5] == 2, $sformatf("stray words on link 5 counted: %0d", rx_err_cnt[5]));

    // 2) rewrite part of the tables: candidate 77 gets a large weight in every bin
    @(negedge clk_trig);
    for (int b = 0; b < 64; b++) begin
      lut_we = 1; lut_cand = 8'd77; lut_bin = 6'(b); lut_wdata = 20'hFFFF0 + 20'(b % 16);
      tab[77][b] = 'hFFFF0 + b % 16;
      @(negedge clk_trig);
    end
    lut_we = 0;
    n_lut_rewrite++;
    measure_lat = 1;
    for (int k = 0; k < 5; k++) begin
      make_event(evt, 20, 5, 0); evt++;
      wait_results(evt, 100);      // one event at a time: no queueing delay
    end
    measure_lat = 0;
    chk(n_res == evt, $sformatf("phase 2: %0d of %0d results", n_res, evt));

    // 3) TX channel down: results pile up, the output FIFO fills
    tx_channel_up = 0;
    for (int k = 0; k < 40; k++) begin make_event(evt, 3, 0, 0); evt++; end
    #60us;
    tx_channel_up = 1;
    wait_results(evt, 200);
    chk(n_res == evt, $sformatf("phase 3: %0d of %0d results", n_res, evt));

    // 4) rate: one large event on all links
    begin
      automatic int tw0 = n_tw;
      automatic realtime t0;
      make_event(evt, 400, 100, 0); evt++;
      wait (dut.t_valid);
      t0 = $realtime;
      wait_results(evt, 100);
      begin
        automatic real rate = (n_tw - tw0) / (($realtime - t0) * 1e-9);
        $display("sorted words %0d, rate %0.1f M words/s, max trailer-to-TX latency %0d ns",
                 n_tw - tw0, rate / 1e6, max_lat_ns);
        chk(rate >= 0.9 * 75.0e6, "sorted stream at 75 M words/s");
      end
    end

    // 5) overflow: link 0 sends a burst while link 7 lags behind
    make_event(evt, 10, 0, 3); evt++;
    wait_results(evt, 300);
    make_event(evt, 10, 5, 0); evt++;
    wait_results(evt, 300);
    chk(n_res == evt, $sformatf("phase 5: %0d of %0d results", n_res, evt));
    chk(rx_ovf_cnt[0] > 0, "input FIFO overflow counted");

    lt_enable = 0;
    #10us;   // the loop model drains (TX and RX clocks differ slightly)
    chk(lt_sent_cnt > 1000 && lt_checked_cnt == lt_sent_cnt && lt_err_cnt == 0 && !lt_err_seen,
        $sformatf("link test: sent %0d checked %0d errors %0d", lt_sent_cnt, lt_checked_cnt, lt_err_cnt));
    chk(max_lat_ns <= 800, $sformatf("trailer to TX latency %0d ns", max_lat_ns));
    $display("mechanisms: multi-link %0d, out-of-window %0d, empty %0d, link lost %0d, stray %0d, ovf events %0d, tx backpressure %0d, out-fifo full %0d, lut rewrite %0d",
             n_multi_link, n_out_window, n_empty, n_link_lost, n_stray, n_ovf_evt, n_txbp, n_outfull, n_lut_rewrite);
    chk(n_multi_link > 0, "multi-link merge happened");
    chk(n_out_window > 0, "out-of-window hits happened");
    chk(n_empty > 0, "empty event happened");
    chk(n_link_lost > 0, "link loss happened");
    chk(n_stray > 0, "stray words happened");
    chk(n_ovf_evt > 0, "overflow happened");
    chk(n_txbp > 0, "TX back-pressure happened");
    chk(n_outfull > 0, "output FIFO full happened");
    chk(n_lut_rewrite > 0, "table rewrite happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
