// tb_pdf_trigger: self-checking test of the PDF correlation trigger.
// First runs one event against the power-up tables (default formula written
// out here), then loads random tables for all 200 candidates through the
// load port and plays random time-ordered events: hits inside and outside
// the 64 ns window, empty events, input gaps, and phases where the output
// FIFO reports full. Each result (event number, hit count, t_ref, best
// candidate with lowest-index tie break, score) is compared with a model
// computed here. Also checks the rate of one hit per two cycles and the
// result latency of 8 clock edges after the edge that takes the marker.
module tb_pdf_trigger;
  import toptrig_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, lut_we = 0, res_valid, out_full = 0;
  time_word_t in_data = '0;
  logic [CAND_W-1:0] lut_cand = 0;
  logic [5:0] lut_bin = 0;
  logic [LUT_W-1:0] lut_wdata = 0;
  trig_result_t res;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pdf_trigger dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint dflt(int c, int b);
    int pk = (c * 5) % 64, d, hw = 8 + 4 * (c / 64);
    d = b > pk ? b - pk : pk - b;
    return d < hw ? ((hw - d) * 65536) / hw + c : c % 16;
  endfunction

  longint tab [200][64];
  trig_result_t exp_q [$];
  int res_seen = 0, stall_cycles = 0, marker_taken_cyc = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && res_valid) begin
      chk(exp_q.size() > 0, $sformatf("unexpected result evt %0d at %0d", res.evt, cyc));
      if (exp_q.size() > 0) begin
        chk(res == exp_q[0], $sformatf("result %0d: got evt %0d n %0d t %0d c %0d s %0d, exp evt %0d n %0d t %0d c %0d s %0d",
            res_seen, res.evt, res.nhits, res.t_ref, res.cand, res.score,
            exp_q[0].evt, exp_q[0].nhits, exp_q[0].t_ref, exp_q[0].cand, exp_q[0].score));
        void'(exp_q.pop_front());
      end
      // res_valid rises after the 8th edge and is sampled here at the 9th
      chk(cyc - marker_taken_cyc == 9, $sformatf("result latency %0d", cyc - marker_taken_cyc));
      res_seen++;
    end
    if (!rst && in_valid && in_ready && in_data.eoe) marker_taken_cyc = cyc;
  end

  // present one word until taken, keeping in_valid high between words
  // unless random gaps are asked for
  task automatic put(time_word_t w, bit gaps);
    @(negedge clk);
    if (gaps && ($urandom % 3 == 0)) begin
      in_valid = 0;
      repeat (1 + $urandom % 3) @(negedge clk);
    end
    in_valid = 1; in_data = w;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
  endtask

  task automatic event_run(int evt, int times[$], bit gaps, bit use_default);
    trig_result_t r = '0;
    longint best = -1; int bc = 0; int n = 0;
    foreach (times[i]) begin
      time_word_t w = '0; w.tval = TIME_W'(times[i]); w.chan = CHAN_W'(i);
      put(w, gaps);
    end
    for (int c = 0; c < 200; c++) begin
      longint s = 0;
      foreach (times[i])
        if (times[i] - times[0] < 64)
          s += use_default ? dflt(c, times[i] - times[0]) : tab[c][times[i] - times[0]];
      if (s > best) begin best = s; bc = c; end
    end
    foreach (times[i]) if (times[i] - times[0] < 64) n++;
    r.evt = EVT_W'(evt); r.nhits = NHIT_W'(n);
    r.t_ref = times.size() > 0 ? TIME_W'(times[0]) : '0;
    r.cand = CAND_W'(times.size() > 0 ? bc : 0); r.score = SCORE_W'(times.size() > 0 ? best : 0);
    exp_q.push_back(r);
    begin time_word_t m = '0; m.eoe = 1; m.tval = TIME_W'(evt); put(m, gaps); end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    int t[$];
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    // power-up tables
    t = '{100, 103, 103, 110, 131, 170};
    event_run(1, t, 0, 1);
    repeat (15) @(posedge clk);
    // load random tables
    for (int c = 0; c < 200; c++)
      for (int b = 0; b < 64; b++) begin
        tab[c][b] = $urandom % (1 << LUT_W);
        @(negedge clk); lut_we = 1; lut_cand = CAND_W'(c); lut_bin = 6'(b); lut_wdata = LUT_W'(tab[c][b]);
      end
    @(negedge clk); lut_we = 0;
    // rate: 40 hits back to back
    begin
      int c0;
      t.delete();
      for (int i = 0; i < 40; i++) t.push_back(200 + i);
      c0 = cyc;
      event_run(2, t, 0, 0);
      chk(cyc - c0 <= 2*40 + 2*1 + 4, $sformatf("40 hits + marker took %0d cycles", cyc - c0));
    end
    // random events
    for (int e = 3; e < 60; e++) begin
      automatic int tt = $urandom % 30000, nh = $urandom % 25;
      if (e % 11 == 0) nh = 0;
      t.delete();
      for (int i = 0; i < nh; i++) begin
        tt += ($urandom % 6 == 0) ? $urandom % 30 : $urandom % 4;
        t.push_back(tt);
      end
      fork
        event_run(e, t, 1, 0);
        if (e % 7 == 0) begin
          @(negedge clk); out_full = 1;
          repeat (40) begin @(negedge clk); if (in_valid && in_data.eoe) stall_cycles++; end
          out_full = 0;
        end
      join
      repeat (12) @(posedge clk);
    end
    repeat (15) @(posedge clk);
    chk(exp_q.size() == 0, "all results seen");
    chk(stall_cycles > 0, "output-full stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
