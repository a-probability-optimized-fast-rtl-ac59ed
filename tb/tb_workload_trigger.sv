// tb_workload_trigger: the trigger on generated photon patterns with
// background, time information only, 1 ns bins.
//
// A toy detector model stands in for a full simulation. Candidate c emits 16
// photons whose delays after the event time follow a PDF of three peaks:
// bin 0 (direct light), 8 + 2*(c mod 20) and 30 + 3*(c div 20), each 0.7 ns
// wide, on a small flat floor, so each candidate has its own pair of peaks.
// The trigger's tables are loaded with
//   w_c(b) = round(40000 * ln(p_c(b) / p_floor))
// (a scaled log-likelihood, always >= 0 and below 2^20). Background hits
// arrive at a given rate per stave, uniformly over 128 ns around the event.
// Two runs of 300 events: 10 MHz and 40 MHz of background.
//
// Checks: every result (candidate, score, t_ref, hit count) equals a
// reference computed here from the same hits; at 10 MHz the right candidate
// is found in at least 80% of the events whose earliest hit is a photon.
// Printed for both runs: the fraction found over all events and over those
// events, the fraction with |t_ref - t_event| <= 2 ns, and the mean and
// spread of that time error. A background hit before the first photon becomes
// t_ref, shifts every bin and is the main loss.
`timescale 1ns/1ps
module tb_workload_trigger;
  import toptrig_pkg::*;
  localparam int NEV = 300, NPH = 20;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, lut_we = 0, res_valid;
  time_word_t in_data = '0;
  logic [CAND_W-1:0] lut_cand = 0;
  logic [5:0] lut_bin = 0;
  logic [LUT_W-1:0] lut_wdata = 0;
  trig_result_t res;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pdf_trigger dut (.*, .out_full(1'b0));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #50ms;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real pdf [200][64];
  int  w   [200][64];

  function automatic real gauss(real x, real mu, real s);
    return $exp(-0.5 * (x - mu) * (x - mu) / (s * s));
  endfunction

  // draw a delay in bins from candidate c's PDF
  function automatic int draw(int c);
    real u, acc;
    u = real'($urandom) / 4294967296.0;
    acc = 0.0;
    for (int b = 0; b < 64; b++) begin
      acc += pdf[c][b];
      if (u < acc) return b;
    end
    return 63;
  endfunction

  typedef struct { int t_ref; int cand; longint score; int nhits; int c_true; int t_true; bit clean; } exp_t;
  exp_t expq [$];
  int n_ok = 0, n_done = 0, n_clean = 0, n_clean_ok = 0, n_in2 = 0;
  real err_sum = 0.0, err_sq = 0.0;

  always @(posedge clk) begin
    if (!rst && res_valid) begin
      exp_t e;
      chk(expq.size() > 0, "unexpected result");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        chk(int'(res.cand) == e.cand && longint'(res.score) == e.score &&
            int'(res.t_ref) == e.t_ref && int'(res.nhits) == e.nhits,
            $sformatf("result: cand %0d/%0d score %0d/%0d t_ref %0d/%0d", res.cand, e.cand,
                      res.score, e.score, res.t_ref, e.t_ref));
        if (int'(res.cand) == e.c_true) n_ok++;
        if (e.clean) n_clean++;
        if (e.clean && int'(res.cand) == e.c_true) n_clean_ok++;
        if (int'(res.t_ref) - e.t_true <= 2 && int'(res.t_ref) - e.t_true >= -2) n_in2++;
        err_sum += real'(int'(res.t_ref) - e.t_true);
        err_sq  += real'(int'(res.t_ref) - e.t_true) ** 2;
        n_done++;
      end
    end
  end

  task automatic put(time_word_t wd);
    @(negedge clk);
    in_valid = 1; in_data = wd;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
  endtask

  task automatic run(real rate_hz, output real frac, output real fclean, output real in2,
                    output real mean, output real sd);
    n_ok = 0; n_done = 0; n_clean = 0; n_clean_ok = 0; n_in2 = 0; err_sum = 0.0; err_sq = 0.0;
    for (int e = 0; e < NEV; e++) begin
      automatic int c = $urandom % 200;
      automatic int t_true = 1000 + $urandom % 50000;
      automatic int ts [$];
      automatic real nbg_mean = rate_hz * 128e-9;
      automatic int nbg = 0;
      automatic exp_t x;
      automatic longint best = -1;
      automatic int first_ph = 1 << 30;
      // Poisson count of background hits by counting 1 ns slots
      for (int s = 0; s < 128; s++) if (real'($urandom) / 4294967296.0 < nbg_mean / 128.0) nbg++;
      for (int p = 0; p < NPH; p++) begin
        automatic int t = t_true + draw(c);
        ts.push_back(t);
        if (t < first_ph) first_ph = t;
      end
      for (int k = 0; k < nbg; k++) ts.push_back(t_true - 64 + $urandom % 128);
      ts.sort();
      x.clean = (ts[0] == first_ph);
      x.c_true = c; x.t_true = t_true; x.t_ref = ts[0]; x.nhits = 0; x.cand = 0;
      foreach (ts[i]) if (ts[i] - ts[0] < 64) x.nhits++;
      for (int k = 0; k < 200; k++) begin
        automatic longint s = 0;
        foreach (ts[i]) if (ts[i] - ts[0] < 64) s += w[k][ts[i] - ts[0]];
        if (s > best) begin best = s; x.cand = k; end
      end
      x.score = best;
      expq.push_back(x);
      foreach (ts[i]) begin
        automatic time_word_t wd = '0;
        wd.tval = TIME_W'(ts[i]);
        put(wd);
      end
      begin automatic time_word_t m = '0; m.eoe = 1; m.tval = TIME_W'(e); put(m); end
      @(negedge clk); in_valid = 0;
    end
    repeat (20) @(posedge clk);
    chk(n_done == NEV, $sformatf("%0d of %0d results", n_done, NEV));
    frac = real'(n_ok) / NEV;
    fclean = n_clean > 0 ? real'(n_clean_ok) / n_clean : 0.0;
    in2 = real'(n_in2) / NEV;
    mean = err_sum / NEV;
    sd   = $sqrt(err_sq / NEV - mean * mean);
  endtask

  initial begin
    real f10, c10, i10, m10, s10, f40, c40, i40, m40, s40;
    // toy PDFs and their tables
    for (int c = 0; c < 200; c++) begin
      automatic real sum = 0.0;
      automatic real floor_p;
      for (int b = 0; b < 64; b++) begin
        pdf[c][b] = 0.02 + gauss(b, 0, 0.7) + 0.8 * gauss(b, 8 + 2 * (c % 20), 0.7)
                  + 0.6 * gauss(b, 30 + 3 * (c / 20), 0.7);
        sum += pdf[c][b];
      end
      for (int b = 0; b < 64; b++) pdf[c][b] /= sum;
      floor_p = 0.02 / sum;
      for (int b = 0; b < 64; b++) w[c][b] = int'(40000.0 * $ln(pdf[c][b] / floor_p));
    end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int c = 0; c < 200; c++)
      for (int b = 0; b < 64; b++) begin
        @(negedge clk);
        lut_we = 1; lut_cand = CAND_W'(c); lut_bin = 6'(b); lut_wdata = LUT_W'(w[c][b]);
      end
    @(negedge clk); lut_we = 0;

    run(10e6, f10, c10, i10, m10, s10);
    $display("10 MHz background: right candidate %0.2f (%0.2f when the first hit is a photon), within 2 ns %0.2f, time error mean %0.2f ns, std %0.2f ns",
             f10, c10, i10, m10, s10);
    run(40e6, f40, c40, i40, m40, s40);
    $display("40 MHz background: right candidate %0.2f (%0.2f when the first hit is a photon), within 2 ns %0.2f, time error mean %0.2f ns, std %0.2f ns",
             f40, c40, i40, m40, s40);
    chk(c10 >= 0.8, $sformatf("recognition at 10 MHz: %0.2f", c10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
