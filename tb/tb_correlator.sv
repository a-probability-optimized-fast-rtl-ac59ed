// tb_correlator: self-checking test of one two-PDF correlator.
// Checks the power-up table content for one bin against the
// default formula, then loads random tables through the write port, runs
// random events (each hit read for PDF 0 then PDF 1, then a snap) and
// compares best_score/best_sel with sums computed here; best_valid must
// pulse exactly 2 cycles after snap. A final event of all-ones weights
// checks that the sums saturate.
module tb_correlator;
  import toptrig_pkg::*;
  localparam int IDX = 3;
  logic clk = 0, rst = 1;
  logic lut_we = 0, rd_en = 0, rd_sel = 0, snap = 0;
  logic [6:0] lut_waddr = 0;
  logic [LUT_W-1:0] lut_wdata = 0;
  logic [5:0] rd_bin = 0;
  logic best_valid, best_sel;
  logic [SCORE_W-1:0] best_score;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  correlator #(.IDX(IDX)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // default weight, written out independently of the package
  function automatic longint dflt(int c, int b);
    int pk = (c * 5) % 64, d, hw = 8 + 4 * (c / 64);
    d = b > pk ? b - pk : pk - b;
    return d < hw ? ((hw - d) * 65536) / hw + c : c % 16;
  endfunction

  longint tab [2][64];

  task automatic hit(int b);
    @(negedge clk); rd_en = 1; rd_sel = 0; rd_bin = 6'(b);
    @(negedge clk); rd_sel = 1;
    @(negedge clk); rd_en = 0;
  endtask

  task automatic finish_event(longint e0, longint e1);
    int k = 0;
    longint m;
    if (e0 > 64'hFFF_FFFF) e0 = 64'hFFF_FFFF;
    if (e1 > 64'hFFF_FFFF) e1 = 64'hFFF_FFFF;
    m = e0 >= e1 ? e0 : e1;
    @(negedge clk); snap = 1;
    @(negedge clk); snap = 0;
    while (!best_valid && k < 5) begin @(posedge clk); #1; k++; end
    // snap was sampled at one edge; best_valid must rise at the second
    chk(k == 1, $sformatf("best_valid %0d edges after the snap edge", k + 1));
    chk(best_score == SCORE_W'(m), $sformatf("score %0d vs %0d", best_score, m));
    chk(best_sel == (e1 > e0), "sel");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    // default content
    hit(17);
    finish_event(dflt(2*IDX, 17), dflt(2*IDX+1, 17));
    // random tables
    for (int s = 0; s < 2; s++)
      for (int b = 0; b < 64; b++) begin
        tab[s][b] = $urandom % (1 << LUT_W);
        @(negedge clk); lut_we = 1; lut_waddr = 7'(s*64 + b); lut_wdata = LUT_W'(tab[s][b]);
      end
    @(negedge clk); lut_we = 0;
    for (int e = 0; e < 40; e++) begin
      automatic longint s0 = 0, s1 = 0;
      automatic int nh = $urandom % 30;
      for (int h = 0; h < nh; h++) begin
        automatic int b = $urandom % 64;
        hit(b); s0 += tab[0][b]; s1 += tab[1][b];
      end
      finish_event(s0, s1);
    end
    // saturation
    for (int s = 0; s < 2; s++)
      for (int b = 0; b < 64; b++) begin
        @(negedge clk); lut_we = 1; lut_waddr = 7'(s*64 + b); lut_wdata = '1;
      end
    @(negedge clk); lut_we = 0;
    for (int h = 0; h < 300; h++) hit(h % 64);
    finish_event(64'hFFF_FFFF, 64'hFFF_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
