// tb_aurora_rx_if: self-checking test of the Aurora RX stream interface.
// Drives random words with random rx_src_rdy_n and channel_up drops and
// checks, one clock later, that exactly the words offered while the channel
// was up come out, that link_lost pulses once per channel drop, and that
// the word counter matches.
module tb_aurora_rx_if;
  import toptrig_pkg::*;
  logic clk = 0, rst = 1, channel_up = 0, rx_src_rdy_n = 1;
  logic [31:0] rx_d = 0, word_cnt;
  logic word_valid, link_lost;
  link_word_t word;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  aurora_rx_if dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_v, prev_up, exp_lost;
    logic [31:0] exp_d;
    int exp_cnt = 0, drops = 0;
    prev_up = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      channel_up   = (i % 400) < 370;
      rx_src_rdy_n = ($urandom % 4) == 0;
      rx_d         = $urandom;
      exp_v  = channel_up && !rx_src_rdy_n;
      exp_d  = rx_d;
      exp_lost = prev_up && !channel_up;
      if (exp_lost) drops++;
      prev_up = channel_up;
      if (exp_v) exp_cnt++;
      @(posedge clk); #1;
      chk(word_valid == exp_v, $sformatf("valid at %0d", i));
      if (exp_v) chk(word == link_word_t'(exp_d), $sformatf("data at %0d", i));
      chk(link_lost == exp_lost, $sformatf("link_lost at %0d", i));
      chk(word_cnt == exp_cnt, $sformatf("count at %0d: %0d vs %0d", i, word_cnt, exp_cnt));
    end
    chk(drops == 7, "channel drops exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
