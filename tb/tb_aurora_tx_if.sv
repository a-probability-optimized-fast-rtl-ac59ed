// tb_aurora_tx_if: self-checking test of the Aurora TX stream interface.
// Feeds random trigger results from a queue standing in for the output
// FIFO, with random back-pressure on tx_dst_rdy_n and channel drops, and
// checks every word taken by the link against the three-word format, that
// nothing is offered while the channel is down, that each result is popped
// once, and that with no back-pressure a result takes 3 cycles.
module tb_aurora_tx_if;
  import toptrig_pkg::*;
  logic clk = 0, rst = 1, channel_up = 0, tx_dst_rdy_n = 1;
  logic res_valid, res_ready, tx_src_rdy_n;
  trig_result_t res;
  logic [31:0] tx_d, sent_cnt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  trig_result_t q [$];
  logic [31:0] expw [$];
  assign res_valid = q.size() > 0;
  assign res = q.size() > 0 ? q[0] : '0;

  aurora_tx_if dut (.*);

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

  int nres = 0, fires = 0;
  bit random_mode = 1;
  always @(posedge clk) begin
    if (!rst) begin
      if (!channel_up) chk(tx_src_rdy_n, "nothing offered while channel down");
      if (!tx_src_rdy_n && !tx_dst_rdy_n) begin
        fires++;
        chk(expw.size() > 0 && tx_d == expw[0], $sformatf("word %h vs %h", tx_d, expw.size() ? expw[0] : 0));
        if (expw.size() > 0) void'(expw.pop_front());
      end
      if (res_valid && res_ready) begin void'(q.pop_front()); nres++; end
    end
  end
  always @(negedge clk) if (random_mode) begin
    tx_dst_rdy_n = ($urandom % 3) == 0;
    channel_up   = ($urandom % 20) != 0;
  end

  task automatic add(trig_result_t r);
    q.push_back(r);
    expw.push_back({2'b10, 6'b0, r.nhits, r.evt});
    expw.push_back({2'b01, 6'b0, r.cand, r.t_ref});
    expw.push_back({2'b11, 2'b0, r.score});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 200; i++) add(trig_result_t'({$urandom, $urandom, $urandom}));
    wait (q.size() == 0);
    repeat (3) @(posedge clk);
    chk(nres == 200 && expw.size() == 0, "all results sent");
    chk(sent_cnt == 200, $sformatf("sent_cnt %0d", sent_cnt));
    // full rate
    random_mode = 0;
    @(negedge clk); tx_dst_rdy_n = 0; channel_up = 1;
    begin
      int f0;
      f0 = fires;
      for (int i = 0; i < 10; i++) add(trig_result_t'({$urandom, $urandom, $urandom}));
      repeat (30) @(posedge clk);
      #1;
      chk(fires - f0 == 30 && q.size() == 0, $sformatf("30 words in 30 cycles: %0d", fires - f0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
