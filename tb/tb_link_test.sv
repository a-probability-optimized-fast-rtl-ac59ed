// tb_link_test: self-checking test of the link loop-back tester.
// The optical loop is modelled as a fixed delay of 45 cycles (0.6 us at
// 75 MHz) from the TX user stream to the RX user stream. The test checks
// that a clean loop gives no errors and as many words checked as sent, that
// the generator's words follow the LFSR recurrence written out here, that
// every word corrupted on the way is counted once, and that with the core
// always ready one word leaves per cycle.
module tb_link_test;
  localparam int DLY = 45;
  logic clk = 0, rst = 1, enable = 0, tx_channel_up = 1, tx_dst_rdy_n = 0;
  logic [31:0] tx_d, sent_cnt, checked_cnt, err_cnt;
  logic tx_src_rdy_n, err_seen;
  logic rx_channel_up = 1, rx_src_rdy_n = 1;
  logic [31:0] rx_d = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  link_test dut (
    .clk_tx(clk), .rst_tx(rst), .enable, .tx_channel_up, .tx_d, .tx_src_rdy_n,
    .tx_dst_rdy_n, .sent_cnt,
    .clk_rx(clk), .rst_rx(rst), .rx_channel_up, .rx_d, .rx_src_rdy_n,
    .checked_cnt, .err_cnt, .err_seen
  );

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

  // loop model and generator check
  logic [32:0] line [$];
  int flip_next = 0, flips = 0, n_tx = 0;
  logic [31:0] ref_lfsr = 32'h1234_5678;
  always @(posedge clk) begin
    logic [32:0] x;
    x = {!tx_src_rdy_n && !tx_dst_rdy_n, tx_d};
    if (!rst && x[32]) begin
      n_tx++;
      chk(tx_d == ref_lfsr, $sformatf("generator word %0d", n_tx));
      ref_lfsr = {1'b0, ref_lfsr[31:1]} ^ (ref_lfsr[0] ? 32'h8020_0003 : 32'h0);
      if (flip_next) begin x[31:0] ^= 32'h0001_0000; flip_next = 0; flips++; end
    end
    line.push_back(x);
    if (line.size() > DLY) begin
      x = line.pop_front();
      rx_src_rdy_n <= !x[32];
      rx_d         <= x[31:0];
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0; enable = 1;
    // full rate, clean loop
    repeat (1000) @(negedge clk);
    chk(sent_cnt == 1000, $sformatf("one word per cycle: %0d in 1000", sent_cnt));
    // random back-pressure and two corrupted words
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      tx_dst_rdy_n = ($urandom % 3) == 0;
      if (i == 500 || i == 1500) flip_next = 1;
    end
    tx_dst_rdy_n = 0; enable = 0;
    repeat (DLY + 10) @(posedge clk);
    chk(checked_cnt == sent_cnt, $sformatf("checked %0d sent %0d", checked_cnt, sent_cnt));
    chk(err_cnt == 2 && flips == 2, $sformatf("err_cnt %0d flips %0d", err_cnt, flips));
    chk(err_seen, "sticky error flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
