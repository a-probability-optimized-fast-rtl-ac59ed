// tb_async_fifo: self-checking test of the dual-clock FIFO.
// Writes a pseudo-random word sequence at one clock and reads it at an
// unrelated clock with random stalls on both sides, comparing every word
// with a reference queue. Also fills the FIFO to check full/afull and that
// a write while full is ignored, and checks that a word written into an
// empty FIFO shows on the read side within 4 read-clock edges.
module tb_async_fifo;
  localparam int AW = 4;
  localparam int DEPTH = 2**AW;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic wr_en = 0, rd_en = 0, full, afull, rd_valid;
  logic [31:0] wr_data = 0, rd_data;
  int checks = 0, failures = 0;
  logic [31:0] q [$];

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  async_fifo #(.WIDTH(32), .AW(AW)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  int n_wr = 0;
  bit random_phase = 0;
  always @(posedge wclk) begin
    if (random_phase && !wrst) begin
      if (wr_en && !full) begin q.push_back(wr_data); n_wr++; end
      wr_en   <= ($urandom % 3 != 0) && n_wr < 2000;
      wr_data <= $urandom;
    end
  end
  // reader
  int n_rd = 0;
  always @(posedge rclk) begin
    if (random_phase && !rrst) begin
      if (rd_en && rd_valid) begin
        chk(q.size() > 0 && rd_data == q[0], $sformatf("read %0d data %h", n_rd, rd_data));
        if (q.size() > 0) void'(q.pop_front());
        n_rd++;
      end
      rd_en <= ($urandom % 4 != 0);
    end
  end

  initial begin
    repeat (4) @(posedge wclk);
    wrst = 0; rrst = 0;
    repeat (4) @(posedge rclk);
    chk(!rd_valid && !full && !afull, "empty after reset");
    // latency: one word into an empty FIFO
    @(negedge wclk); wr_en = 1; wr_data = 32'hA5A5_0001;
    @(negedge wclk); wr_en = 0;
    begin
      int k = 0;
      while (!rd_valid && k < 10) begin @(posedge rclk); k++; end
      chk(rd_valid && rd_data == 32'hA5A5_0001, "first word");
      chk(k <= 4, $sformatf("latency %0d rclk edges", k));
    end
    @(negedge rclk); rd_en = 1; @(negedge rclk); rd_en = 0;
    repeat (6) @(posedge wclk);
    chk(!rd_valid, "empty after pop");
    // fill to full
    for (int i = 0; i < DEPTH + 3; i++) begin
      @(negedge wclk); wr_en = 1; wr_data = 32'h1000 + i;
    end
    @(negedge wclk); wr_en = 0;
    chk(full, "full after DEPTH writes");
    chk(afull, "afull when full");
    repeat (6) @(posedge rclk);
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge rclk);
      chk(rd_valid && rd_data == 32'h1000 + i, $sformatf("fill word %0d = %h", i, rd_data));
      rd_en = 1; @(negedge rclk); rd_en = 0;
    end
    repeat (6) @(posedge rclk);
    chk(!rd_valid, "overflow writes were dropped");
    // random traffic
    random_phase = 1;
    wait (n_rd == 2000);
    repeat (10) @(posedge rclk);
    chk(q.size() == 0, "all words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
