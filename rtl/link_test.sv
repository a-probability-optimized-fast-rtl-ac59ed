// link_test: loop-back test of an Aurora link (in-chip link test).
//
// A pseudo-random word generator drives the Aurora TX user stream and, in
// the same cycle, writes each word it sends into a FIFO. The words come back
// over an external optical loop to an Aurora RX core; an RX stream
// interface (aurora_rx_if) hands them to a comparator, which checks each
// against the oldest word in the FIFO. Counters of words sent, words
// checked and mismatches are the observed outputs. The structure (generator,
// TX interface, FIFO, RX interface, comparator) follows the original test
// set-up; the 32-bit LFSR (x^32 + x^22 + x^2 + x + 1, Galois form, seed
// SEED), the counters and the sticky error flag are this design's choice.
//
// Interface: TX side in the clk_tx domain (tx_d, tx_src_rdy_n,
// tx_dst_rdy_n, tx_channel_up), RX side in the clk_rx domain (rx_d,
// rx_src_rdy_n, rx_channel_up), enable starts generation (clk_tx domain).
// Timing: at full rate one word per clk_tx cycle (2.4 Gbit/s at 75 MHz).
// Generation pauses while the link is down, the core is not ready or the
// FIFO is full. A word received while the FIFO is empty counts as an error.
module link_test #(
  parameter int unsigned AW   = 9,              // FIFO depth 2**AW
  parameter logic [31:0] SEED = 32'h1234_5678
) (
  input  logic        clk_tx,
  input  logic        rst_tx,
  input  logic        enable,
  input  logic        tx_channel_up,
  output logic [31:0] tx_d,
  output logic        tx_src_rdy_n,
  input  logic        tx_dst_rdy_n,
  output logic [31:0] sent_cnt,

  input  logic        clk_rx,
  input  logic        rst_rx,
  input  logic        rx_channel_up,
  input  logic [31:0] rx_d,
  input  logic        rx_src_rdy_n,
  output logic [31:0] checked_cnt,
  output logic [31:0] err_cnt,
  output logic        err_seen
);
  // ---- generator ----------------------------------------------------------------
  logic [31:0] lfsr;
  logic        f_full, fire;

  assign tx_d         = lfsr;
  assign tx_src_rdy_n = !(enable && tx_channel_up && !f_full);
  assign fire         = !tx_src_rdy_n && !tx_dst_rdy_n;

  always_ff @(posedge clk_tx) begin
    if (rst_tx) begin
      lfsr     <= SEED;
      sent_cnt <= '0;
    end else if (fire) begin
      lfsr     <= {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
      sent_cnt <= sent_cnt + 1;
    end
  end

  // ---- reference FIFO -----------------------------------------------------------
  logic        r_valid;
  logic [31:0] r_data;
  logic        w_valid, lost;
  toptrig_pkg::link_word_t w_word;
  logic [31:0] rx_word_cnt;

  async_fifo #(.WIDTH(32), .AW(AW)) u_ref (
    .wclk(clk_tx), .wrst(rst_tx), .wr_en(fire), .wr_data(lfsr),
    .full(f_full), .afull(),
    .rclk(clk_rx), .rrst(rst_rx), .rd_en(w_valid),
    .rd_valid(r_valid), .rd_data(r_data)
  );

  // ---- receiver and comparator ------------------------------------------------
  aurora_rx_if u_rx (
    .clk(clk_rx), .rst(rst_rx),
    .channel_up(rx_channel_up), .rx_d, .rx_src_rdy_n,
    .word_valid(w_valid), .word(w_word), .link_lost(lost), .word_cnt(rx_word_cnt)
  );

  always_ff @(posedge clk_rx) begin
    if (rst_rx) begin
      checked_cnt <= '0;
      err_cnt     <= '0;
      err_seen    <= 1'b0;
    end else begin
      if (w_valid) begin
        checked_cnt <= checked_cnt + 1;
        if (!r_valid || r_data != 32'(w_word)) begin
          err_cnt  <= err_cnt + 1;
          err_seen <= 1'b1;
        end
      end
      if (lost) err_seen <= 1'b1;
    end
  end

endmodule
