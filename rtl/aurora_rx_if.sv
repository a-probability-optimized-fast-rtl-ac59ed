// aurora_rx_if: Aurora RX stream interface control for one fibre link.
//
// The Aurora core's streaming user interface delivers a 32-bit word on
// rx_d whenever rx_src_rdy_n is low and offers no back-pressure. This block
// registers the stream, passes words on only while the link reports
// channel_up, and tells the decoder when the link has gone down
// (link_lost, one cycle) so that a half-received event can be closed.
// It also counts the words received since reset.
// The original firmware names this block only; its behaviour here is this
// design's choice, based on the standard Aurora streaming signals.
//
// Timing: one register stage; word_valid/word follow rx_src_rdy_n/rx_d by
// one clk edge. link_lost rises one edge after channel_up falls.
module aurora_rx_if
  import toptrig_pkg::*;
(
  input  logic        clk,          // Aurora user clock
  input  logic        rst,          // synchronous, active high
  input  logic        channel_up,
  input  logic [31:0] rx_d,
  input  logic        rx_src_rdy_n,
  output logic        word_valid,
  output link_word_t  word,
  output logic        link_lost,
  output logic [31:0] word_cnt
);
  logic up_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      up_q       <= 1'b0;
      word_valid <= 1'b0;
      word       <= '0;
      link_lost  <= 1'b0;
      word_cnt   <= '0;
    end else begin
      up_q       <= channel_up;
      link_lost  <= up_q && !channel_up;
      word_valid <= channel_up && !rx_src_rdy_n;
      word       <= link_word_t'(rx_d);
      if (channel_up && !rx_src_rdy_n) word_cnt <= word_cnt + 1;
    end
  end

endmodule
