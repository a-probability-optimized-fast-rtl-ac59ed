// toptrig_top: fast timing trigger for one logical stave of the TOP counter.
//
// Data path (one block per box of the original firmware diagram):
//   8 x [Aurora RX stream interface -> decoder -> FIFO]
//     -> merge sorter -> FIFO -> PDF trigger -> FIFO
//     -> Aurora TX stream interface
// Each of the 8 fibre links brings the hits of a stave section in time
// order; the sorter merges them into one time-ordered stream per event, the
// trigger correlates it with 200 candidate PDFs and sends event number, hit
// count, event time (earliest hit), best candidate and score upstream.
// The Aurora cores themselves (vendor IP) sit outside this module: their
// streaming user-side signals are the ports rx_* and tx_*.
//
// Clocks (this design's choice of domains; the original firmware states
// only that the trigger runs at twice the sorter clock):
//   clk_rx   Aurora RX user clock, shared by the 8 receive links
//   clk_sort sorter clock (75 MHz gives the measured 75 M time words/s)
//   clk_trig trigger clock, twice clk_sort
//   clk_tx   Aurora TX user clock
// Each domain has a synchronous active-high reset; assert all together.
// The FIFOs are dual-clock and carry words between the domains.
// The PDF tables can be rewritten at run time through the lut_* port
// (clk_trig domain).
// Beside the trigger sits the link loop-back tester (lt_* ports), the
// in-chip test of an Aurora link: it shares no logic with the trigger.
module toptrig_top
  import toptrig_pkg::*;
#(
  parameter int unsigned IN_FIFO_AW  = 9,   // 512 time words per link
  parameter int unsigned MID_FIFO_AW = 9,   // 512 time words sorter->trigger
  parameter int unsigned OUT_FIFO_AW = 5,   // 32 results trigger->TX
  parameter int unsigned NCORR       = N_CORR
) (
  input  logic                clk_rx,
  input  logic                rst_rx,
  input  logic [N_LINKS-1:0]  rx_channel_up,
  input  logic [31:0]         rx_d [N_LINKS],
  input  logic [N_LINKS-1:0]  rx_src_rdy_n,

  input  logic                clk_sort,
  input  logic                rst_sort,
  input  logic                clk_trig,
  input  logic                rst_trig,

  input  logic                lut_we,
  input  logic [CAND_W-1:0]   lut_cand,
  input  logic [5:0]          lut_bin,
  input  logic [LUT_W-1:0]    lut_wdata,

  input  logic                clk_tx,
  input  logic                rst_tx,
  input  logic                tx_channel_up,
  output logic [31:0]         tx_d,
  output logic                tx_src_rdy_n,
  input  logic                tx_dst_rdy_n,

  output logic [31:0]         rx_word_cnt [N_LINKS],
  output logic [15:0]         rx_err_cnt  [N_LINKS],
  output logic [15:0]         rx_ovf_cnt  [N_LINKS],
  output logic [31:0]         tx_sent_cnt,

  // link loop-back tester, a separate test design placed beside the trigger
  // (clk_tx for its generator, clk_rx for its checker)
  input  logic                lt_enable,
  input  logic                lt_tx_channel_up,
  output logic [31:0]         lt_tx_d,
  output logic                lt_tx_src_rdy_n,
  input  logic                lt_tx_dst_rdy_n,
  output logic [31:0]         lt_sent_cnt,
  input  logic                lt_rx_channel_up,
  input  logic [31:0]         lt_rx_d,
  input  logic                lt_rx_src_rdy_n,
  output logic [31:0]         lt_checked_cnt,
  output logic [31:0]         lt_err_cnt,
  output logic                lt_err_seen
);
  // ---- receive side ------------------------------------------------------------
  logic       s_valid [N_LINKS];
  time_word_t s_data  [N_LINKS];
  logic       s_ready [N_LINKS];

  for (genvar i = 0; i < N_LINKS; i++) begin : g_link
    logic       w_valid, lost, f_wr, f_full;
    link_word_t w_word;
    time_word_t f_data;
    logic [31:0] f_rd_data;

    aurora_rx_if u_rx (
      .clk(clk_rx), .rst(rst_rx),
      .channel_up(rx_channel_up[i]), .rx_d(rx_d[i]), .rx_src_rdy_n(rx_src_rdy_n[i]),
      .word_valid(w_valid), .word(w_word), .link_lost(lost), .word_cnt(rx_word_cnt[i])
    );

    hit_decoder u_dec (
      .clk(clk_rx), .rst(rst_rx),
      .in_valid(w_valid), .in_word(w_word), .link_lost(lost),
      .fifo_full(f_full),
      .fifo_wr(f_wr), .fifo_data(f_data), .in_event(),
      .err_cnt(rx_err_cnt[i]), .ovf_cnt(rx_ovf_cnt[i])
    );

    async_fifo #(.WIDTH($bits(time_word_t)), .AW(IN_FIFO_AW)) u_fifo (
      .wclk(clk_rx), .wrst(rst_rx), .wr_en(f_wr), .wr_data(f_data),
      .full(f_full), .afull(),
      .rclk(clk_sort), .rrst(rst_sort), .rd_en(s_ready[i]),
      .rd_valid(s_valid[i]), .rd_data(f_rd_data)
    );
    assign s_data[i] = time_word_t'(f_rd_data);
  end

  // ---- sorter ------------------------------------------------------------------
  logic       m_valid, m_ready, m_full;
  time_word_t m_data;

  merge_sorter #(.N_IN(N_LINKS)) u_sort (
    .clk(clk_sort), .rst(rst_sort),
    .in_valid(s_valid), .in_data(s_data), .in_ready(s_ready),
    .o_valid(m_valid), .o_data(m_data), .o_ready(m_ready)
  );
  assign m_ready = !m_full;

  logic       t_valid, t_ready;
  logic [31:0] t_raw;

  async_fifo #(.WIDTH($bits(time_word_t)), .AW(MID_FIFO_AW)) u_mid_fifo (
    .wclk(clk_sort), .wrst(rst_sort), .wr_en(m_valid), .wr_data(m_data),
    .full(m_full), .afull(),
    .rclk(clk_trig), .rrst(rst_trig), .rd_en(t_ready),
    .rd_valid(t_valid), .rd_data(t_raw)
  );

  // ---- trigger -----------------------------------------------------------------
  logic         r_valid, r_full;
  trig_result_t r_data;

  pdf_trigger #(.NCORR(NCORR)) u_trig (
    .clk(clk_trig), .rst(rst_trig),
    .in_valid(t_valid), .in_data(time_word_t'(t_raw)), .in_ready(t_ready),
    .lut_we, .lut_cand, .lut_bin, .lut_wdata,
    .res_valid(r_valid), .res(r_data), .out_full(r_full)
  );

  // ---- send side ---------------------------------------------------------------
  logic                       o_valid, o_ready;
  logic [$bits(trig_result_t)-1:0] o_raw;

  async_fifo #(.WIDTH($bits(trig_result_t)), .AW(OUT_FIFO_AW)) u_out_fifo (
    .wclk(clk_trig), .wrst(rst_trig), .wr_en(r_valid), .wr_data(r_data),
    .full(r_full), .afull(),
    .rclk(clk_tx), .rrst(rst_tx), .rd_en(o_ready),
    .rd_valid(o_valid), .rd_data(o_raw)
  );

  aurora_tx_if u_tx (
    .clk(clk_tx), .rst(rst_tx), .channel_up(tx_channel_up),
    .res_valid(o_valid), .res(trig_result_t'(o_raw)), .res_ready(o_ready),
    .tx_d, .tx_src_rdy_n, .tx_dst_rdy_n, .sent_cnt(tx_sent_cnt)
  );

  // ---- link loop-back tester -------------------------------------------------------
  link_test u_link_test (
    .clk_tx(clk_tx), .rst_tx(rst_tx), .enable(lt_enable),
    .tx_channel_up(lt_tx_channel_up), .tx_d(lt_tx_d), .tx_src_rdy_n(lt_tx_src_rdy_n),
    .tx_dst_rdy_n(lt_tx_dst_rdy_n), .sent_cnt(lt_sent_cnt),
    .clk_rx(clk_rx), .rst_rx(rst_rx), .rx_channel_up(lt_rx_channel_up),
    .rx_d(lt_rx_d), .rx_src_rdy_n(lt_rx_src_rdy_n),
    .checked_cnt(lt_checked_cnt), .err_cnt(lt_err_cnt), .err_seen(lt_err_seen)
  );

endmodule
