// aurora_tx_if: Aurora TX stream interface control.
//
// Sends each trigger result from the output FIFO over the Aurora streaming
// user interface as three 32-bit words:
//   word 0: {2'b10, 6'b0, nhits[7:0], evt[15:0]}
//   word 1: {2'b01, 6'b0, cand[7:0],  t_ref[15:0]}
//   word 2: {2'b11, 2'b0, score[27:0]}
// A word is taken by the Aurora core when tx_src_rdy_n and tx_dst_rdy_n are
// both low; nothing is offered while channel_up is low. The result is popped
// from the FIFO with its last word. The original firmware names this block
// only; the three-word format is this design's choice.
//
// Timing: tx_d and tx_src_rdy_n are combinational from the FIFO head and a
// 2-bit word counter; at full rate one result leaves every 3 cycles.
module aurora_tx_if
  import toptrig_pkg::*;
(
  input  logic         clk,          // Aurora user clock
  input  logic         rst,
  input  logic         channel_up,
  input  logic         res_valid,
  input  trig_result_t res,
  output logic         res_ready,
  output logic [31:0]  tx_d,
  output logic         tx_src_rdy_n,
  input  logic         tx_dst_rdy_n,
  output logic [31:0]  sent_cnt      // results sent since reset
);
  logic [1:0] wsel;
  logic       fire;

  always_comb begin
    unique case (wsel)
      2'd0:    tx_d = {2'b10, 6'b0, res.nhits, res.evt};
      2'd1:    tx_d = {2'b01, 6'b0, res.cand,  res.t_ref};
      default: tx_d = {2'b11, 2'b0, res.score};
    endcase
  end

  assign tx_src_rdy_n = !(res_valid && channel_up);
  assign fire         = !tx_src_rdy_n && !tx_dst_rdy_n;
  assign res_ready    = fire && (wsel == 2'd2);

  always_ff @(posedge clk) begin
    if (rst) begin
      wsel     <= '0;
      sent_cnt <= '0;
    end else if (fire) begin
      wsel <= (wsel == 2'd2) ? 2'd0 : wsel + 2'd1;
      if (wsel == 2'd2) sent_cnt <= sent_cnt + 1;
    end
  end

  word_counter_range: assert property (@(posedge clk) disable iff (rst) wsel != 2'd3);

endmodule
