// hit_decoder: turns link words into time words for the sorter.
//
// Each link carries events framed as HEADER, HIT..., TRAILER (link word
// format in toptrig_pkg). The decoder writes every hit of an open event to
// its FIFO as a time word (time, channel) and closes the event with one
// end-of-event marker that carries the event number. The hits of one link
// must arrive in time order, since the sorter merges ordered streams.
// Protocol faults are counted in err_cnt and repaired so that every
// opened event yields exactly one marker:
//   * a hit or trailer outside an event is dropped;
//   * a header inside an event, or link_lost, closes the open event;
//   * a trailer whose number differs from the header is counted.
// The Aurora RX stream cannot be stalled. A hit that finds the FIFO full is
// dropped and counted in ovf_cnt. A marker must never be lost, or the sorter
// would wait forever for that link: markers go through a small queue
// (MQ_DEPTH entries) that is written to the FIFO with priority as soon as it
// has room; while a marker waits, hits are dropped, which keeps the order.
// Only if the queue itself overflows is a marker lost (counted in err_cnt).
// The original firmware names this block only; the word format and the
// fault handling are this design's choice.
//
// Timing: a hit is written in the cycle it arrives (combinational from
// in_valid to fifo_wr); a marker one cycle later at the earliest.
module hit_decoder
  import toptrig_pkg::*;
#(
  parameter int unsigned MQ_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  link_word_t  in_word,
  input  logic        link_lost,
  input  logic        fifo_full,
  output logic        fifo_wr,
  output time_word_t  fifo_data,
  output logic        in_event,
  output logic [15:0] err_cnt,
  output logic [15:0] ovf_cnt
);
  localparam int unsigned QW = $clog2(MQ_DEPTH + 1);

  logic [EVT_W-1:0] evt_q;
  logic [EVT_W-1:0] mq [MQ_DEPTH];
  logic [QW-1:0]    mq_cnt;
  logic             err, ovf, close, pop, push;
  logic [EVT_W-1:0] close_evt;

  // ---- classify the incoming word ---------------------------------------------
  always_comb begin
    err   = 1'b0;
    close = 1'b0;
    if (link_lost) begin
      close = in_event;
      err   = in_event;
    end else if (in_valid) begin
      unique case (in_word.kind)
        LW_HIT:     err = !in_event;
        LW_HEADER:  begin close = in_event; err = in_event; end
        LW_TRAILER: begin
          close = in_event;
          err   = !in_event || (in_word.tval != evt_q);
        end
        default: ;  // LW_IDLE
      endcase
    end
  end
  assign close_evt = evt_q;

  // ---- FIFO write: queued marker first, then hits --------------------------------
  always_comb begin
    fifo_wr   = 1'b0;
    fifo_data = '0;
    pop       = 1'b0;
    ovf       = 1'b0;
    if (mq_cnt != '0) begin
      if (!fifo_full) begin
        fifo_wr        = 1'b1;
        fifo_data.eoe  = 1'b1;
        fifo_data.tval = mq[0];
        pop            = 1'b1;
      end
      ovf = !link_lost && in_valid && in_word.kind == LW_HIT && in_event;
    end else if (!link_lost && in_valid && in_word.kind == LW_HIT && in_event) begin
      if (fifo_full) ovf = 1'b1;
      else begin
        fifo_wr        = 1'b1;
        fifo_data.tval = in_word.tval;
        fifo_data.chan = in_word.chan;
      end
    end
  end
  assign push = close;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_event <= 1'b0;
      evt_q    <= '0;
      err_cnt  <= '0;
      ovf_cnt  <= '0;
      mq_cnt   <= '0;
      for (int i = 0; i < MQ_DEPTH; i++) mq[i] <= '0;
    end else begin
      if ((err || (push && !pop && mq_cnt == QW'(MQ_DEPTH))) && err_cnt != '1)
        err_cnt <= err_cnt + 1'b1;
      if (ovf && ovf_cnt != '1) ovf_cnt <= ovf_cnt + 1'b1;
      // marker queue: shift on pop, append on push
      if (pop) for (int i = 0; i < MQ_DEPTH - 1; i++) mq[i] <= mq[i+1];
      if (push) begin
        if (pop)                           mq[int'(mq_cnt) - 1] <= close_evt;
        else if (mq_cnt != QW'(MQ_DEPTH))  mq[int'(mq_cnt)]     <= close_evt;
      end
      if (push && !pop && mq_cnt != QW'(MQ_DEPTH)) mq_cnt <= mq_cnt + 1'b1;
      else if (pop && !push)                       mq_cnt <= mq_cnt - 1'b1;
      // event framing
      if (link_lost) in_event <= 1'b0;
      else if (in_valid) begin
        if (in_word.kind == LW_HEADER) begin
          in_event <= 1'b1;
          evt_q    <= in_word.tval;
        end else if (in_word.kind == LW_TRAILER) begin
          in_event <= 1'b0;
        end
      end
    end
  end

  marker_queue_bound: assert property (@(posedge clk) disable iff (rst) mq_cnt <= QW'(MQ_DEPTH));

endmodule
