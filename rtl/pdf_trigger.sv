// pdf_trigger: probability-optimised timing trigger for one stave.
//
// Idea: the pattern of photon arrival times of a track depends on where the
// particle crossed the quartz bar. For each of N_PDF candidate patterns a
// table holds a weight per 1 ns time bin, derived from that candidate's
// probability density function; the trigger adds up, for every candidate,
// the weights of the bins in which photons arrived and picks the candidate
// with the largest sum ("correlate with PDFs", then "MAX"). The candidate
// number is the position estimate; the event time is reported as the time
// of the earliest hit, which is also the time origin of the bins.
//
// How it works: the input is the sorter's output, all hits of an event in
// time order followed by an end-of-event marker. The first hit of an event
// sets t_ref; each hit's bin is tval - t_ref, and hits 64 ns or more after
// t_ref lie outside the tables and are skipped. Each of the N_CORR
// correlators holds two PDFs, so one hit takes two cycles (PDF 2k, then
// 2k+1); this block therefore runs at twice the sorter clock, and the
// 100-correlator / 200-PDF sharing follows the original firmware. At the
// marker all correlators hand their best sum to a pipelined arg-max tree,
// and the result (event number, hit count, t_ref, candidate, score) is
// written to the output FIFO. Taking t_ref from the earliest hit, skipping
// hits outside the window and the result format are this design's choices.
//
// Interface: FWFT input (in_valid/in_data, in_ready pops), table load port
// (cand, bin, weight), result output res_valid/res, out_full stalls the
// start of a new result. An event without hits reports t_ref = 0, nhits = 0,
// candidate 0 and score 0.
// Timing: a hit is consumed every 2 cycles. A marker is taken when no
// result is in flight and the output FIFO is not full; res_valid rises
// 1 + ceil(log2(NCORR)) clock edges after the edge that takes the marker
// (8 for 100 correlators).
module pdf_trigger
  import toptrig_pkg::*;
#(
  parameter int unsigned NCORR = N_CORR
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  time_word_t         in_data,
  output logic               in_ready,
  input  logic               lut_we,
  input  logic [CAND_W-1:0]  lut_cand,
  input  logic [5:0]         lut_bin,
  input  logic [LUT_W-1:0]   lut_wdata,
  output logic               res_valid,
  output trig_result_t       res,
  input  logic               out_full
);
  // ---- event sequencing ------------------------------------------------------
  logic              phase;       // 0: first PDF of the pair, 1: second
  logic              have_ref;    // the event has had its first hit
  logic [TIME_W-1:0] t_ref;
  logic [NHIT_W-1:0] nhits;
  logic              in_flight;   // a result is on its way through MAX
  trig_result_t      meta;        // evt, nhits, t_ref of the result in flight

  logic [TIME_W-1:0] diff;
  logic              is_hit, is_eoe, in_win;
  logic              rd_en, snap;
  logic [5:0]        rd_bin;

  assign is_hit = in_valid && !in_data.eoe;
  assign is_eoe = in_valid &&  in_data.eoe && !in_flight && !out_full && !phase;
  assign diff   = have_ref ? in_data.tval - t_ref : '0;
  assign in_win = diff < TIME_W'(N_BINS);
  assign rd_en  = is_hit && in_win;
  assign rd_bin = diff[5:0];
  assign snap   = is_eoe;
  assign in_ready = (is_hit && phase) || is_eoe;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= 1'b0;
      have_ref  <= 1'b0;
      t_ref     <= '0;
      nhits     <= '0;
      in_flight <= 1'b0;
      meta      <= '0;
    end else begin
      if (is_hit) phase <= !phase;
      if (is_hit && !have_ref) begin
        have_ref <= 1'b1;
        t_ref    <= in_data.tval;
      end
      if (is_hit && phase && in_win && nhits != '1) nhits <= nhits + 1'b1;
      if (is_eoe) begin
        in_flight  <= 1'b1;
        meta.evt   <= in_data.tval;
        meta.nhits <= nhits;
        meta.t_ref <= t_ref;
        have_ref   <= 1'b0;
        t_ref      <= '0;
        nhits      <= '0;
      end else if (res_valid) begin
        in_flight <= 1'b0;
      end
    end
  end

  // ---- correlators -----------------------------------------------------------
  logic               c_valid [NCORR];
  logic [SCORE_W-1:0] c_score [NCORR];
  logic               c_sel   [NCORR];
  logic [CAND_W-1:0]  c_idx   [NCORR];

  for (genvar k = 0; k < NCORR; k++) begin : g_corr
    correlator #(.IDX(k)) u_corr (
      .clk, .rst,
      .lut_we    (lut_we && (lut_cand[CAND_W-1:1] == (CAND_W-1)'(k))),
      .lut_waddr ({lut_cand[0], lut_bin}),
      .lut_wdata (lut_wdata),
      .rd_en     (rd_en),
      .rd_sel    (phase),
      .rd_bin    (rd_bin),
      .snap      (snap),
      .best_valid(c_valid[k]),
      .best_score(c_score[k]),
      .best_sel  (c_sel[k])
    );
    assign c_idx[k] = {(CAND_W-1)'(k), c_sel[k]};
  end

  // ---- MAX -------------------------------------------------------------------
  logic               m_valid;
  logic [SCORE_W-1:0] m_score;
  logic [CAND_W-1:0]  m_idx;

  argmax_tree #(.N(NCORR), .VW(SCORE_W), .IW(CAND_W)) u_max (
    .clk, .rst,
    .in_valid (c_valid[0]),
    .in_val   (c_score),
    .in_idx   (c_idx),
    .out_valid(m_valid),
    .out_val  (m_score),
    .out_idx  (m_idx)
  );

  always_comb begin
    res       = meta;
    res.cand  = m_idx;
    res.score = m_score;
  end
  assign res_valid = m_valid;

endmodule
