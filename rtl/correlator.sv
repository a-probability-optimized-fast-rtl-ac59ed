// correlator: one of the 100 correlators of the PDF trigger.
//
// A correlator owns the look-up tables of two candidate PDFs, 64 bins of
// 20 bits each, in one 128-word memory (one block RAM). For every hit of an
// event the trigger presents the hit's bin (time relative to the earliest
// hit of the event) twice, once per PDF (rd_sel = 0, then 1); the weight
// read from the table is added to that PDF's running sum. At the end of the
// event a snap request moves the larger of the two sums to best_score (and
// which PDF it was to best_sel) and clears the sums for the next event.
// Sharing one correlator between two PDFs, and running it at twice the
// sorter clock to keep up, follows the original firmware; the pipeline
// below and the saturating sums are this design's choice.
//
// Candidate numbering: PDF c = 2*IDX + sel. The tables start with
// toptrig_pkg::pdf_default and can be rewritten through the write port.
// Timing: the memory read is registered (cycle 1) and the sum updates at
// cycle 2; best_valid pulses two cycles after snap. A snap must not share
// its cycle with a read.
module correlator
  import toptrig_pkg::*;
#(
  parameter int unsigned IDX = 0
) (
  input  logic               clk,
  input  logic               rst,
  // table load port
  input  logic               lut_we,
  input  logic [6:0]         lut_waddr,   // {pdf select, bin}
  input  logic [LUT_W-1:0]   lut_wdata,
  // correlation
  input  logic               rd_en,
  input  logic               rd_sel,
  input  logic [5:0]         rd_bin,
  input  logic               snap,
  output logic               best_valid,
  output logic [SCORE_W-1:0] best_score,
  output logic               best_sel
);
  logic [LUT_W-1:0]   mem [128];
  logic [LUT_W-1:0]   rdata;
  logic               v1, s1, snap1;
  logic [SCORE_W-1:0] acc [2];
  logic [SCORE_W:0]   sum;

  initial begin
    for (int s = 0; s < 2; s++)
      for (int b = 0; b < 64; b++)
        mem[s*64 + b] = pdf_default(2*IDX + s, b);
  end

  always_ff @(posedge clk) begin
    if (lut_we) mem[lut_waddr] <= lut_wdata;
    rdata <= mem[{rd_sel, rd_bin}];
  end

  assign sum = {1'b0, acc[s1]} + (SCORE_W+1)'(rdata);

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; s1 <= 1'b0; snap1 <= 1'b0;
      acc[0] <= '0; acc[1] <= '0;
      best_valid <= 1'b0; best_score <= '0; best_sel <= 1'b0;
    end else begin
      v1    <= rd_en;
      s1    <= rd_sel;
      snap1 <= snap;
      best_valid <= snap1;
      if (snap1) begin
        best_sel   <= acc[1] > acc[0];
        best_score <= (acc[1] > acc[0]) ? acc[1] : acc[0];
        acc[0]     <= '0;
        acc[1]     <= '0;
      end else if (v1) begin
        acc[s1] <= sum[SCORE_W] ? '1 : sum[SCORE_W-1:0];
      end
    end
  end

  no_read_on_snap: assert property (@(posedge clk) disable iff (rst) !(snap && rd_en));

endmodule
