// async_fifo: dual-clock first-word-fall-through FIFO.
//
// Used for all FIFOs of the trigger: one per link between decoder and
// sorter, one between sorter and trigger (the trigger runs at twice the
// sorter clock), and one between trigger and the Aurora TX interface.
// The original firmware spends one RAMB16 on each of the ten FIFOs, which is
// what the default 512 x 32 size fills; the depth and the clock-crossing
// structure are this design's choice.
//
// How it works: binary read and write pointers with one extra wrap bit are
// kept in their own clock domains; their Gray-coded copies cross to the other
// domain through two flip-flops. full and empty are computed from the local
// pointer and the synchronised remote one, so both are pessimistic but safe.
//
// Interface: write side wr_en/wr_data/full (a write while full is ignored),
// afull when at most one place is free;
// read side rd_valid/rd_data show the oldest word, rd_en pops it.
// Timing: a word written at a wclk edge is visible on the read side after
// the Gray pointer crosses, i.e. 2 to 3 rclk edges later. Each side has its
// own synchronous active-high reset; assert both together.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 9      // depth = 2**AW
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic             afull,    // at most one free place left

  input  logic             rclk,
  input  logic             rrst,
  input  logic             rd_en,
  output logic             rd_valid,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---- write domain ---------------------------------------------------------
  logic do_wr;
  logic [AW:0] rbin_w;
  always_comb begin
    rbin_w[AW] = rgray_w2[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) rbin_w[i] = rbin_w[i+1] ^ rgray_w2[i];
  end
  assign full  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign afull = ((wbin - rbin_w) >= (AW+1)'(2**AW - 1));
  assign do_wr = wr_en && !full;

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // ---- read domain ----------------------------------------------------------
  logic do_rd;
  assign rd_valid = (rgray != wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];
  assign do_rd    = rd_en && rd_valid;

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
