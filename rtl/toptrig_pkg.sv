// toptrig_pkg: types and constants shared by the TOP fast-timing trigger.
//
// The trigger for one logical stave receives hit times over 8 fibre links,
// merges them into one stream ordered by time, correlates that stream with
// 200 candidate probability density functions (PDFs) and reports the best
// candidate. This package holds the formats that pass between the blocks:
//   * link_word_t  - the 32-bit word on an Aurora user stream (format is this
//                    design's own choice: a 2-bit type and a 30-bit body),
//   * time_word_t  - the 32-bit word that the FIFOs, the sorter and the
//                    trigger carry: a hit (time, channel) or an end-of-event
//                    marker; the sorter works on 32-bit words as in the
//                    original firmware,
//   * trig_result_t - one trigger decision per event.
// The numbers 8 links, 200 PDFs, 64 bins, 20-bit weights, 100 correlators
// follow the original firmware; field widths are this design's choice.
package toptrig_pkg;

  // ---- sizes from the original firmware -----------------------------------
  localparam int unsigned N_LINKS   = 8;    // fibre links per logical stave
  localparam int unsigned N_PDF     = 200;  // candidate PDFs (LUTs)
  localparam int unsigned N_BINS    = 64;   // entries per PDF (1 ns bins)
  localparam int unsigned LUT_W     = 20;   // bits per PDF entry
  localparam int unsigned N_CORR    = 100;  // correlators, two PDFs each

  // ---- widths chosen by this design -----------------------------------------
  localparam int unsigned TIME_W    = 16;   // hit time, 1 ns units
  localparam int unsigned CHAN_W    = 9;    // channel within a stave (512)
  localparam int unsigned EVT_W     = 16;   // event number
  localparam int unsigned SCORE_W   = 28;   // correlation sum (saturating)
  localparam int unsigned CAND_W    = 8;    // candidate index 0..N_PDF-1
  localparam int unsigned NHIT_W    = 8;    // hits counted per event (saturating)

  // ---- link word (Aurora user stream) ---------------------------------------
  typedef enum logic [1:0] {
    LW_IDLE    = 2'b00,   // filler, ignored
    LW_HIT     = 2'b01,   // body = {channel[29:21], 5'b0, time[15:0]}
    LW_HEADER  = 2'b10,   // body = {14'b0, event[15:0]}, opens an event
    LW_TRAILER = 2'b11    // body = {14'b0, event[15:0]}, closes an event
  } link_type_e;

  typedef struct packed {
    link_type_e         kind;
    logic [CHAN_W-1:0]  chan;
    logic [4:0]         rsvd;
    logic [TIME_W-1:0]  tval;     // hit time, or event number
  } link_word_t;

  // ---- time word (decoders -> FIFOs -> sorter -> FIFO -> trigger) ----------
  // An end-of-event marker (eoe=1) carries the event number in tval; the
  // sorter orders hits by tval and never by the marker's tval.
  typedef struct packed {
    logic               eoe;
    logic [TIME_W-1:0]  tval;
    logic [CHAN_W-1:0]  chan;
    logic [5:0]         rsvd;
  } time_word_t;

  // ---- trigger result --------------------------------------------------------
  typedef struct packed {
    logic [EVT_W-1:0]   evt;      // event number from the trailer
    logic [NHIT_W-1:0]  nhits;    // hits inside the 64 ns PDF window
    logic [TIME_W-1:0]  t_ref;    // time of the earliest hit of the event
    logic [CAND_W-1:0]  cand;     // best candidate PDF (position hypothesis)
    logic [SCORE_W-1:0] score;    // its correlation sum
  } trig_result_t;

  // Default PDF table content, used until the tables are loaded through the
  // write port. Candidate c peaks in bin (c*5) mod 64 with a triangular
  // shape whose half-width grows with c/64; weights are 20-bit unsigned.
  //   d = |b - peak|,  hw = 8 + 4*(c/64)
  //   w = (d < hw) ? ((hw - d) * 65536) / hw + c : c[3:0]
  function automatic logic [LUT_W-1:0] pdf_default(int unsigned c, int unsigned b);
    int unsigned pk, d, hw, w;
    pk = (c * 5) % N_BINS;
    d  = (b > pk) ? b - pk : pk - b;
    hw = 8 + 4 * (c / N_BINS);
    if (d < hw) w = ((hw - d) * 65536) / hw + c;
    else        w = c % 16;
    return LUT_W'(w);
  endfunction

endpackage
