// merge_sorter: pipelined merge sorter for the 8 link streams of a stave.
//
// Every link delivers the hits of an event in time order, followed by an
// end-of-event marker. A binary tree of two-way merge cells (4, then 2,
// then 1 for 8 inputs) merges them into a single stream holding all hits of
// the event in time order and one end-of-event marker. Events follow each
// other without gaps. The tree structure follows the original firmware's
// merge-sort design; the word-level handshake (valid/ready between all
// levels, which is the flow control of the tree) is this design's choice.
//
// Interface: N_IN input streams with valid/ready (ready pops the FIFO that
// feeds the input), one output stream with valid/ready.
// Timing: log2(N_IN) register stages, i.e. 3 cycles from an input word to
// the output; up to one word per cycle.
module merge_sorter
  import toptrig_pkg::*;
#(
  parameter int unsigned N_IN = N_LINKS   // power of two, at least 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid [N_IN],
  input  time_word_t in_data  [N_IN],
  output logic       in_ready [N_IN],
  output logic       o_valid,
  output time_word_t o_data,
  input  logic       o_ready
);
  // Node array in heap order: node 1 is the root, node k has children 2k and
  // 2k+1; nodes N_IN .. 2*N_IN-1 are the inputs themselves.
  logic       v [2*N_IN];
  time_word_t d [2*N_IN];
  logic       r [2*N_IN];

  for (genvar i = 0; i < N_IN; i++) begin : g_leaf
    assign v[N_IN+i]    = in_valid[i];
    assign d[N_IN+i]    = in_data[i];
    assign in_ready[i]  = r[N_IN+i];
  end

  for (genvar k = 1; k < N_IN; k++) begin : g_node
    merge_node u_node (
      .clk, .rst,
      .a_valid(v[2*k]),   .a_data(d[2*k]),   .a_ready(r[2*k]),
      .b_valid(v[2*k+1]), .b_data(d[2*k+1]), .b_ready(r[2*k+1]),
      .o_valid(v[k]),     .o_data(d[k]),     .o_ready(r[k])
    );
  end

  assign v[0]    = 1'b0;
  assign d[0]    = '0;
  assign o_valid = v[1];
  assign o_data  = d[1];
  assign r[1]    = o_ready;
  assign r[0]    = 1'b0;

endmodule
