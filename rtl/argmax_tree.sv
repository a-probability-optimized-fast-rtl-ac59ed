// argmax_tree: pipelined maximum search ("MAX" stage of the trigger).
//
// Takes N (value, index) pairs that are valid together and finds the pair
// with the largest value; on equal values the lower input position wins.
// The inputs are padded to the next power of two with zero values that can
// never win against a real input, then halved by one rank of comparators per
// clock. The original firmware names the MAX stage only; the pipelined tree
// is this design's choice.
//
// Timing: LEVELS = ceil(log2(N)) register stages; a new set of inputs may be
// presented every cycle; out_valid follows in_valid after LEVELS cycles.
module argmax_tree #(
  parameter int unsigned N  = 100,
  parameter int unsigned VW = 28,
  parameter int unsigned IW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [VW-1:0] in_val [N],
  input  logic [IW-1:0] in_idx [N],
  output logic          out_valid,
  output logic [VW-1:0] out_val,
  output logic [IW-1:0] out_idx
);
  localparam int unsigned LEVELS = (N <= 1) ? 1 : $clog2(N);
  localparam int unsigned NP     = 2**LEVELS;

  // Level l holds NP >> l entries; level 0 is the padded input. A padding
  // entry never wins a comparison.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned M = NP >> l;
    logic [VW-1:0] val [M];
    logic [IW-1:0] idx [M];
    logic          pad [M];
    logic          vld;

    if (l == 0) begin : g_in
      for (genvar i = 0; i < NP; i++) begin : g_e
        if (i < N) begin : g_real
          assign val[i] = in_val[i];
          assign idx[i] = in_idx[i];
          assign pad[i] = 1'b0;
        end else begin : g_pad
          assign val[i] = '0;
          assign idx[i] = '0;
          assign pad[i] = 1'b1;
        end
      end
      assign vld = in_valid;
    end else begin : g_cmp
      for (genvar j = 0; j < M; j++) begin : g_e
        logic pick_b;
        assign pick_b = g_lvl[l-1].pad[2*j] ||
                        (!g_lvl[l-1].pad[2*j+1] &&
                         (g_lvl[l-1].val[2*j+1] > g_lvl[l-1].val[2*j]));
        always_ff @(posedge clk) begin
          if (rst) begin
            val[j] <= '0;
            idx[j] <= '0;
            pad[j] <= 1'b1;
          end else begin
            val[j] <= pick_b ? g_lvl[l-1].val[2*j+1] : g_lvl[l-1].val[2*j];
            idx[j] <= pick_b ? g_lvl[l-1].idx[2*j+1] : g_lvl[l-1].idx[2*j];
            pad[j] <= g_lvl[l-1].pad[2*j] && g_lvl[l-1].pad[2*j+1];
          end
        end
      end
      always_ff @(posedge clk) begin
        if (rst) vld <= 1'b0;
        else     vld <= g_lvl[l-1].vld;
      end
    end
  end

  assign out_valid = g_lvl[LEVELS].vld;
  assign out_val   = g_lvl[LEVELS].val[0];
  assign out_idx   = g_lvl[LEVELS].idx[0];

endmodule
