// merge_node: one two-way merge cell of the pipelined merge sorter.
//
// Both inputs carry time words in increasing time order, each event closed
// by an end-of-event marker. The node compares the two head words and
// passes on the earlier hit (the a side on equal times). When one side has
// reached its marker, the other side is drained up to its own marker; then
// one marker is passed on and both input markers are consumed. A decision
// needs both heads, so the node waits while either input is empty.
//
// Interface: valid/ready on both inputs and the output; a word moves when
// valid and ready are both high at a clock edge.
// Timing: the output is a register, so the node adds one cycle of latency
// and, with the output taken every cycle, passes one word per cycle.
module merge_node
  import toptrig_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       a_valid,
  input  time_word_t a_data,
  output logic       a_ready,
  input  logic       b_valid,
  input  time_word_t b_data,
  output logic       b_ready,
  output logic       o_valid,
  output time_word_t o_data,
  input  logic       o_ready
);
  logic       load;      // output register can take a word this cycle
  logic       take_a, take_b;
  time_word_t sel;

  assign load = !o_valid || o_ready;

  always_comb begin
    take_a = 1'b0;
    take_b = 1'b0;
    sel    = a_data;
    if (a_valid && b_valid) begin
      if (a_data.eoe && b_data.eoe) begin
        take_a = 1'b1; take_b = 1'b1; sel = a_data;
      end else if (a_data.eoe) begin
        take_b = 1'b1; sel = b_data;
      end else if (b_data.eoe) begin
        take_a = 1'b1; sel = a_data;
      end else if (b_data.tval < a_data.tval) begin
        take_b = 1'b1; sel = b_data;
      end else begin
        take_a = 1'b1; sel = a_data;
      end
    end
  end

  assign a_ready = load && take_a;
  assign b_ready = load && take_b;

  always_ff @(posedge clk) begin
    if (rst) begin
      o_valid <= 1'b0;
      o_data  <= '0;
    end else if (load) begin
      o_valid <= take_a || take_b;
      if (take_a || take_b) o_data <= sel;
    end
  end

  // An input word may not change while it waits to be taken.
  a_stable: assert property (@(posedge clk) disable iff (rst)
    a_valid && !a_ready |=> a_valid && $stable(a_data));
  b_stable: assert property (@(posedge clk) disable iff (rst)
    b_valid && !b_ready |=> b_valid && $stable(b_data));

endmodule
