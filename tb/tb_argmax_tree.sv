// tb_argmax_tree: self-checking test of the pipelined maximum search.
// Presents a new random input set every cycle (values drawn from a small
// range so that ties are frequent, plus sets with a single large value and
// all-zero sets) and checks each result, 7 cycles later for N = 100,
// against a linear scan where the lowest position wins ties.
module tb_argmax_tree;
  localparam int N = 100, VW = 28, IW = 8, LAT = 7;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [VW-1:0] in_val [N];
  logic [IW-1:0] in_idx [N];
  logic out_valid;
  logic [VW-1:0] out_val;
  logic [IW-1:0] out_idx;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  argmax_tree #(.N(N), .VW(VW), .IW(IW)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [VW-1:0] ev [$];
  logic [IW-1:0] ei [$];
  int issued [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      chk(ev.size() > 0, "unexpected result");
      if (ev.size() > 0) begin
        chk(out_val == ev[0] && out_idx == ei[0],
            $sformatf("got %0d@%0d expected %0d@%0d", out_val, out_idx, ev[0], ei[0]));
        chk(cyc - issued[0] == LAT, $sformatf("latency %0d", cyc - issued[0]));
        void'(ev.pop_front()); void'(ei.pop_front()); void'(issued.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int t = 0; t < 500; t++) begin
      logic [VW-1:0] bv; logic [IW-1:0] bi;
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      for (int i = 0; i < N; i++) begin
        in_idx[i] = IW'(2*i + ($urandom % 2));
        case (t % 4)
          0: in_val[i] = VW'($urandom % 8);
          1: in_val[i] = VW'($urandom);
          2: in_val[i] = '0;
          default: in_val[i] = (i == t % N) ? '1 : VW'($urandom % 1000);
        endcase
      end
      bv = in_val[0]; bi = in_idx[0];
      for (int i = 1; i < N; i++) if (in_val[i] > bv) begin bv = in_val[i]; bi = in_idx[i]; end
      if (in_valid) begin ev.push_back(bv); ei.push_back(bi); issued.push_back(cyc + 1); end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    chk(ev.size() == 0, "all results seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
