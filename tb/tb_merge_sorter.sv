// tb_merge_sorter: self-checking test of the 8-input pipelined merge sorter.
// Each input gets random events: a random number of hits with increasing
// random times, closed by an end-of-event marker. Inputs and output stall at
// random. For every event the test checks that the output holds one marker
// with the event number, that the hit times do not decrease, and that the
// hits are exactly those sent on all inputs. A second phase without stalls
// checks the 3-cycle latency and a rate of one word per cycle.
module tb_merge_sorter;
  import toptrig_pkg::*;
  localparam int N = 8;
  localparam int NEV = 60;
  logic clk = 0, rst = 1;
  logic       in_valid [N];
  time_word_t in_data  [N];
  logic       in_ready [N];
  logic       o_valid, o_ready;
  time_word_t o_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  merge_sorter #(.N_IN(N)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  time_word_t src [N][$];
  logic [40:0] exp_hits [NEV][$];   // {tval, chan} of each event's hits
  logic [40:0] got_hits [$];
  bit stall_in = 1, stall_out = 1;

  // sources: keep presenting the head until taken
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (!rst && in_valid[i] && in_ready[i]) void'(src[i].pop_front());
    end
  end
  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      // a word once offered stays offered until taken
      if (!in_valid[i]) in_valid[i] = (src[i].size() > 0) && (!stall_in || ($urandom % 3 != 0));
      else              in_valid[i] = src[i].size() > 0;
      in_data[i] = (src[i].size() > 0) ? src[i][0] : '0;
    end
    o_ready = !stall_out || ($urandom % 4 != 0);
  end

  int ev_out = 0, words_out = 0;
  always @(posedge clk) begin
    if (!rst && o_valid && o_ready) begin
      words_out++;
      if (o_data.eoe) begin
        chk(o_data.tval == TIME_W'(ev_out), $sformatf("marker number %0d", o_data.tval));
        if (stall_in) begin
          logic [40:0] e [$];
          e = exp_hits[ev_out];
          e.sort(); got_hits.sort();
          chk(e == got_hits, $sformatf("event %0d hit set (%0d vs %0d hits)", ev_out, got_hits.size(), e.size()));
        end
        got_hits.delete();
        ev_out++;
      end else begin
        if (got_hits.size() > 0)
          chk(o_data.tval >= got_hits[$][40:25], "time order");
        got_hits.push_back({o_data.tval, o_data.chan, 16'(0)});
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) in_valid[i] = 0;
    // random events
    for (int e = 0; e < NEV; e++) begin
      for (int i = 0; i < N; i++) begin
        automatic int nh = $urandom % 8;
        automatic int t  = $urandom % 50;
        if (e % 10 == 3) nh = 0;  // empty everywhere now and then
        for (int h = 0; h < nh; h++) begin
          automatic time_word_t w = '0;
          t += $urandom % 9;
          w.tval = TIME_W'(t); w.chan = CHAN_W'(i * 64 + h);
          src[i].push_back(w);
          exp_hits[e].push_back({w.tval, w.chan, 16'(0)});
        end
        begin time_word_t m = '0; m.eoe = 1; m.tval = TIME_W'(e); src[i].push_back(m); end
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    wait (ev_out == NEV);
    // phase 2: no stalls, one event of 16 hits per input
    stall_in = 0; stall_out = 0;
    repeat (5) @(posedge clk);
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      for (int h = 0; h < 16; h++) begin
        automatic time_word_t w = '0; w.tval = TIME_W'(h * 8 + i); w.chan = CHAN_W'(i);
        src[i].push_back(w);
      end
      begin time_word_t m = '0; m.eoe = 1; m.tval = TIME_W'(NEV); src[i].push_back(m); end
    end
    begin
      int c0, cfirst, clast, w0;
      c0 = 0; w0 = words_out;
      @(negedge clk);  // sources present the words at this edge
      while (!o_valid) begin @(posedge clk); c0++; #1; end
      cfirst = c0;
      chk(cfirst == 3, $sformatf("latency %0d cycles", cfirst));
      clast = 0;
      while (ev_out == NEV) begin @(posedge clk); clast++; end
      chk(words_out - w0 == 129, $sformatf("words %0d", words_out - w0));
      chk(clast <= 129 + 2, $sformatf("129 words took %0d cycles", clast));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
