// tb_hit_decoder: self-checking test of the link word decoder.
// Plays a scripted link stream covering normal events, idle words and
// every repaired protocol fault (stray hit, stray trailer, missing trailer,
// link loss inside an event, wrong trailer number, FIFO full with markers
// held back until it drains) and
// compares the words written to the FIFO and the error and overflow
// counters with the values expected from the protocol rules.
module tb_hit_decoder;
  import toptrig_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, link_lost = 0, fifo_full = 0;
  link_word_t in_word = '0;
  logic fifo_wr, in_event;
  time_word_t fifo_data;
  logic [15:0] err_cnt, ovf_cnt;
  int checks = 0, failures = 0;
  time_word_t got [$];
  time_word_t exp [$];
  always #5 clk = ~clk;

  hit_decoder dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && fifo_wr && !fifo_full) got.push_back(fifo_data);

  task automatic send(link_type_e k, int unsigned ch, int unsigned t);
    @(negedge clk);
    in_valid = 1; in_word = '0;
    in_word.kind = k; in_word.chan = CHAN_W'(ch); in_word.tval = TIME_W'(t);
    @(negedge clk);
    in_valid = 0;
  endtask

  function automatic time_word_t hw(int unsigned ch, int unsigned t);
    time_word_t w = '0; w.tval = TIME_W'(t); w.chan = CHAN_W'(ch); return w;
  endfunction
  function automatic time_word_t eoe(int unsigned e);
    time_word_t w = '0; w.eoe = 1; w.tval = TIME_W'(e); return w;
  endfunction

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    send(LW_IDLE, 0, 0);
    send(LW_HIT, 1, 1);                       // stray hit: error
    send(LW_HEADER, 0, 5);
    chk(in_event, "in event after header");
    send(LW_HIT, 7, 3);   exp.push_back(hw(7, 3));
    send(LW_IDLE, 0, 0);
    send(LW_HIT, 2, 9);   exp.push_back(hw(2, 9));
    send(LW_TRAILER, 0, 5); exp.push_back(eoe(5));
    chk(!in_event, "out of event after trailer");
    send(LW_TRAILER, 0, 5);                   // stray trailer: error
    send(LW_HEADER, 0, 6);
    send(LW_HIT, 511, 1); exp.push_back(hw(511, 1));
    send(LW_HEADER, 0, 7); exp.push_back(eoe(6));   // missing trailer: error
    send(LW_HIT, 3, 4);   exp.push_back(hw(3, 4));
    @(negedge clk); link_lost = 1; @(negedge clk); link_lost = 0;
    exp.push_back(eoe(7));                    // link lost: error
    chk(!in_event, "event closed by link loss");
    send(LW_HEADER, 0, 8);
    fifo_full = 1;
    send(LW_HIT, 4, 20);                      // FIFO full: dropped
    send(LW_TRAILER, 0, 9); exp.push_back(eoe(8));  // number mismatch: error
    send(LW_HEADER, 0, 10);                   // marker 8 still waits
    send(LW_HIT, 4, 21);                      // dropped behind the waiting marker
    send(LW_TRAILER, 0, 10); exp.push_back(eoe(10));
    chk(got.size() == exp.size() - 2, "markers held while FIFO full");
    @(negedge clk); fifo_full = 0;
    send(LW_HEADER, 0, 11);
    send(LW_HIT, 4, 22);  exp.push_back(hw(4, 22));  // queue drained by now
    send(LW_HIT, 6, 23);  exp.push_back(hw(6, 23));
    send(LW_TRAILER, 0, 11); exp.push_back(eoe(11));
    send(LW_HEADER, 0, 65535);
    send(LW_HIT, 5, 65535); exp.push_back(hw(5, 65535));
    send(LW_TRAILER, 0, 65535); exp.push_back(eoe(65535));
    repeat (4) @(posedge clk);
    chk(got.size() == exp.size(), $sformatf("words %0d vs %0d", got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      chk(got[i] == exp[i], $sformatf("word %0d: %h vs %h", i, got[i], exp[i]));
    chk(err_cnt == 5, $sformatf("err_cnt %0d", err_cnt));
    chk(ovf_cnt == 2, $sformatf("ovf_cnt %0d", ovf_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
