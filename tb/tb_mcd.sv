// tb_mcd: self-checking test of the macro column drainer.
// The testbench plays the macro column: on each trigger from the drainer it
// answers, one cycle later, with a random number (0 to 3) of busy cycles
// carrying numbered words. Checked: every queued trigger is sent once, in
// order, with its timestamp; one trigger at a time (the next only after busy
// falls); every word becomes a packet with the column address, in order; the
// trigger queue overflows when flooded; triggerless mode stores without
// triggers; a masked column stores nothing.
module tb_mcd;
  import chipix_pkg::*;

  logic clk = 0, rst_n = 0;
  logic trig_in = 0, triggerless = 0, masked = 0, trig_out, col_busy = 0;
  ts_t trig_ts_in = 0, trig_ts_out;
  pr_data_t col_data;
  packet_t pkt;
  logic pkt_valid, pkt_ready = 1, trig_overflow, data_overflow;
  int checks = 0, failures = 0, n_tovf = 0;

  mcd #(.MC_ADDR(4'd11)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  ts_t     sent_ts [$];
  int      words_left = 0;
  int      next_word = 0, next_expect = 0;
  bit      busy_seen_since_trig = 1;

  // column model and scoreboard
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (trig_out) begin
        ts_t e;
        check(sent_ts.size() > 0, "trigger sent with none queued");
        if (sent_ts.size() > 0) begin
          e = sent_ts.pop_front();
          check(trig_ts_out == e, $sformatf("trigger ts %0d exp %0d", trig_ts_out, e));
        end
        check(words_left == 0 && !col_busy, "trigger while column busy");
        words_left = $urandom % 4;
      end
      if (pkt_valid && pkt_ready) ;
    end
  end

  always @(negedge clk) begin
    if (words_left > 0 && !trig_out) begin
      col_busy = 1;
      col_data = '{pr: 4'(next_word), ev: '{ts: 10'(next_word), hitmap: 16'(next_word * 7), tots: 30'(next_word)}};
      next_word++; words_left--;
    end else begin
      col_busy = 0;
    end
  end

  always @(posedge clk) if (rst_n && pkt_valid && pkt_ready) begin
    check(pkt.mc == 4'd11 && pkt.pr == 4'(next_expect) && pkt.ts == 10'(next_expect)
          && pkt.hitmap == 16'(next_expect * 7), $sformatf("packet %0d", next_expect));
    next_expect++;
  end
  always @(posedge clk) if (trig_overflow) n_tovf++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #2 rst_n = 1;
    // random triggers, packets drained with random back-pressure
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk); #2;
      trig_in = ($urandom % 8 == 0);
      trig_ts_in = ts_t'($urandom);
      pkt_ready = ($urandom % 2);
      if (trig_in && !(dut.u_tq.full)) sent_ts.push_back(trig_ts_in);
    end
    trig_in = 0; pkt_ready = 1;
    repeat (200) @(posedge clk); #2;
    check(sent_ts.size() == 0, "all triggers sent");
    check(next_expect == next_word && next_word > 100, $sformatf("all %0d words delivered (%0d)", next_word, next_expect));
    // flood the trigger queue
    n_tovf = 0;
    repeat (30) begin
      @(posedge clk); #2; trig_in = 1; trig_ts_in = 0;
      if (!(dut.u_tq.full)) sent_ts.push_back(trig_ts_in);
    end
    @(posedge clk); #2; trig_in = 0;
    check(n_tovf > 0, "trigger buffer overflow");
    repeat (300) @(posedge clk); #2;
    check(sent_ts.size() == 0, "flooded triggers all sent");
    // triggerless: words stored without trigger
    triggerless = 1;
    repeat (3) @(posedge clk); #2;
    begin
      int n_before;
      n_before = next_expect;
      for (int i = 0; i < 5; i++) begin
        @(posedge clk); #2; words_left = 1;
      end
      repeat (10) @(posedge clk); #2;
      check(next_expect == n_before + 5, "triggerless words stored");
      check(!trig_out, "no trigger in triggerless mode");
      masked = 1;
      @(posedge clk); #2; words_left = 3;
      repeat (10) @(posedge clk); #2;
      check(next_expect == n_before + 5, "masked column stores nothing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
