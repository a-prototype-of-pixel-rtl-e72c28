// tb_pixel_region: self-checking test of a whole 4x4 pixel region.
// Pulses of known length are put on chosen pixels; the testbench predicts
// the stored event (timestamp = pulse start + deadtime, hit map, first six
// ToTs in pixel order) and reads it out through the column-drain outputs
// after a trigger with the matching timestamp. Also covered: a trigger that
// matches nothing, a busy region before this one holding the bus, the
// triggerless mode, the binary-only mode and buffer overflow.
module tb_pixel_region;
  import chipix_pkg::*;

  logic clk = 0, rst_n = 0;
  hitmap_t fe_disc = 0, dbg_inj = 0;
  ts_t ts = 0, trig_ts = 0;
  logic trig = 0, busy_prev = 0, busy_out, overflow;
  eccr_t cfg;
  pr_data_t data_prev, data_out;
  pcr_wr_t pcr_in, pcr_out;
  logic [7:0] pix_cfg [NPIX];
  int checks = 0, failures = 0, n_ovf = 0;

  pixel_region #(.PR_ADDR(4'd9)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin ts <= ts + 1; if (overflow) n_ovf++; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Hit the pixels in mask; pixel p's pulse lasts len[p] cycles.
  task automatic hit(hitmap_t mask, int len [16], output ts_t t0);
    t0 = ts;
    for (int c = 0; c < 20; c++) begin
      for (int p = 0; p < 16; p++) fe_disc[p] = mask[p] && c < len[p];
      @(posedge clk); #1;
    end
    fe_disc = '0;
  endtask

  function automatic tots_t exp_tots(hitmap_t mask, int len [16], int dt);
    tots_t r = '0; int k = 0;
    for (int p = 0; p < 16; p++)
      if (mask[p]) begin
        if (k < 6) r[k*5 +: 5] = 5'(len[p] > dt ? dt : len[p]);
        k++;
      end
    return r;
  endfunction

  task automatic do_trigger(ts_t t);
    trig = 1; trig_ts = t; @(posedge clk); #1; trig = 0;
  endtask

  int len [16];
  ts_t t0;
  hitmap_t m;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '{latency: 10'd100, triggerless: 0, dt_high: 0, binary_only: 0,
            enc_bypass: 0, gray_bypass: 1, debug: 0, mc_mask: '0};
    pcr_in = '0; data_prev = pr_data_t'({$urandom, $urandom});
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;

    // 1. seven pixels hit together, triggered readout
    m = 16'b1000_0110_1010_1001;
    for (int p = 0; p < 16; p++) len[p] = 1 + (p % 9);
    hit(m, len, t0);
    check(!busy_out, "not busy before trigger");
    do_trigger(t0 + 10'(DT_LOW) + 1);            // no match
    check(!busy_out, "no busy for a non-matching trigger");
    do_trigger(t0 + 10'(DT_LOW));
    check(busy_out, "busy one cycle after the trigger");
    check(data_out.pr == 4'd9, "region address");
    check(data_out.ev.ts == t0 + 10'(DT_LOW), $sformatf("timestamp %0d exp %0d", data_out.ev.ts, t0 + 10'(DT_LOW)));
    check(data_out.ev.hitmap == m, "hit map");
    check(data_out.ev.tots == exp_tots(m, len, DT_LOW),
          $sformatf("tots %h exp %h", data_out.ev.tots, exp_tots(m, len, DT_LOW)));
    // 2. a busy region before this one owns the bus; the row waits
    busy_prev = 1; @(posedge clk); #1;
    check(busy_out && data_out == data_prev, "preceding region data passed on");
    busy_prev = 0; #1;
    check(data_out.ev.hitmap == m, "row still there after the other region");
    @(posedge clk); #1;
    check(!busy_out, "row freed after one read");

    // 3. two events at different times, one trigger each, high deadtime
    cfg.dt_high = 1;
    for (int p = 0; p < 16; p++) len[p] = 20;
    hit(16'h0001, len, t0);
    begin
      ts_t t1;
      hit(16'h8000, len, t1);
      do_trigger(t1 + 10'(DT_HIGH));
      check(busy_out && data_out.ev.hitmap == 16'h8000 && data_out.ev.tots[4:0] == 5'(DT_HIGH),
            "second event read first, ToT clipped to 16");
      @(posedge clk); #1;
      check(!busy_out, "only the triggered row");
      do_trigger(t0 + 10'(DT_HIGH));
      check(busy_out && data_out.ev.hitmap == 16'h0001, "first event on its trigger");
      @(posedge clk); #1;
    end
    cfg.dt_high = 0;

    // 4. triggerless: events come out without a trigger
    cfg.triggerless = 1;
    t0 = ts;
    for (int c = 0; c < 20 && !busy_out; c++) begin
      fe_disc = (c < 2) ? 16'h0420 : '0; @(posedge clk); #1;
    end
    fe_disc = '0;
    check(busy_out && data_out.ev.hitmap == 16'h0420 && data_out.ev.ts == t0 + 10'(DT_LOW),
          "triggerless event presented");
    @(posedge clk); #1;
    check(!busy_out, "triggerless event read once");

    // 5. binary-only mode: no ToT
    cfg.binary_only = 1;
    for (int p = 0; p < 16; p++) len[p] = 4;
    for (int c = 0; c < 20 && !busy_out; c++) begin
      fe_disc = (c < 4) ? 16'h0102 : '0; @(posedge clk); #1;
    end
    fe_disc = '0;
    check(busy_out && data_out.ev.hitmap == 16'h0102 && data_out.ev.tots == '0, "binary-only event");
    @(posedge clk); #1;
    cfg.binary_only = 0; cfg.triggerless = 0;

    // 6. overflow: 17 events without trigger, the 17th is lost
    n_ovf = 0;
    for (int e = 0; e < 17; e++) begin
      fe_disc = 16'h0010; @(posedge clk); #1; fe_disc = '0;
      repeat (8) @(posedge clk); #1;
    end
    check(n_ovf == 1, $sformatf("one event lost, got %0d", n_ovf));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
