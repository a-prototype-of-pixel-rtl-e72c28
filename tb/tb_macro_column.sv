// tb_macro_column: self-checking test of a macro column of 16 regions.
// Several regions are hit in the same cycle; after the matching trigger the
// column must deliver one word per cycle, region 0 first, each with the
// region's address and hit map, with col_busy high for exactly as many
// cycles as there are events. A configuration write addressed to one region
// must reach only that region's pixels.
module tb_macro_column;
  import chipix_pkg::*;

  logic clk = 0, rst_n = 0;
  hitmap_t fe_disc [16], dbg_inj [16];
  ts_t ts = 0, trig_ts = 0;
  logic trig = 0, col_busy;
  eccr_t cfg;
  pcr_wr_t pcr_in;
  pr_data_t col_data;
  logic [7:0] pix_cfg [16][16];
  logic [15:0] overflow;
  int checks = 0, failures = 0;

  macro_column dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ts <= ts + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int regs [$] = '{2, 5, 6, 11, 15};
  ts_t t0;

  initial begin
    cfg = '{latency: 10'd100, triggerless: 0, dt_high: 0, binary_only: 0,
            enc_bypass: 0, gray_bypass: 1, debug: 0, mc_mask: '0};
    pcr_in = '0;
    foreach (fe_disc[k]) begin fe_disc[k] = '0; dbg_inj[k] = '0; end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    t0 = ts;
    foreach (regs[i]) fe_disc[regs[i]] = hitmap_t'(1 << regs[i]) | 16'h8000;
    @(posedge clk); #1;
    foreach (fe_disc[k]) fe_disc[k] = '0;
    repeat (10) @(posedge clk); #1;
    trig = 1; trig_ts = t0 + 10'(DT_LOW); @(posedge clk); #1; trig = 0;
    foreach (regs[i]) begin
      check(col_busy, $sformatf("busy for word %0d", i));
      check(col_data.pr == 4'(regs[i]), $sformatf("word %0d from region %0d, exp %0d", i, col_data.pr, regs[i]));
      check(col_data.ev.hitmap == (hitmap_t'(1 << regs[i]) | 16'h8000), "hit map");
      check(col_data.ev.ts == t0 + 10'(DT_LOW), "timestamp");
      @(posedge clk); #1;
    end
    check(!col_busy, "busy ends after the last word");
    // configuration reaches region 7 only
    pcr_in = '{we: 1, pr: 4'd7, right: 1, idx: 2'd3, data: 16'hA55A};
    @(posedge clk); #1; pcr_in = '0;
    repeat (20) @(posedge clk); #1;
    check(pix_cfg[7][14] == 8'h5A && pix_cfg[7][15] == 8'hA5, "pcr written in region 7");
    check(pix_cfg[6][14] == 8'h01 && pix_cfg[8][15] == 8'h01, "other regions untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
