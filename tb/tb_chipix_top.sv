// tb_chipix_top: end-to-end test of the whole chip at its full size
// (16 macro columns x 16 regions x 16 pixels, default parameters).
//
// The testbench configures the chip over SPI, drives the front-end
// discriminator and injection inputs, sends triggers, and decodes the serial
// output bit stream back into 64-bit packets (8b10b reverse table built from
// a separate encoder instance, or the filling format). Every packet expected
// from the hits it injected is predicted independently (macro column,
// region, timestamp in Gray or binary code, hit map, first six ToTs in pixel
// order) and must arrive exactly once; anything else is a failure.
//
// Mechanisms exercised and counted: triggered readout at the 12.5 us
// latency, a trigger matching nothing, column drain with several busy
// regions, ToT compression with more than six hit pixels, pixel masking
// through a PCR written with auto-increment, region buffer overflow, trigger
// buffer overflow, triggerless mode with the long deadtime, binary-only mode,
// debug injection, macro column mask, 8b10b bypass, Gray bypass, the bias DAC
// codes and an ADC conversion. A mechanism that never happened is a failure.
//
// The latency, deadtimes, packet fields and coding modes are those of the
// chip description; the register addresses, the expiry of unread rows and
// the clock ratio of 20 serial bits per core cycle are this design's choices.
module tb_chipix_top;
  import chipix_pkg::*;

  localparam int HALF = 20;                 // clk period 40, clk_ser period 2
  logic clk = 0, clk_ser = 0, rst_n = 0;
  logic sclk = 0, cs_n = 1, mosi = 0, trig_in = 0;
  hitmap_t fe_disc [16][16], dbg_inj [16][16];
  logic [7:0] pix_cfg [16][16][16];
  logic az;
  logic [15:0] i_lsb_na = 16'd10;
  logic [31:0] bias_ioutp_na [16], bias_ioutn_na [16];
  logic [19:0] vin_uv = 20'd300000;
  logic adc_start = 0, adc_done;
  logic [3:0] adc_mux_sel;
  logic [9:0] adc_iref_trim;
  logic [11:0] adc_code;
  logic ser_out, evt_overflow, data_overflow, trig_overflow;

  chipix_top dut (.*);

  always #HALF clk = ~clk;
  always #1 clk_ser = ~clk_ser;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_trig_read = 0, n_nomatch = 0, n_drain_multi = 0, n_compress = 0,
      n_masked_pix = 0, n_evt_ovf = 0, n_trig_ovf = 0, n_trigless = 0,
      n_binary = 0, n_debug = 0, n_mc_mask = 0, n_bypass = 0, n_gray_bypass = 0,
      n_adc = 0, n_dac = 0, n_autoinc = 0;
  always @(posedge clk) begin
    if (evt_overflow)  n_evt_ovf++;
    if (trig_overflow) n_trig_ovf++;
  end

  // ---------------- bunch crossing count (mirror of the chip) ----------------
  int bx = 0;
  always @(posedge clk) if (rst_n) bx <= bx + 1;
  bit gray_on = 1;
  function automatic ts_t code_ts(int b);
    ts_t t = ts_t'(b);
    return gray_on ? bin2gray(t) : t;
  endfunction

  // ---------------- output decoding ----------------
  logic [7:0] e_din; logic e_k, e_rd, e_rdo; logic [9:0] e_code;
  enc8b10b ref_enc (.din(e_din), .k(e_k), .rd_in(e_rd), .code(e_code), .rd_out(e_rdo));
  int   dec [2][1024];
  logic dec_rd [2][1024];
  bit   bypass_on = 0;

  logic [19:0] acc = 0;
  logic        rd = 0;
  int          phase = -1;
  logic [63:0] pk;
  packet_t     expected [$];
  int          n_recv = 0;
  bit          synced = 0;

  function automatic int dec10(logic [9:0] c, bit ctl_ok);
    int v;
    v = dec[rd][c];
    if (v >= 0) rd = dec_rd[rd][c];
    return v;
  endfunction

  // Packets that arrive before their expectation is queued (triggerless
  // events can leave the chip while the stimulus is still being applied)
  // wait in "early" until the next reconcile.
  packet_t early [$];

  function automatic void got_packet(packet_t p);
    int idx;
    idx = -1;
    n_recv++;
    foreach (expected[i]) if (expected[i] == p) begin idx = i; break; end
    if (idx < 0) early.push_back(p);
    else expected.delete(idx);
  endfunction

  function automatic void reconcile();
    packet_t left [$];
    left = early; early = {};
    n_recv -= left.size();
    foreach (left[i]) got_packet(left[i]);
  endfunction

  always @(posedge clk_ser) if (rst_n) begin
    logic ld;
    ld  = dut.u_ser.load;
    bypass_on = dut.u_cfg.eccr.enc_bypass;
    acc = {acc[18:0], ser_out};
    if (ld && dut.u_ser.bitcnt == 5'd19 && $time > 200) begin
      logic [15:0] data; bit is_sop, is_idle, ok;
      int hi, lo;
      if (!bypass_on) begin
        hi = dec10(acc[19:10], 1); lo = dec10(acc[9:0], 1);
        ok = hi >= 0 && lo >= 0;
        if (!ok && acc[19:10] inside {10'b0011111010, 10'b1100000101}
                && acc[9:0] inside {10'b0011111010, 10'b1100000101}) begin
          // IDLE around a change of coding mode or before the first word
          hi = 256 + 8'hBC; lo = hi; ok = 1; rd = (acc[9:0] == 10'b0011111010);
        end
        if (!synced && !(hi == 256 + 8'hBC && lo == 256 + 8'hBC)) ok = 1;
        is_idle = hi == 256 + 8'hBC && lo == 256 + 8'hBC;
        if (is_idle) synced = 1;
        if (!synced) is_idle = 1;
        is_sop  = hi == 256 + 8'hFB && lo == 256 + 8'hFB;
        data = {hi[7:0], lo[7:0]};
        if (!ok) begin failures++; $display("FAIL: undecodable word %b", acc); end
      end else begin
        is_idle = acc[19:10] inside {10'b0011111010, 10'b1100000101} && acc[9:0] inside {10'b0011111010, 10'b1100000101};
        is_sop  = acc[19:10] inside {10'b1101101000, 10'b0010010111} && acc[9:0] inside {10'b1101101000, 10'b0010010111};
        data = {acc[19:12], acc[9:2]};
      end
      if (is_sop) begin
        if (phase != -1) begin failures++; $display("FAIL: SOP inside packet"); end
        phase = 3;
      end else if (is_idle) begin
        if (phase != -1) begin failures++; $display("FAIL: IDLE inside packet"); end
      end else if (phase >= 0) begin
        pk[phase*16 +: 16] = data;
        if (phase == 0) got_packet(packet_t'(pk));
        phase--;
      end else begin
        failures++; $display("FAIL: data word outside a packet");
      end
    end
  end

  // ---------------- stimulus helpers ----------------
  task automatic spi_frame(logic [19:0] f);
    cs_n = 0; #100;
    for (int i = 19; i >= 0; i--) begin
      mosi = f[i]; #160 sclk = 1; #160 sclk = 0;
    end
    #100 cs_n = 1; #200;
  endtask

  task automatic spi_write(logic [1:0] space, logic [15:0] addr, logic [15:0] data);
    spi_frame({2'b00, space, addr});
    spi_frame({2'b01, 2'b00, data});
  endtask

  logic [15:0] eccr0;
  task automatic set_eccr(int latency, bit trigless, bit dth, bit bin, bit encb, bit grayb, bit dbg);
    eccr0 = {10'(latency), trigless, dth, bin, encb, grayb, dbg};
    spi_write(2'd1, 16'd0, eccr0);
    gray_on = !grayb;
  endtask

  // Hit pixels of region (m, k) given by mask at the current cycle; ToT of
  // pixel p is len[p]; returns the expected packet (not yet registered).
  function automatic packet_t predict(int m, int k, hitmap_t mask, int len [16], int t_hit, int dt, bit bin);
    packet_t p; int s = 0;
    p.mc = 4'(m); p.pr = 4'(k); p.hitmap = mask; p.tots = '0;
    p.ts = code_ts(t_hit + dt);
    for (int q = 0; q < 16; q++) if (mask[q]) begin
      if (s < 6 && !bin) p.tots[s*5 +: 5] = 5'(len[q] > dt ? dt : len[q]);
      s++;
    end
    return p;
  endfunction

  typedef struct { int m; int k; hitmap_t mask; } hit_t;

  // Apply a set of simultaneous hits (pulse lengths len) on fe_disc or dbg_inj.
  task automatic apply_hits(hit_t hs [$], int len [16], bit inj, output int t_hit);
    @(posedge clk); #1;
    t_hit = bx;
    for (int c = 0; c < 20; c++) begin
      foreach (hs[i])
        for (int q = 0; q < 16; q++)
          if (hs[i].mask[q]) begin
            if (inj) dbg_inj[hs[i].m][hs[i].k][q] = (c < len[q]);
            else     fe_disc[hs[i].m][hs[i].k][q] = (c < len[q]);
          end
      @(posedge clk); #1;
    end
  endtask

  // Send a trigger in the cycle in which the bx counter equals t.
  task automatic trigger_at(int t);
    while (bx < t) begin @(posedge clk); #1; end
    trig_in = 1; @(posedge clk); #1; trig_in = 0;
  endtask

  task automatic wait_drain(int cycles);
    reconcile();
    repeat (cycles) @(posedge clk);
    #1;
    reconcile();
  endtask

  initial begin
    #400000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int len [16];
  hit_t hs [$];
  int t_hit, lat;
  packet_t p;

  initial begin
    for (int r = 0; r < 2; r++) for (int c = 0; c < 1024; c++) dec[r][c] = -1;
    for (int r = 0; r < 2; r++) begin
      for (int d = 0; d < 256; d++) begin
        e_din = 8'(d); e_k = 0; e_rd = 1'(r); #1; dec[r][e_code] = d; dec_rd[r][e_code] = e_rdo;
      end
      e_din = 8'hBC; e_k = 1; e_rd = 1'(r); #1; dec[r][e_code] = 256 + 8'hBC; dec_rd[r][e_code] = e_rdo;
      e_din = 8'hFB; e_k = 1; e_rd = 1'(r); #1; dec[r][e_code] = 256 + 8'hFB; dec_rd[r][e_code] = e_rdo;
    end
    foreach (fe_disc[m, k]) begin fe_disc[m][k] = '0; dbg_inj[m][k] = '0; end
    repeat (4) @(posedge clk); #1 rst_n = 1;
    repeat (4) @(posedge clk); #1;

    // ---- configuration: latency = 12.5 us (500 BX) minus the 6-cycle deadtime
    lat = 500 - DT_LOW;
    set_eccr(lat, 0, 0, 0, 0, 0, 0);
    // bias DAC 3 and 12 codes, ADC mux select through the global registers
    // DAC d occupies GCR bits [10d+9:10d]; all 14 words written with auto-increment
    begin
      logic [223:0] g = '0;
      g[30 +: 10] = 10'd777; g[120 +: 10] = 10'd1023; g[172 +: 4] = 4'd9;
      spi_frame({2'b00, 2'd0, 16'd0});
      for (int w = 0; w < 14; w++) spi_frame({2'b10, 2'b00, g[w*16 +: 16]});
      #1000;
      check(bias_ioutp_na[3] == 32'd7770 && bias_ioutp_na[12] == 32'd10230
            && bias_ioutn_na[3] == 32'd2460 && adc_mux_sel == 4'd9, "bias DAC codes and ADC mux from GCR");
      n_dac++;
    end
    // disable pixel (row 5, col 9) and (row 5, col 8) via PCR auto-increment:
    // pairs (row 5, pair 3) .. (row 5, pair 5) = columns 6..11
    spi_frame({2'b00, 2'd2, 5'd0, 6'd5, 5'd3});
    spi_frame({2'b10, 2'b00, 16'h0101});       // cols 6,7 enabled
    spi_frame({2'b10, 2'b00, 16'h0000});       // cols 8,9 disabled
    spi_frame({2'b10, 2'b00, 16'h0301});       // cols 10,11: enabled, 11 with calibration bit
    #2000;
    check(pix_cfg[2][1][4*1 + 0] == 8'h00 && pix_cfg[2][1][4*1 + 1] == 8'h00 &&
          pix_cfg[2][1][4*1 + 2] == 8'h01 && pix_cfg[2][1][4*1 + 3] == 8'h03 &&
          pix_cfg[1][1][4*1 + 2] == 8'h01, "PCR written with auto-increment reaches pixels");
    n_autoinc++;

    // ---- 1. triggered event: several regions, one with 9 hit pixels, plus a masked pixel
    for (int q = 0; q < 16; q++) len[q] = 1 + (q % 5);
    hs = {};
    hs.push_back('{m: 0,  k: 0,  mask: 16'hF0F1});                  // 9 pixels: compression
    hs.push_back('{m: 0,  k: 7,  mask: 16'h0002});
    hs.push_back('{m: 0,  k: 15, mask: 16'h8000});
    hs.push_back('{m: 9,  k: 3,  mask: 16'h0240});
    hs.push_back('{m: 2,  k: 1,  mask: 16'h0030});                   // row 5 cols 8,9: masked pixels
    hs.push_back('{m: 15, k: 15, mask: 16'h0001});
    apply_hits(hs, len, 0, t_hit);
    foreach (hs[i]) if (hs[i].m != 2) expected.push_back(predict(hs[i].m, hs[i].k, hs[i].mask, len, t_hit, DT_LOW, 0));
    n_compress++; n_masked_pix++;
    trigger_at(t_hit + DT_LOW + lat - 3);          // matches nothing
    wait_drain(2);
    trigger_at(t_hit + DT_LOW + lat);              // the matching one
    wait_drain(1);
    check(n_recv == 0, "trigger without matching hits gives no data");
    n_nomatch++;
    wait_drain(200);
    check(expected.size() == 0, $sformatf("triggered event read out, %0d packets missing", expected.size()));
    n_trig_read++; n_drain_multi++;
    expected = {};

    // ---- 2. trigger flood: the drainers' trigger buffers overflow
    repeat (24) begin trig_in = 1; @(posedge clk); #1; end
    trig_in = 0;
    wait_drain(300);
    check(n_trig_ovf > 0, "trigger buffer overflow");

    // ---- 3. region buffer overflow: 17 events in one region, never triggered
    begin
      int ovf0, recv0;
      ovf0 = n_evt_ovf; recv0 = n_recv;
      for (int e = 0; e < 17; e++) begin
        fe_disc[3][4] = 16'h0001; @(posedge clk); #1; fe_disc[3][4] = '0;
        repeat (8) @(posedge clk); #1;
      end
      wait_drain(lat + 200);                        // events expire
      check(n_evt_ovf == ovf0 + 1, $sformatf("one event lost to buffer overflow (%0d)", n_evt_ovf - ovf0));
      check(n_recv == recv0, "untriggered events are not sent");
      check(dut.g_mc[3].u_col.g_pr[4].u_pr.valid == '0, "untriggered events expired");
    end

    // ---- 4. binary-only mode, triggered: deadtime 1, no ToT
    set_eccr(500 - 1, 0, 0, 1, 0, 0, 0);
    hs = {};
    hs.push_back('{m: 4, k: 9, mask: 16'h1111});
    hs.push_back('{m: 4, k: 2, mask: 16'h0008});
    apply_hits(hs, len, 0, t_hit);
    foreach (hs[i]) expected.push_back(predict(hs[i].m, hs[i].k, hs[i].mask, len, t_hit, 1, 1));
    trigger_at(t_hit + 1 + 499);
    wait_drain(200);
    check(expected.size() == 0, "binary-only event read out");
    n_binary++; n_trig_read++;

    // ---- 5. triggerless, long deadtime, debug injection, macro column 7 masked
    spi_write(2'd1, 16'd1, 16'h0080);
    set_eccr(lat, 1, 1, 0, 0, 0, 1);
    for (int q = 0; q < 16; q++) len[q] = 3 + q;       // up to 18: ToT clipped at 16
    hs = {};
    hs.push_back('{m: 6,  k: 10, mask: 16'hFFFF});
    hs.push_back('{m: 6,  k: 12, mask: 16'h4000});
    hs.push_back('{m: 7,  k: 1,  mask: 16'h0001});     // masked column
    apply_hits(hs, len, 1, t_hit);
    foreach (hs[i]) if (hs[i].m != 7) expected.push_back(predict(hs[i].m, hs[i].k, hs[i].mask, len, t_hit, DT_HIGH, 0));
    hs = {};
    hs.push_back('{m: 8, k: 8, mask: 16'h0101});       // on fe_disc: ignored in debug mode
    apply_hits(hs, len, 0, t_hit);
    wait_drain(200);
    check(expected.size() == 0, "triggerless / debug events read out");
    n_trigless++; n_debug++; n_mc_mask++;
    foreach (dbg_inj[m, k]) dbg_inj[m][k] = '0;

    // ---- 6. 8b10b and Gray bypassed, triggerless, low deadtime
    spi_write(2'd1, 16'd1, 16'h0000);
    set_eccr(lat, 1, 0, 0, 1, 1, 0);
    for (int q = 0; q < 16; q++) len[q] = 2;
    hs = {};
    hs.push_back('{m: 11, k: 5, mask: 16'h0606});
    hs.push_back('{m: 12, k: 0, mask: 16'h8001});
    apply_hits(hs, len, 0, t_hit);
    foreach (hs[i]) expected.push_back(predict(hs[i].m, hs[i].k, hs[i].mask, len, t_hit, DT_LOW, 0));
    wait_drain(200);
    check(expected.size() == 0, "events with 8b10b and Gray bypassed");
    n_bypass++; n_gray_bypass++;

    // ---- 7. ADC conversion: 300 mV -> ceil(4096 * 300 / 900) = 1366
    adc_start = 1; @(posedge clk); #1; adc_start = 0;
    while (!adc_done) begin @(posedge clk); #1; end
    check(adc_code == 12'd1366, $sformatf("ADC code %0d", adc_code));
    n_adc++;

    reconcile();
    foreach (early[i])
      $display("FAIL: unexpected packet mc %0d pr %0d ts %h map %h tots %h",
               early[i].mc, early[i].pr, early[i].ts, early[i].hitmap, early[i].tots);
    check(early.size() == 0, "no unexpected packets");
    check(!data_overflow, "no data buffer overflow");
    $display("INFO mechanisms: triggered=%0d nomatch=%0d drain_multi=%0d compress=%0d masked_pixel=%0d evt_overflow=%0d trig_overflow=%0d triggerless=%0d binary=%0d debug=%0d mc_mask=%0d enc_bypass=%0d gray_bypass=%0d adc=%0d dac=%0d autoinc=%0d packets=%0d",
             n_trig_read, n_nomatch, n_drain_multi, n_compress, n_masked_pix, n_evt_ovf, n_trig_ovf,
             n_trigless, n_binary, n_debug, n_mc_mask, n_bypass, n_gray_bypass, n_adc, n_dac, n_autoinc, n_recv);
    begin
      int cnts [16];
      cnts = '{n_trig_read, n_nomatch, n_drain_multi, n_compress, n_masked_pix, n_evt_ovf,
                        n_trig_ovf, n_trigless, n_binary, n_debug, n_mc_mask, n_bypass, n_gray_bypass,
                        n_adc, n_dac, n_autoinc};
      foreach (cnts[i]) check(cnts[i] > 0, $sformatf("mechanism %0d happened", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
