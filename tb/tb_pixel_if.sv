// tb_pixel_if: self-checking test of the pixel interface.
// Drives discriminator pulses of known length and checks the cycle at which
// the hit flag appears (the deadtime, 6 or 16 cycles), the ToT (pulse length,
// clipped to the deadtime), the freeze during the deadtime, re-arming after
// the pulse ends, binary-only mode, debug injection and the enable bit.
module tb_pixel_if;
  import chipix_pkg::*;

  logic clk = 0, rst_n = 0;
  logic fe_disc = 0, dbg_inj = 0, debug = 0, enable = 1, dt_high = 0, binary_only = 0;
  logic hit_flag;
  tot_t tot;
  int checks = 0, failures = 0;

  pixel_if dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Pulse of len cycles starting now on the chosen input; returns the number
  // of cycles from the pulse start to the hit flag and the ToT seen then.
  task automatic pulse(int len, bit use_dbg, output int lat, output int t);
    lat = -1; t = -1;
    for (int c = 0; c < 40; c++) begin
      if (use_dbg) dbg_inj = (c < len); else fe_disc = (c < len);
      @(posedge clk); #1;
      if (hit_flag && lat < 0) begin lat = c + 1; t = int'(tot); end
    end
    fe_disc = 0; dbg_inj = 0;
    repeat (3) @(posedge clk); #1;
  endtask

  int lat, t;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    // low deadtime: the flag is up in the DT-th cycle from the start of the pulse
    pulse(3, 0, lat, t);
    check(lat == 6, $sformatf("dt6 latency %0d", lat));
    check(t == 3, $sformatf("dt6 tot %0d", t));
    pulse(10, 0, lat, t);
    check(t == 6, $sformatf("dt6 clipped tot %0d", t));
    dt_high = 1;
    pulse(9, 0, lat, t);
    check(lat == 16, $sformatf("dt16 latency %0d", lat));
    check(t == 9, $sformatf("dt16 tot %0d", t));
    pulse(1, 0, lat, t);
    check(t == 1, $sformatf("dt16 tot1 %0d", t));
    // binary-only: minimal deadtime, no ToT
    binary_only = 1;
    pulse(4, 0, lat, t);
    check(lat == 1, $sformatf("binary latency %0d", lat));
    check(t == 0, "binary tot 0");
    binary_only = 0; dt_high = 0;
    // debug mode uses the injection input only
    debug = 1;
    pulse(2, 0, lat, t);
    check(lat < 0, "disc ignored in debug mode");
    pulse(2, 1, lat, t);
    check(lat == 6 && t == 2, $sformatf("injection latency %0d tot %0d", lat, t));
    debug = 0;
    // masked pixel
    enable = 0;
    pulse(2, 0, lat, t);
    check(lat < 0, "disabled pixel gives no hit");
    enable = 1;
    // frozen during deadtime: second pulse inside the window is not a hit
    fe_disc = 1; @(posedge clk); #1; fe_disc = 0; @(posedge clk); #1;
    fe_disc = 1; @(posedge clk); #1; fe_disc = 0;
    begin
      int flags = 0;
      repeat (30) begin @(posedge clk); #1; if (hit_flag) flags++; end
      check(flags == 1, $sformatf("one hit for two pulses in deadtime, got %0d", flags));
    end
    // flag lasts exactly one cycle
    begin
      int flags = 0;
      fe_disc = 1; @(posedge clk); #1; fe_disc = 0;
      repeat (20) begin @(posedge clk); #1; if (hit_flag) flags++; end
      check(flags == 1, "flag is one cycle long");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
