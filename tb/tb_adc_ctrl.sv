// tb_adc_ctrl: self-checking test of the dual-slope ADC control logic.
// The testbench models the integrator itself (integer charge, +vin per
// integration cycle, -900000 per discharge cycle) and checks, for a set of
// input voltages, that the integration phase lasts exactly 4096 cycles, that
// the code equals ceil(4096 * vin / 900 mV) clipped to 4095, and that the
// conversion takes 4096 + code + 2 cycles from start to done.
module tb_adc_ctrl;
  logic clk = 0, rst_n = 0, start = 0, comp;
  logic rst_int, charge, discharge, done, busy;
  logic [11:0] code;
  int checks = 0, failures = 0;
  longint q = 0;
  int vin = 0;

  adc_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_int) q <= 0;
    else if (charge) q <= q + vin;
    else if (discharge) q <= q - 900000;
  end
  assign comp = (q <= 0);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vins [8] = '{0, 1000, 219727, 450000, 600123, 899000, 899999, 900000};
    repeat (2) @(posedge clk); #1 rst_n = 1;
    foreach (vins[i]) begin
      int ncharge, cycles; longint exp_code;
      ncharge = 0; cycles = 0;
      vin = vins[i];
      start = 1; @(posedge clk); #1; start = 0;
      while (!done) begin
        if (charge) ncharge++;
        cycles++;
        @(posedge clk); #1;
      end
      exp_code = (4096 * longint'(vin) + 899999) / 900000;
      if (exp_code > 4095) exp_code = 4095;
      checks += 3;
      if (ncharge != 4096) begin failures++; $display("FAIL: integration %0d cycles", ncharge); end
      if (code != 12'(exp_code)) begin failures++; $display("FAIL: vin %0d code %0d exp %0d", vin, code, exp_code); end
      if (cycles != 4096 + int'(exp_code) + 2) begin failures++; $display("FAIL: %0d cycles", cycles); end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
