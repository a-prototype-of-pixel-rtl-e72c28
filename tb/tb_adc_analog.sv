// tb_adc_analog: self-checking test of the ADC analog model. It integrates a
// known input for a known number of cycles and counts discharge cycles until
// the comparator fires; the count must be ceil(N * vin / 900 mV).
module tb_adc_analog;
  logic clk = 0, rst_int = 0, charge = 0, discharge = 0, comp;
  logic [19:0] vin_uv;
  int checks = 0, failures = 0;

  adc_analog dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      int nint, cnt; longint e;
      vin_uv = 20'($urandom % 900001);
      nint = 1 + $urandom % 300;
      rst_int = 1; @(posedge clk); #1; rst_int = 0;
      checks++;
      if (!comp) begin failures++; $display("FAIL: comp after reset"); end
      charge = 1; repeat (nint) @(posedge clk); #1; charge = 0;
      discharge = 1; cnt = 0;
      while (!comp) begin cnt++; @(posedge clk); #1; end
      discharge = 0;
      e = (longint'(nint) * vin_uv + 899999) / 900000;
      checks++;
      if (cnt != int'(e)) begin failures++; $display("FAIL: vin %0d n %0d count %0d exp %0d", vin_uv, nint, cnt, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
