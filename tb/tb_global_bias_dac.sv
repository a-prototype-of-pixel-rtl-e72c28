// tb_global_bias_dac: self-checking test of the bias DAC model over all
// codes: ioutp = code * unit current, ioutp + ioutn = 1023 units, and the
// output is monotonic with steps of exactly one unit (no missing codes).
module tb_global_bias_dac;
  logic [9:0] code;
  logic [15:0] i_lsb_na = 16'd25;
  logic [31:0] ioutp_na, ioutn_na;
  int checks = 0, failures = 0;

  global_bias_dac dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 1024; c++) begin
      code = 10'(c); #1;
      checks++;
      if (ioutp_na != 32'(c * 25) || ioutp_na + ioutn_na != 32'(1023 * 25)) begin
        failures++; $display("FAIL: code %0d p %0d n %0d", c, ioutp_na, ioutn_na);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
