// tb_dac_decoder: self-checking test of the DAC decoder, over all 1024
// codes: the number of unit cells switched on by the row and column lines
// must equal code[9:2], the lines must be thermometric (row_therm and
// col_therm contiguous from bit 0, one partial-row select) and the binary
// part must be code[1:0].
module tb_dac_decoder;
  logic [9:0] code;
  logic [15:0] row_therm, row_sel, col_therm;
  logic [1:0] bin;
  int checks = 0, failures = 0;

  dac_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 1024; c++) begin
      int on;
      code = 10'(c); #1;
      on = 0;
      for (int r = 0; r < 16; r++)
        for (int k = 0; k < 16; k++)
          if (row_therm[r] || (row_sel[r] && col_therm[k])) on++;
      checks++;
      if (on != c / 4 || bin != 2'(c % 4) || $countones(row_sel) != 1
          || ((row_therm + 16'd1) & row_therm) != 0 || ((col_therm + 16'd1) & col_therm) != 0) begin
        failures++; $display("FAIL: code %0d cells %0d", c, on);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
