// tb_enc8b10b: self-checking test of the 8b10b encoder.
// Known code words from the standard tables (D.0.0, D.7.0, D.17.7, D.21.5,
// D.31.7, K28.5, K27.7, K28.1) are checked for negative running disparity
// and some also for positive, and
// over all 256 data bytes the code properties are checked: 4 to 6 ones, the
// running disparity follows the code's balance, no two bytes share a code,
// and a long random stream never has a run longer than 5 or a running digital
// sum outside +-1 (sampled at code boundaries).
module tb_enc8b10b;
  logic [7:0] din;
  logic k, rd_in, rd_out;
  logic [9:0] code;
  int checks = 0, failures = 0;

  enc8b10b dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic known(logic [7:0] d, logic kk, logic [9:0] neg);
    din = d; k = kk; rd_in = 0; #1;
    check(code == neg, $sformatf("%h k=%b RD- %b exp %b", d, kk, code, neg));
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] seen [2][256];
    known(8'h00, 0, 10'b1001110100);
    known(8'h07, 0, 10'b1110001011);
    known(8'hF1, 0, 10'b1000110111);
    known(8'hB5, 0, 10'b1010101010);
    known(8'hFF, 0, 10'b1010110001);
    known(8'hBC, 1, 10'b0011111010);
    known(8'hFB, 1, 10'b1101101000);
    known(8'h3C, 1, 10'b0011111001);
    din = 8'hBC; k = 1; rd_in = 1; #1;
    check(code == 10'b1100000101 && rd_out == 0, "K28.5 RD+");
    din = 8'hFB; k = 1; rd_in = 1; #1;
    check(code == 10'b0010010111, "K27.7 RD+");
    din = 8'h00; k = 0; rd_in = 1; #1;
    check(code == 10'b0110001011, "D.0.0 RD+");
    k = 0;
    for (int r = 0; r < 2; r++)
      for (int d = 0; d < 256; d++) begin
        din = 8'(d); rd_in = 1'(r); #1;
        seen[r][d] = code;
        check($countones(code) inside {4, 5, 6}, $sformatf("ones %h", d));
        check(rd_out == (rd_in ^ ($countones(code) != 5)), "rd_out");
        if ($countones(code) == 6) check(r == 0, "+2 code only from RD-");
        if ($countones(code) == 4) check(r == 1, "-2 code only from RD+");
      end
    for (int r = 0; r < 2; r++)
      for (int a = 0; a < 256; a++)
        for (int b = a + 1; b < 256; b++)
          if (seen[r][a] == seen[r][b]) begin
            failures++; $display("FAIL: %h and %h share a code", a, b);
          end
    checks++;
    // random stream
    begin
      int run = 0, rds = -1;
      logic last = 0, rd = 0;
      for (int n = 0; n < 20000; n++) begin
        din = 8'($urandom); k = 0; rd_in = rd; #1;
        for (int i = 9; i >= 0; i--) begin
          if (code[i] == last) run++; else run = 1;
          last = code[i];
          if (run > 5) begin failures++; $display("FAIL: run of %0d", run); end
          rds += code[i] ? 1 : -1;
        end
        checks++;
        if (!(rds inside {-1, 1}) || (rds == 1) != rd_out) begin
          failures++; $display("FAIL: running sum %0d", rds);
        end
        rd = rd_out;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
