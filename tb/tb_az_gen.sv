// tb_az_gen: self-checking test of the autozero generator. For several
// settings the high and low times of az are measured over a few periods and
// compared with (width+1) and (period+1)*16 cycles.
module tb_az_gen;
  logic clk = 0, rst_n = 0, az;
  logic [7:0] period;
  logic [3:0] width;
  int checks = 0, failures = 0;

  az_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int set_p [4] = '{0, 3, 10, 255};
    int set_w [4] = '{0, 5, 15, 2};
    for (int s = 0; s < 4; s++) begin
      period = 8'(set_p[s]); width = 4'(set_w[s]);
      rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
      for (int k = 0; k < 3; k++) begin
        int hi, lo;
        hi = 0; lo = 0;
        while (az) begin hi++; @(posedge clk); #1; end
        while (!az) begin lo++; @(posedge clk); #1; end
        checks++;
        if (hi != set_w[s] + 1 || hi + lo != (set_p[s] + 1) * 16) begin
          failures++; $display("FAIL: setting %0d high %0d low %0d", s, hi, lo);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
