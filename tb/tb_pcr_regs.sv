// tb_pcr_regs: self-checking test of a region's pixel configuration
// registers. Checks the reset value, that writes to other regions are ignored
// but passed on one cycle later, and that batch idx of the left/right half
// lands on pixels (row idx, column 0/1 or 2/3) with the low byte on the even
// column.
module tb_pcr_regs;
  import chipix_pkg::*;

  logic clk = 0, rst_n = 0;
  pcr_wr_t pcr_in, pcr_out;
  logic [7:0] pix_cfg [NPIX];
  logic [7:0] model [NPIX];
  int checks = 0, failures = 0;

  pcr_regs #(.PR_ADDR(4'd5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pcr_in = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int p = 0; p < 16; p++) begin
      model[p] = 8'h01;
      checks++;
      if (pix_cfg[p] !== 8'h01) begin failures++; $display("FAIL: reset value pixel %0d", p); end
    end
    for (int n = 0; n < 500; n++) begin
      pcr_wr_t w;
      w = '{we: ($urandom % 4 != 0), pr: ($urandom % 2) ? 4'd5 : 4'($urandom),
            right: 1'($urandom), idx: 2'($urandom), data: 16'($urandom)};
      pcr_in = w;
      @(posedge clk); #1;
      if (w.we && w.pr == 4'd5) begin
        model[w.idx*4 + (w.right ? 2 : 0)]     = w.data[7:0];
        model[w.idx*4 + (w.right ? 2 : 0) + 1] = w.data[15:8];
      end
      checks++;
      if (pcr_out !== w) begin failures++; $display("FAIL: pass-through"); end
      for (int p = 0; p < 16; p++) begin
        checks++;
        if (pix_cfg[p] !== model[p]) begin
          failures++; $display("FAIL: n=%0d pixel %0d %h exp %h", n, p, pix_cfg[p], model[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
