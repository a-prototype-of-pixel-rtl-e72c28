// tb_shared_buffer: self-checking test of the region's shared buffer.
// A reference model (valid bits and row contents) is kept in the testbench;
// random writes and random clears are applied and every cycle the valid
// bits, the written row, the row contents, full and overflow are compared.
module tb_shared_buffer;
  import chipix_pkg::*;

  logic clk = 0, rst_n = 0;
  logic we = 0;
  ts_t ts = 0;
  hitmap_t hitmap = 0;
  tots_t tots = 0;
  logic [15:0] clr = 0, valid, written;
  event_t rows [16];
  logic full, overflow;
  int checks = 0, failures = 0, n_ovf = 0;

  logic [15:0] m_valid;
  event_t      m_rows [16];

  shared_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_valid = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      logic [15:0] exp_w;
      // bias towards filling for the first half, emptying afterwards
      we     = ($urandom % 4) != 0;
      ts     = ts_t'($urandom); hitmap = hitmap_t'($urandom); tots = tots_t'($urandom);
      clr    = (n % 1000 < 500) ? (($urandom % 8 == 0) ? 16'(1) << ($urandom % 16) : 16'(0)) : 16'($urandom);
      clr    = clr & m_valid;
      exp_w  = '0;
      if (we) for (int i = 15; i >= 0; i--) if (!m_valid[i]) exp_w = 16'(1) << i;
      #1;
      checks++;
      if (written !== exp_w || full !== (&m_valid) || overflow !== (we && &m_valid)) begin
        failures++;
        $display("FAIL: cycle %0d written %h exp %h full %b ovf %b", n, written, exp_w, full, overflow);
      end
      if (overflow) n_ovf++;
      @(posedge clk);
      m_valid = (m_valid & ~clr) | exp_w;
      for (int i = 0; i < 16; i++) if (exp_w[i]) m_rows[i] = '{ts: ts, hitmap: hitmap, tots: tots};
      #1;
      checks++;
      if (valid !== m_valid) begin failures++; $display("FAIL: valid %h exp %h", valid, m_valid); end
      for (int i = 0; i < 16; i++)
        if (m_valid[i] && rows[i] !== m_rows[i]) begin
          failures++; $display("FAIL: row %0d content", i);
        end
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL: overflow never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
