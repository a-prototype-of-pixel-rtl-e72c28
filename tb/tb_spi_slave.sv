// tb_spi_slave: self-checking test of the SPI frame receiver.
// Random 20-bit frames are shifted in MSB first (sclk at 1/8 of the core
// clock), single and back-to-back within one chip select; each must appear
// once on frame with frame_valid. A frame cut short by raising cs_n must be
// discarded.
module tb_spi_slave;
  logic clk = 0, rst_n = 0, sclk = 0, cs_n = 1, mosi = 0;
  logic [19:0] frame;
  logic frame_valid;
  int checks = 0, failures = 0;

  spi_slave dut (.*);

  always #5 clk = ~clk;

  logic [19:0] exp_q [$];
  int n_got = 0;

  always @(posedge clk) if (rst_n && frame_valid) begin
    checks++; n_got++;
    if (exp_q.size() == 0 || frame != exp_q[0]) begin
      failures++; $display("FAIL: frame %h", frame);
    end
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end

  task automatic send_bits(logic [19:0] f, int nb);
    for (int i = 19; i > 19 - nb; i--) begin
      mosi = f[i]; #40 sclk = 1; #40 sclk = 0;
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      logic [19:0] f;
      f = 20'($urandom);
      cs_n = 0; #40;
      exp_q.push_back(f); send_bits(f, 20);
      if (n % 3 == 0) begin f = 20'($urandom); exp_q.push_back(f); send_bits(f, 20); end
      #40 cs_n = 1; #100;
      if (n % 5 == 0) begin  // partial frame, discarded
        cs_n = 0; #40; send_bits(20'($urandom), 7); #40 cs_n = 1; #100;
      end
    end
    #500;
    checks++;
    if (exp_q.size() != 0 || n_got != 40) begin failures++; $display("FAIL: got %0d frames", n_got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
