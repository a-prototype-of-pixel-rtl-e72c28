// tb_serializer: self-checking test of the 20-bit serializer.
// Random words are presented one per 20 bit clocks, changed right after each
// load; the serial stream is collected and every word must come out whole,
// bit 19 first, 20 bit clocks after the previous one.
module tb_serializer;
  logic clk_ser = 0, rst_n = 0;
  logic [19:0] par_in = 0;
  logic ser_out, load;
  int checks = 0, failures = 0;

  serializer dut (.*);

  always #1 clk_ser = ~clk_ser;

  logic [19:0] sent [$];
  logic [19:0] shreg;
  int nbits = -1, nloads = 0, last_load = 0, cyc = 0;

  always @(posedge clk_ser) if (rst_n) begin
    cyc++;
    // the bit on ser_out now belongs to the word loaded earlier
    if (nbits >= 0) begin
      shreg = {shreg[18:0], ser_out};
      nbits++;
      if (nbits == 20) begin
        checks++;
        if (shreg != sent[0]) begin failures++; $display("FAIL: got %h exp %h", shreg, sent[0]); end
        void'(sent.pop_front());
        nbits = 0;
      end
    end
    if (load) begin
      if (nloads > 0) begin
        checks++;
        if (cyc - last_load != 20) begin failures++; $display("FAIL: load spacing %0d", cyc - last_load); end
      end
      last_load = cyc; nloads++;
      sent.push_back(par_in);
      if (nbits < 0) nbits = 0;
      #0.5 par_in = 20'($urandom);
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    par_in = 20'($urandom);
    repeat (3) @(posedge clk_ser); #0.5 rst_n = 1;
    repeat (20 * 200) @(posedge clk_ser);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
