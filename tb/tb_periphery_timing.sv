// tb_periphery_timing: self-checking test of the timestamp and trigger
// timestamp. The testbench counts cycles itself and checks the Gray-coded
// and plain timestamp, and that a trigger gives trig one cycle later with the
// timestamp of latency cycles before the trigger (with wrap-around).
module tb_periphery_timing;
  import chipix_pkg::*;

  logic clk = 0, rst_n = 0, trig_in = 0, gray_bypass = 0, trig;
  ts_t latency = 10'd500, ts, trig_ts;
  int checks = 0, failures = 0;

  periphery_timing dut (.*);

  always #5 clk = ~clk;

  function automatic ts_t g(ts_t b);
    ts_t r;
    for (int i = 0; i < 9; i++) r[i] = b[i] ^ b[i+1];
    r[9] = b[9];
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc = 0;
    logic pend = 0; ts_t pend_ts;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      if (n == 1500) gray_bypass = 1;
      if (n == 2200) latency = 10'd37;
      trig_in = ($urandom % 5 == 0);
      #1;
      checks++;
      if (ts !== (gray_bypass ? ts_t'(cyc) : g(ts_t'(cyc)))) begin
        failures++; $display("FAIL: ts %h at %0d", ts, cyc);
      end
      checks++;
      if (trig !== pend || (pend && trig_ts !== pend_ts)) begin
        failures++; $display("FAIL: trigger at %0d: %b %h exp %h", cyc, trig, trig_ts, pend_ts);
      end
      pend = trig_in;
      pend_ts = gray_bypass ? ts_t'(cyc - int'(latency)) : g(ts_t'(cyc - int'(latency)));
      @(posedge clk); #1;
      cyc++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
