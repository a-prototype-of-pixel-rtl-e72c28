// tb_config_ctrl: self-checking test of the configuration register decoder.
// Frames are applied directly. Checked: reset values, GCR word writes to
// their 16-bit slice, the ECCR fields, auto-increment over several GCR words,
// the pixel address translation (macro column, region, left/right, PCR
// index) for random pixel pairs, auto-increment for pixel data, and that
// exactly one macro column bus carries each pixel write.
module tb_config_ctrl;
  import chipix_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [19:0] frame = 0;
  logic frame_valid = 0;
  logic [223:0] gcr;
  eccr_t eccr;
  pcr_wr_t pcr_wr [16];
  int checks = 0, failures = 0;

  config_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(logic [1:0] op, logic [17:0] payload);
    frame = {op, payload}; frame_valid = 1;
    @(posedge clk); #1; frame_valid = 0;
  endtask

  // expected pixel write seen on the buses in the cycle of a data frame
  task automatic pix_write(int row, int col, logic [15:0] d, bit inc);
    int seen = 0;
    frame = {inc ? 2'b10 : 2'b01, 2'b00, d}; frame_valid = 1; #1;
    for (int m = 0; m < 16; m++) if (pcr_wr[m].we) begin
      seen++;
      check(m == col / 4, $sformatf("macro column %0d exp %0d", m, col / 4));
      check(pcr_wr[m].pr == 4'(row / 4), "region");
      check(pcr_wr[m].idx == 2'(row % 4), "pcr index");
      check(pcr_wr[m].right == ((col % 4) >= 2), "left/right");
      check(pcr_wr[m].data == d, "data");
    end
    check(seen == 1, $sformatf("one bus written, %0d", seen));
    @(posedge clk); #1; frame_valid = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [223:0] mg;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(gcr == '0 && eccr.latency == 10'd500 && !eccr.triggerless && eccr.mc_mask == 0, "reset values");
    mg = '0;
    send(2'b00, {2'd0, 16'd3}); send(2'b01, {2'b00, 16'hBEEF}); mg[48 +: 16] = 16'hBEEF;
    check(gcr == mg, "GCR word 3");
    send(2'b00, {2'd0, 16'd10});
    for (int w = 10; w < 14; w++) begin
      send(2'b10, {2'b00, 16'(w * 1111)}); mg[w*16 +: 16] = 16'(w * 1111);
    end
    send(2'b10, {2'b00, 16'hFFFF});     // past the last word: ignored
    check(gcr == mg, "GCR auto-increment");
    send(2'b00, {2'd1, 16'd0}); send(2'b01, {2'b00, 10'd321, 6'b101101});
    check(eccr.latency == 10'd321 && eccr.triggerless && !eccr.dt_high && eccr.binary_only
          && eccr.enc_bypass && !eccr.gray_bypass && eccr.debug, "ECCR word 0");
    send(2'b00, {2'd1, 16'd1}); send(2'b01, {2'b00, 16'h8421});
    check(eccr.mc_mask == 16'h8421, "ECCR mask");
    for (int n = 0; n < 100; n++) begin
      int row, col;
      row = $urandom % 64; col = 2 * ($urandom % 32);
      send(2'b00, {2'd2, 5'd0, 6'(row), 5'(col / 2)});
      pix_write(row, col, 16'($urandom), 0);
    end
    // auto-increment along a pixel row
    send(2'b00, {2'd2, 5'd0, 6'd37, 5'd0});
    for (int p = 0; p < 32; p++) pix_write(37, 2 * p, 16'($urandom), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
