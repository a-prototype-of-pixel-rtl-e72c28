// serializer: 20-bit parallel to serial converter.
//
// Runs on the serial bit clock. Every 20 bit clocks it loads the 20-bit word
// on par_in and then shifts it out, bit 19 first, one bit per clock. load is
// high in the bit clock cycle at whose end the word is taken. In the chip the
// bit clock runs at 20 times the core clock, edge-aligned with it, so one
// dispatcher word leaves per core cycle (800 Mb/s at a 40 MHz core clock).
// The description gives only the 20-bit width; the loading scheme and bit
// order are this design's own.
module serializer (
  input  logic        clk_ser,
  input  logic        rst_n,
  input  logic [19:0] par_in,
  output logic        ser_out,
  output logic        load
);

  logic [4:0]  bitcnt;
  logic [19:0] sh;

  assign load    = (bitcnt == 5'd19);
  assign ser_out = sh[19];

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      bitcnt <= 5'd19;
      sh     <= '0;
    end else begin
      bitcnt <= load ? 5'd0 : bitcnt + 5'd1;
      sh     <= load ? par_in : {sh[18:0], 1'b0};
    end
  end

endmodule
