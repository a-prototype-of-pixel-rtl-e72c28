// spi_slave: receiver of the 20-bit configuration frames.
//
// The chip is an SPI slave. sclk, cs_n and mosi are brought into the core
// clock domain through two-flop synchronizers and sampled on the rising edge
// of sclk while cs_n is low, most significant bit first. After 20 bits the
// frame is presented on frame with a one-cycle frame_valid strobe, and the
// next 20 bits form the next frame. Raising cs_n discards a partial frame.
// The core clock must be at least 4 times faster than sclk.
// From the description: SPI slave, 20-bit frames. Own choices: SPI mode 0,
// oversampling in the core clock domain, no read-back (no miso).
module spi_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        mosi,
  output logic [19:0] frame,
  output logic        frame_valid
);

  logic [2:0] sclk_s;   // [0],[1]: synchronizer, [2]: previous value
  logic [1:0] cs_s, mosi_s;
  logic [4:0] nbits;
  logic [19:0] sh;
  logic        rise;

  assign rise = sclk_s[1] & ~sclk_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s      <= '0;
      cs_s        <= '1;
      mosi_s      <= '0;
      nbits       <= '0;
      sh          <= '0;
      frame       <= '0;
      frame_valid <= 1'b0;
    end else begin
      sclk_s      <= {sclk_s[1:0], sclk};
      cs_s        <= {cs_s[0], cs_n};
      mosi_s      <= {mosi_s[0], mosi};
      frame_valid <= 1'b0;
      if (cs_s[1]) begin
        nbits <= '0;
      end else if (rise) begin
        sh <= {sh[18:0], mosi_s[1]};
        if (nbits == 5'd19) begin
          nbits       <= '0;
          frame       <= {sh[18:0], mosi_s[1]};
          frame_valid <= 1'b1;
        end else begin
          nbits <= nbits + 5'd1;
        end
      end
    end
  end

endmodule
