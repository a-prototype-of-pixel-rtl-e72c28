// config_ctrl: configuration registers of the chip periphery.
//
// Decodes the 20-bit frames from the SPI slave. Frame layout (this design's
// own): bits [19:18] are the operation.
//   2'b00 SET_ADDR  : [17:16] register space, [15:0] address
//   2'b01 WRITE     : [15:0] data to the current address
//   2'b10 WRITE_INC : same, then the address is incremented (auto-increment
//                     mode: a run of pixel configurations needs one SET_ADDR
//                     and then only data frames)
// Spaces: 0 = global configuration (GCR, 14 words of 16 bits = 224 bits),
// 1 = end of column configuration (ECCR, word 0: latency[15:6],
// triggerless[5], dt_high[4], binary_only[3], enc_bypass[2], gray_bypass[1],
// debug[0]; word 1: macro column mask), 2 = pixel configuration.
// A pixel configuration address names a pixel pair {row[5:0], pair[4:0]}
// (row 0-63, pair = column/2). It is translated into a macro column
// (pair[4:1]), a left/right flag (pair[0]), a region (row[5:2]) and a PCR
// index (row[1:0]), and sent as a one-cycle write on the configuration bus of
// that macro column.
// GCR bit map (own choice, the description lists only the contents): DAC i
// code at [10i+9:10i] for i = 0..15, autozero period [167:160] and width
// [171:168], ADC input multiplexer [175:172], ADC reference current trim
// [185:176], the rest spare.
// Reset values: all GCR bits 0; latency 500 cycles (12.5 us at 40 MHz);
// triggered mode, 6-cycle deadtime, 8b10b and Gray coding on, no mask.
module config_ctrl
  import chipix_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [19:0]           frame,
  input  logic                  frame_valid,
  output logic [GCR_WORDS*16-1:0] gcr,
  output eccr_t                 eccr,
  output pcr_wr_t               pcr_wr [N_MC]
);

  localparam logic [1:0] OP_ADDR = 2'b00, OP_WR = 2'b01, OP_WRI = 2'b10;

  logic [1:0]  space;
  logic [15:0] addr;
  logic [1:0]  op;
  logic [15:0] data;
  logic        wr;

  assign op   = frame[19:18];
  assign data = frame[15:0];
  assign wr   = frame_valid && (op == OP_WR || op == OP_WRI);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      space <= '0;
      addr  <= '0;
      gcr   <= '0;
      eccr  <= '{latency: TS_W'(500), triggerless: 1'b0, dt_high: 1'b0,
                 binary_only: 1'b0, enc_bypass: 1'b0, gray_bypass: 1'b0,
                 debug: 1'b0, mc_mask: '0};
    end else if (frame_valid) begin
      if (op == OP_ADDR) begin
        space <= frame[17:16];
        addr  <= frame[15:0];
      end
      if (wr) begin
        if (space == 2'd0 && addr < 16'(GCR_WORDS))
          gcr[addr*16 +: 16] <= data;
        if (space == 2'd1 && addr == 16'd0)
          {eccr.latency, eccr.triggerless, eccr.dt_high, eccr.binary_only,
           eccr.enc_bypass, eccr.gray_bypass, eccr.debug} <= data;
        if (space == 2'd1 && addr == 16'd1)
          eccr.mc_mask <= data;
      end
      if (op == OP_WRI) addr <= addr + 16'd1;
    end
  end

  // Pixel configuration address translation.
  always_comb begin
    for (int m = 0; m < int'(N_MC); m++) begin
      pcr_wr[m]       = '0;
      pcr_wr[m].pr    = addr[10:7];
      pcr_wr[m].idx   = addr[6:5];
      pcr_wr[m].right = addr[0];
      pcr_wr[m].data  = data;
      pcr_wr[m].we    = wr && space == 2'd2 && addr[15:11] == '0
                        && addr[4:1] == 4'(m);
    end
  end

endmodule
