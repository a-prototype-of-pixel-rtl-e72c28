// pcr_regs: the 8 pixel configuration registers (PCRs) of one pixel region.
//
// Two groups of 4 sixteen-bit register batches, one group for the left half
// of the region (columns 0-1) and one for the right half (columns 2-3). Batch
// idx of a half configures the two adjacent pixels of region row idx: bits
// [7:0] the even column, [15:8] the odd one. A write arrives on the
// configuration bus that runs through the regions of a macro column; it is
// taken when its region field equals PR_ADDR. The bus is re-registered here
// and passed on to the next region, so a write reaches region k after k+1
// cycles.
//
// From the description: 8 PCRs of 16 bits per region, left/right grouping,
// two adjacent pixels per batch, configuration bits passed region to region.
// Own choices: the meaning of the 8 bits of a pixel, which is not given
// ([0] enable, [1] calibration injection, [5:2] 4-bit threshold trim of the
// asynchronous front end, [7:6] spare), and the reset value 8'h01 (every
// pixel enabled) so that a freshly reset chip takes hits.
module pcr_regs
  import chipix_pkg::*;
#(
  parameter logic [ADDR_W-1:0] PR_ADDR = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  pcr_wr_t    pcr_in,
  output pcr_wr_t    pcr_out,
  output logic [7:0] pix_cfg [NPIX]
);

  logic [15:0] batch [2][4];   // [right][idx]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int h = 0; h < 2; h++)
        for (int r = 0; r < 4; r++) batch[h][r] <= 16'h0101;
      pcr_out <= '0;
    end else begin
      pcr_out <= pcr_in;
      if (pcr_in.we && pcr_in.pr == PR_ADDR)
        batch[pcr_in.right][pcr_in.idx] <= pcr_in.data;
    end
  end

  always_comb begin
    for (int p = 0; p < int'(NPIX); p++) begin
      int unsigned row, col;
      row = p / 4;
      col = p % 4;
      pix_cfg[p] = (col % 2 == 0) ? batch[col / 2][row][7:0]
                                  : batch[col / 2][row][15:8];
    end
  end

endmodule
