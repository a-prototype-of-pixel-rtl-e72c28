// global_bias_dac: behavioural model of one 10-bit segmented current-steering
// DAC of the bias network. Not synthesizable as a whole: the current cells are
// analog; only the decoder it instantiates is logic.
//
// The code is decoded by dac_decoder into a 16x16 matrix of unit cells of
// weight 4 and a 2-bit binary part of weights 1 and 2, 1023 current units in
// all. Each unit steers i_lsb_na nanoamperes either to ioutp (cell on) or to
// ioutn (cell off), so ioutp + ioutn is constant and ioutp grows by exactly
// i_lsb_na per code step. The unit current is a model parameter; the
// description gives the segmentation, not the currents.
module global_bias_dac (
  input  logic [9:0]  code,
  input  logic [15:0] i_lsb_na,
  output logic [31:0] ioutp_na,
  output logic [31:0] ioutn_na
);

  logic [15:0] row_therm, row_sel, col_therm;
  logic [1:0]  bin;
  int unsigned units;

  dac_decoder u_dec (.code, .row_therm, .row_sel, .col_therm, .bin);

  always_comb begin
    units = 0;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        if (!(r == 15 && c == 15) &&
            (row_therm[r] || (row_sel[r] && col_therm[c])))
          units = units + 4;
    units = units + int'(bin);
  end

  assign ioutp_na = units * i_lsb_na;
  assign ioutn_na = (1023 - units) * i_lsb_na;

endmodule
