// dac_decoder: binary-to-thermometric decoder of a global bias DAC.
//
// The 10-bit DAC code is split as in the segmented DAC: the 8 most
// significant bits drive a thermometric array of 255 equal unit cells, the 2
// least significant bits a 2-bit binary DAC. The 8 bits are decoded into 16
// row lines and 16 column lines for a 16x16 cell matrix: row_therm[r] is 1 for
// every row r below code[9:6] (full rows), row_sel[r] is 1 for the partially
// filled row r = code[9:6], and col_therm[c] is 1 for every column c below
// code[5:2]. Cell (r, c) is on when row_therm[r] | (row_sel[r] & col_therm[c]),
// so exactly code[9:2] cells are on. The 8/2 split and the 16-line buses are
// those of the DAC's block diagram; the row/column scheme inside is this
// design's own.
module dac_decoder (
  input  logic [9:0]  code,
  output logic [15:0] row_therm,
  output logic [15:0] row_sel,
  output logic [15:0] col_therm,
  output logic [1:0]  bin
);

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      row_therm[i] = (4'(i) < code[9:6]);
      row_sel[i]   = (4'(i) == code[9:6]);
      col_therm[i] = (4'(i) < code[5:2]);
    end
  end

  assign bin = code[1:0];

endmodule
