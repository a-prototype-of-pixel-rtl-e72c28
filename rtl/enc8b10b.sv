// enc8b10b: 8b10b encoder for one byte, combinational.
//
// Standard IBM 8b10b code. The byte HGF_EDCBA is coded as a 6-bit group
// (from EDCBA) and a 4-bit group (from HGF). The tables hold the code for a
// negative running disparity; a group that is unbalanced (or D.07 and D.x.3,
// which are balanced but disparity dependent) is complemented when the
// running disparity before it is positive. The alternate D.x.A7 form is used
// where the primary one would give a run of five equal bits, and for control
// codes. K28.y codes are handled on their own: for positive disparity the
// whole negative-disparity code is complemented. The output is ordered
// code[9:0] = a b c d e i f g h j, so bit 9 is sent first. rd_in / rd_out are
// the running disparity (1 = positive) before and after the code.
module enc8b10b (
  input  logic [7:0] din,
  input  logic       k,       // control character
  input  logic       rd_in,
  output logic [9:0] code,
  output logic       rd_out
);

  logic [4:0] x;
  logic [2:0] y;
  logic [5:0] t6, c6;
  logic [3:0] t4, c4;
  logic       rd6, use_a7, flip6, flip4;

  assign x = din[4:0];
  assign y = din[7:5];

  always_comb begin
    unique case (x)
      5'd0:  t6 = 6'b100111;  5'd1:  t6 = 6'b011101;
      5'd2:  t6 = 6'b101101;  5'd3:  t6 = 6'b110001;
      5'd4:  t6 = 6'b110101;  5'd5:  t6 = 6'b101001;
      5'd6:  t6 = 6'b011001;  5'd7:  t6 = 6'b111000;
      5'd8:  t6 = 6'b111001;  5'd9:  t6 = 6'b100101;
      5'd10: t6 = 6'b010101;  5'd11: t6 = 6'b110100;
      5'd12: t6 = 6'b001101;  5'd13: t6 = 6'b101100;
      5'd14: t6 = 6'b011100;  5'd15: t6 = 6'b010111;
      5'd16: t6 = 6'b011011;  5'd17: t6 = 6'b100011;
      5'd18: t6 = 6'b010011;  5'd19: t6 = 6'b110010;
      5'd20: t6 = 6'b001011;  5'd21: t6 = 6'b101010;
      5'd22: t6 = 6'b011010;  5'd23: t6 = 6'b111010;
      5'd24: t6 = 6'b110011;  5'd25: t6 = 6'b100110;
      5'd26: t6 = 6'b010110;  5'd27: t6 = 6'b110110;
      5'd28: t6 = k ? 6'b001111 : 6'b001110;
      5'd29: t6 = 6'b101110;  5'd30: t6 = 6'b011110;
      default: t6 = 6'b101011;
    endcase
  end

  assign flip6 = ($countones(t6) != 3) || (x == 5'd7);
  assign c6    = (rd_in && flip6) ? ~t6 : t6;
  assign rd6   = rd_in ^ ($countones(t6) != 3);

  assign use_a7 = (y == 3'd7) &&
                  (k || (!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                        ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14)));

  always_comb begin
    unique case (y)
      3'd0: t4 = 4'b1011;
      3'd1: t4 = 4'b1001;
      3'd2: t4 = 4'b0101;
      3'd3: t4 = 4'b1100;
      3'd4: t4 = 4'b1101;
      3'd5: t4 = 4'b1010;
      3'd6: t4 = 4'b0110;
      default: t4 = use_a7 ? 4'b0111 : 4'b1110;
    endcase
  end

  assign flip4 = ($countones(t4) != 2) || (y == 3'd3);
  assign c4    = (rd6 && flip4) ? ~t4 : t4;

  logic [3:0] k28_4;
  always_comb begin
    unique case (y)
      3'd0: k28_4 = 4'b0100;
      3'd1: k28_4 = 4'b1001;
      3'd2: k28_4 = 4'b0101;
      3'd3: k28_4 = 4'b0011;
      3'd4: k28_4 = 4'b0010;
      3'd5: k28_4 = 4'b1010;
      3'd6: k28_4 = 4'b0110;
      default: k28_4 = 4'b1000;
    endcase
  end

  always_comb begin
    if (k && x == 5'd28) code = rd_in ? ~{6'b001111, k28_4} : {6'b001111, k28_4};
    else                 code = {c6, c4};
  end

  assign rd_out = rd_in ^ ($countones(code) != 5);

endmodule
