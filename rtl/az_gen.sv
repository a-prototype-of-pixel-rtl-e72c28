// az_gen: autozeroing cycle generator for the synchronous front ends.
//
// The synchronous front end needs a periodic autozeroing phase. This block
// produces it: az is high for width+1 cycles at the start of every period of
// (period+1)*16 core clock cycles; period = 0 and width = 0 are valid
// settings (a 16-cycle period with a 1-cycle phase). Both numbers come from the global configuration. The description
// says only that the global configuration sets the autozeroing cycle; the
// counter scheme and the units are this design's own.
module az_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] period,
  input  logic [3:0] width,
  output logic       az
);

  logic [11:0] cnt;
  logic [11:0] last;

  assign last = {period, 4'hF};            // (period+1)*16 - 1
  assign az   = (cnt <= {8'd0, width});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            cnt <= '0;
    else if (cnt >= last)  cnt <= '0;
    else                   cnt <= cnt + 12'd1;
  end

endmodule
