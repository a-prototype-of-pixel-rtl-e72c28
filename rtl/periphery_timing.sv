// periphery_timing: bunch-crossing timestamp and trigger timestamp.
//
// A 10-bit counter advances once per core clock cycle (one bunch crossing).
// The timestamp sent into the pixel matrix is its Gray code, or the plain
// count when Gray coding is bypassed. A trigger input in cycle t gets the
// trigger timestamp of cycle t - latency, in the same code, and both are
// registered: trig and trig_ts appear one cycle after the trigger input.
// Because a region stores an event with the timestamp of the cycle it was
// written, DT cycles after the hit, the latency register is set to the
// trigger latency minus the deadtime.
// From the description: trigger timestamp driven from the periphery,
// latency in clock cycles, the Gray coding bypass option. The counter and the
// registering are this design's own.
module periphery_timing
  import chipix_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic trig_in,
  input  ts_t  latency,
  input  logic gray_bypass,
  output ts_t  ts,        // to the matrix
  output logic trig,
  output ts_t  trig_ts
);

  ts_t bx, bx_trig;

  assign bx_trig = bx - latency;
  assign ts      = gray_bypass ? bx : bin2gray(bx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bx      <= '0;
      trig    <= 1'b0;
      trig_ts <= '0;
    end else begin
      bx      <= bx + 1'b1;
      trig    <= trig_in;
      trig_ts <= gray_bypass ? bx_trig : bin2gray(bx_trig);
    end
  end

endmodule
