// adc_analog: behavioural model of the analog part of the dual-slope ADC.
// Not synthesizable logic: it stands for the transconductor, the switches,
// the integration capacitor and the comparator.
//
// The transconductor turns the input voltage (vin_uv, microvolts, 0 to
// 900 000 for the 0-900 mV range) into a current. With charge high the
// capacitor integrates it, one clock cycle at a time; with discharge high it
// loses a constant reference charge per cycle equal to the full-scale input.
// The state is an integer charge in microvolt-cycles. comp is 1 when the
// charge has come back to zero or below, so a full dual-slope conversion
// gives code = ceil(4096 * vin / 900 mV). rst_int empties the capacitor.
// The full-scale value and the ideal (noise-free, linear) transfer are
// modelling choices; the 70 pF capacitor and the gain are not modelled.
module adc_analog #(
  parameter int unsigned VFS_UV = 900_000
) (
  input  logic        clk,
  input  logic [19:0] vin_uv,
  input  logic        rst_int,
  input  logic        charge,
  input  logic        discharge,
  output logic        comp
);

  longint q;

  initial q = 0;

  always @(posedge clk) begin
    if (rst_int)        q <= 0;
    else if (charge)    q <= q + longint'(vin_uv);
    else if (discharge) q <= q - longint'(VFS_UV);
  end

  assign comp = (q <= 0);

endmodule
