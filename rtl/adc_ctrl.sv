// adc_ctrl: control logic of the 12-bit dual-slope monitoring ADC.
//
// A conversion starts with start. In the integration phase (charge = 1) the
// input current is integrated on the capacitor for exactly 2^12 = 4096 clock
// cycles. In the discharge phase (discharge = 1) the capacitor is discharged
// with the constant reference current while a counter counts clock cycles,
// until the comparator reports that the capacitor is back at its starting
// level (comp = 1). The count is the output code, code = 4096 * Iin / Iref,
// clipped to 4095; done pulses for one cycle with it. A conversion therefore
// takes 4096 + code + 2 cycles (about 5 kSample/s at a 40 MHz clock for a
// mid-scale input). From the description: dual-slope integration over 2^12
// cycles and a code that counts the discharge cycles. Own choices: the
// handshake, the one-cycle reset phase of the integrator, and the clipping.
// The automatic gain and discharge-current calibration is not included.
module adc_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        comp,        // 1 when the integrator is back to zero
  output logic        rst_int,     // reset the integration capacitor
  output logic        charge,      // CH: integrate the input current
  output logic        discharge,   // DISCH: discharge with the reference
  output logic [11:0] code,
  output logic        done,
  output logic        busy
);

  typedef enum logic [1:0] {S_IDLE, S_RST, S_INT, S_DIS} state_e;
  state_e      state;
  logic [12:0] cnt;

  assign rst_int   = (state == S_RST);
  assign charge    = (state == S_INT);
  assign discharge = (state == S_DIS);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      code  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) state <= S_RST;
        S_RST: begin
          state <= S_INT;
          cnt   <= '0;
        end
        S_INT: begin
          if (cnt == 13'd4095) begin
            state <= S_DIS;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 13'd1;
          end
        end
        S_DIS: begin
          if (comp || cnt == 13'd4095) begin
            state <= S_IDLE;
            code  <= cnt[11:0];
            done  <= 1'b1;
          end else begin
            cnt <= cnt + 13'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
