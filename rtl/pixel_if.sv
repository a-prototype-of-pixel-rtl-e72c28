// pixel_if: digital interface of one pixel inside a pixel region.
//
// It turns the discriminator output of the pixel's front end into a hit flag
// and a 5-bit time-over-threshold (ToT). A rising edge of the (possibly
// injected) discriminator signal starts a fixed deadtime of DT cycles, 6 or 16
// as set by dt_high, or 1 cycle in binary-only mode. During the deadtime the
// pixel is frozen for new hits and counts the cycles its discriminator stays
// high (saturating at 31). In the last deadtime cycle hit_flag is high and the
// region's hit mapper reads tot; at that clock edge the pixel is released. A
// pixel whose discriminator is still high then waits for it to fall before it
// can take a new hit. The fixed deadtime makes all pixels hit in the same
// cycle present their flags in the same cycle, whatever their ToT.
//
// From the description: per-pixel (not region-wide) freezing, fixed deadtime,
// the 6/16-cycle values, the binary-only and debug (injection) modes.
// Own choices: ToT counted at the core clock and clipped to the deadtime
// window, a one-cycle deadtime in binary-only mode, re-arming on the falling
// edge, and an enable bit from the pixel configuration.
module pixel_if
  import chipix_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic fe_disc,      // discriminator output of the analog front end
  input  logic dbg_inj,      // direct digital injection (debug mode)
  input  logic debug,        // 1: use dbg_inj instead of fe_disc
  input  logic enable,       // pixel enable from its configuration register
  input  logic dt_high,      // 1: 16-cycle deadtime, 0: 6-cycle
  input  logic binary_only,  // 1: minimal deadtime, no ToT
  output logic hit_flag,     // deadtime elapsed, hit waiting to be stored
  output tot_t tot
);

  typedef enum logic [1:0] {ARMED, BUSY, WAIT_LOW} state_e;

  state_e     state;
  logic [4:0] cnt;      // deadtime cycles left after this one
  logic       disc, disc_q;
  logic       tot_run;  // discriminator has stayed high since the hit
  logic       rise;
  logic [4:0] dt_len;

  assign disc   = (debug ? dbg_inj : fe_disc) & enable;
  assign rise   = disc & ~disc_q;
  assign dt_len = binary_only ? 5'd1 : (dt_high ? 5'(DT_HIGH) : 5'(DT_LOW));

  assign hit_flag = (state == BUSY) && (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ARMED;
      cnt    <= '0;
      disc_q <= 1'b0;
      tot    <= '0;
      tot_run <= 1'b0;
    end else begin
      disc_q <= disc;
      unique case (state)
        ARMED: if (rise) begin
          state <= BUSY;
          cnt   <= dt_len - 5'd1;
          tot   <= binary_only ? '0 : tot_t'(1);
          tot_run <= 1'b1;
        end
        BUSY: begin
          if (cnt == '0) begin
            state <= disc ? WAIT_LOW : ARMED;
          end else begin
            cnt <= cnt - 5'd1;
          end
          if (!disc) tot_run <= 1'b0;
          if (!binary_only && disc && tot_run && tot != '1 && cnt != '0)
            tot <= tot + tot_t'(1);
        end
        WAIT_LOW: if (!disc) state <= ARMED;
        default: state <= ARMED;
      endcase
    end
  end

endmodule
