// pixel_region: the shared digital logic of a 4x4 pixel region.
//
// Sixteen pixel interfaces feed the hit mapper; in the cycle their fixed
// deadtime ends, the hit mapper writes one event (hit map plus the first six
// ToTs) with the current timestamp into the 16-row shared buffer and the
// flagged pixels are released. Trigger matching marks the rows whose
// timestamp equals the trigger timestamp (or every row in triggerless mode)
// and the output stage puts the lowest marked row on the column-drain chain
// when no region before it in the macro column is busy. The region also holds
// its 8 pixel configuration registers and passes the configuration bus on.
//
// Timing: a hit in cycle t is flagged in cycle t+DT-1 and stored at the end of
// it; the region's busy rises the cycle after the trigger (or after the store
// in triggerless mode); one row leaves per cycle while it holds the bus.
// The split into these sub-blocks follows the region's functional scheme;
// interface widths beyond those of the output packet are this design's own.
module pixel_region
  import chipix_pkg::*;
#(
  parameter logic [ADDR_W-1:0] PR_ADDR      = '0,
  parameter int unsigned       DEPTH        = BUF_DEPTH,
  parameter int unsigned       EXPIRE_SLACK = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  hitmap_t       fe_disc,      // front-end discriminators, bit = 4*row+col
  input  hitmap_t       dbg_inj,      // digital injection, debug mode
  input  ts_t           ts,           // current timestamp (binary or Gray)
  input  logic          trig,
  input  ts_t           trig_ts,
  input  eccr_t         cfg,
  input  logic          busy_prev,
  input  pr_data_t      data_prev,
  input  pcr_wr_t       pcr_in,
  output logic          busy_out,
  output pr_data_t      data_out,
  output pcr_wr_t       pcr_out,
  output logic [7:0]    pix_cfg [NPIX],
  output logic          overflow      // an event was lost, buffer full
);

  hitmap_t          hit_flags;
  tot_t             tots [NPIX];
  hitmap_t          hitmap;
  tots_t            ctots;
  logic             latch_en;
  logic [DEPTH-1:0] valid, clr, written;
  event_t           rows [DEPTH];
  ts_t              row_ts [DEPTH];
  logic             full, status, grant;
  logic [$clog2(DEPTH)-1:0] sel_row;
  pr_data_t         my_data;

  pcr_regs #(.PR_ADDR(PR_ADDR)) u_pcr (
    .clk, .rst_n, .pcr_in, .pcr_out, .pix_cfg
  );

  for (genvar p = 0; p < NPIX; p++) begin : g_pix
    pixel_if u_pix (
      .clk, .rst_n,
      .fe_disc     (fe_disc[p]),
      .dbg_inj     (dbg_inj[p]),
      .debug       (cfg.debug),
      .enable      (pix_cfg[p][0]),
      .dt_high     (cfg.dt_high),
      .binary_only (cfg.binary_only),
      .hit_flag    (hit_flags[p]),
      .tot         (tots[p])
    );
  end

  hit_mapper u_map (
    .hit_flags, .tots_in(tots), .hitmap, .tots_out(ctots), .latch_en
  );

  shared_buffer #(.DEPTH(DEPTH)) u_buf (
    .clk, .rst_n, .we(latch_en), .ts, .hitmap, .tots(ctots), .clr,
    .valid, .rows, .written, .full, .overflow
  );

  always_comb
    for (int i = 0; i < int'(DEPTH); i++) row_ts[i] = rows[i].ts;

  trigger_match #(.DEPTH(DEPTH), .EXPIRE_SLACK(EXPIRE_SLACK)) u_trg (
    .clk, .rst_n, .valid, .row_ts, .cur_ts(ts), .trig, .trig_ts,
    .triggerless(cfg.triggerless), .gray_bypass(cfg.gray_bypass),
    .latency(cfg.latency), .grant, .sel_row, .trig_status(status), .clr
  );

  assign my_data = '{pr: PR_ADDR, ev: rows[sel_row]};

  output_stage u_out (
    .my_busy(status), .my_data, .busy_prev, .data_prev,
    .busy_out, .data_out, .grant
  );

endmodule
