// macro_column: a column of NPR pixel regions (16 regions, 64 pixel rows).
//
// The regions are chained twice. The busy/data column-drain chain starts at
// region 0, the one farthest from the periphery, and ends at region NPR-1,
// whose outputs go to the macro column drainer: a region passes on the data
// of any busy region before it, so the column delivers at most one row per
// cycle, farthest busy region first. The configuration bus enters at region
// NPR-1 and is passed, registered, towards region 0. Timestamp, trigger and
// readout options are common to all regions.
module macro_column
  import chipix_pkg::*;
#(
  parameter int unsigned NPR          = PR_PER_MC,
  parameter int unsigned DEPTH        = BUF_DEPTH,
  parameter int unsigned EXPIRE_SLACK = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  hitmap_t     fe_disc [NPR],
  input  hitmap_t     dbg_inj [NPR],
  input  ts_t         ts,
  input  logic        trig,
  input  ts_t         trig_ts,
  input  eccr_t       cfg,
  input  pcr_wr_t     pcr_in,
  output logic        col_busy,
  output pr_data_t    col_data,
  output logic [7:0]  pix_cfg [NPR][NPIX],
  output logic [NPR-1:0] overflow
);

  logic     busy [NPR+1];
  pr_data_t data [NPR+1];
  pcr_wr_t  pcr  [NPR+1];   // pcr[k+1] feeds region k

  assign busy[0]   = 1'b0;
  assign data[0]   = '0;
  assign pcr[NPR]  = pcr_in;

  for (genvar k = 0; k < NPR; k++) begin : g_pr
    pixel_region #(
      .PR_ADDR(ADDR_W'(k)), .DEPTH(DEPTH), .EXPIRE_SLACK(EXPIRE_SLACK)
    ) u_pr (
      .clk, .rst_n,
      .fe_disc  (fe_disc[k]),
      .dbg_inj  (dbg_inj[k]),
      .ts, .trig, .trig_ts, .cfg,
      .busy_prev(busy[k]),
      .data_prev(data[k]),
      .pcr_in   (pcr[k+1]),
      .busy_out (busy[k+1]),
      .data_out (data[k+1]),
      .pcr_out  (pcr[k]),
      .pix_cfg  (pix_cfg[k]),
      .overflow (overflow[k])
    );
  end

  assign col_busy = busy[NPR];
  assign col_data = data[NPR];

endmodule
