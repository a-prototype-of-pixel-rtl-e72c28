// shared_buffer: the event memory shared by the 16 pixels of a region.
//
// DEPTH rows (16, the depth the description gives for an event loss below
// 0.1%), each with a valid bit and one event: timestamp, hit map and the
// compressed ToTs. A write (we, from the hit mapper's latch enable) stores the
// event with the current timestamp into the lowest-numbered free row. When no
// row is free the event is lost and overflow pulses for that cycle. Rows are
// freed by clr (one bit per row), which the trigger logic drives when a row
// has been read out or has expired. All rows are visible at once to the
// trigger matching comparators.
//
// Own choices: lowest-free-row allocation, the stored timestamp being the one
// of the write cycle (the fixed deadtime is a constant offset), clear wins
// over nothing (a row is never cleared and written in the same cycle because
// the write only picks rows that are free).
module shared_buffer
  import chipix_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  ts_t              ts,
  input  hitmap_t          hitmap,
  input  tots_t            tots,
  input  logic [DEPTH-1:0] clr,
  output logic [DEPTH-1:0] valid,
  output event_t           rows [DEPTH],
  output logic [DEPTH-1:0] written,   // one-hot row written this cycle
  output logic             full,
  output logic             overflow
);

  logic [DEPTH-1:0] free_onehot;

  always_comb begin
    free_onehot = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (!valid[i]) free_onehot = '0 | (DEPTH'(1) << i);
  end

  assign full     = &valid;
  assign written  = we ? free_onehot : '0;
  assign overflow = we & full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      valid <= (valid & ~clr) | written;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++)
      if (written[i]) rows[i] <= '{ts: ts, hitmap: hitmap, tots: tots};
  end

endmodule
