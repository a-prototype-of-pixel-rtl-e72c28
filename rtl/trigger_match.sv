// trigger_match: trigger matching and validation of one pixel region.
//
// In triggered mode a trigger pulse comes with a trigger timestamp. In that
// cycle every valid buffer row whose timestamp equals the trigger timestamp
// is marked for output (one comparator per row). In triggerless mode every
// valid row counts as marked. trig_status is high when any row is marked and
// sel_row is the lowest marked row; both come from flip-flops, so the region
// turns busy one clock cycle after the trigger. When the output stage grants
// the region the column bus (grant), the selected row is freed in that cycle.
// In triggered mode a row that was never marked and is older than the trigger
// latency plus EXPIRE_SLACK cycles can no longer be triggered and is freed.
//
// From the description: comparators against the trigger timestamp, marking
// of matching lines, triggered and triggerless modes. Own choices: the
// expiry rule and its slack (the triggers are queued in the end-of-column
// logic, so a trigger can reach the region later than its latency), and the
// lowest-row-first output order. Timestamps may be Gray-coded; equality works
// on either code and the age is computed after conversion to binary.
module trigger_match
  import chipix_pkg::*;
#(
  parameter int unsigned DEPTH        = BUF_DEPTH,
  parameter int unsigned EXPIRE_SLACK = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DEPTH-1:0] valid,
  input  ts_t              row_ts [DEPTH],
  input  ts_t              cur_ts,
  input  logic             trig,
  input  ts_t              trig_ts,
  input  logic             triggerless,
  input  logic             gray_bypass,
  input  ts_t              latency,
  input  logic             grant,
  output logic [$clog2(DEPTH)-1:0] sel_row,
  output logic             trig_status,
  output logic [DEPTH-1:0] clr
);

  logic [DEPTH-1:0] marked, eff, match, expire, sel_onehot;
  ts_t              cur_bin;
  logic [TS_W:0]    limit;

  assign cur_bin = gray_bypass ? cur_ts : gray2bin(cur_ts);
  assign limit   = {1'b0, latency} + (TS_W+1)'(EXPIRE_SLACK);

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      ts_t row_bin, age;
      row_bin   = gray_bypass ? row_ts[i] : gray2bin(row_ts[i]);
      age       = cur_bin - row_bin;
      match[i]  = trig && valid[i] && (row_ts[i] == trig_ts);
      expire[i] = !triggerless && valid[i] && !marked[i] && !match[i]
                  && ({1'b0, age} > limit);
    end
  end

  assign eff         = triggerless ? valid : marked;
  assign trig_status = |eff;

  always_comb begin
    sel_row    = '0;
    sel_onehot = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (eff[i]) begin
        sel_row    = i[$clog2(DEPTH)-1:0];
        sel_onehot = DEPTH'(1) << i;
      end
  end

  assign clr = expire | (grant ? sel_onehot : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) marked <= '0;
    else        marked <= (marked | match) & valid & ~clr;
  end

endmodule
