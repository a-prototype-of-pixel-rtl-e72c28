// output_stage: column-drain link of one pixel region.
//
// Combinational. The busy flags of the regions of a macro column form an OR
// chain: busy_out = busy_prev | my_busy. The data multiplexer passes the
// preceding region's data while busy_prev is set, and this region's own
// selected row otherwise. A region therefore drives the bus, and is granted
// the read of its row (grant), only when it is busy and no region before it
// is. The chain ends in the macro column drainer, which stores one word per
// cycle while the column busy is high. This is the column drain readout as
// described; the grant output that frees the read row is this design's way of
// emptying the row.
module output_stage
  import chipix_pkg::*;
(
  input  logic     my_busy,
  input  pr_data_t my_data,
  input  logic     busy_prev,
  input  pr_data_t data_prev,
  output logic     busy_out,
  output pr_data_t data_out,
  output logic     grant
);

  assign busy_out = busy_prev | my_busy;
  assign data_out = busy_prev ? data_prev : my_data;
  assign grant    = my_busy & ~busy_prev;

endmodule
