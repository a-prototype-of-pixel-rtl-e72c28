// hit_mapper: ToT compression of one pixel region.
//
// Combinational. It takes the hit flags and ToTs of the 16 pixels of a region
// (pixel index = 4*row + column), and builds the event the shared buffer
// stores: the hit map (one bit per flagged pixel) and the ToTs of the first
// NTOT = 6 flagged pixels in priority order, lowest index first. ToT slot k
// holds the k-th set bit of the hit map, so the event is rebuilt off-chip by
// walking the hit map from bit 0 upwards. Pixels beyond the sixth keep only
// their hit-map bit. latch_en goes high when any pixel is flagged; it is the
// write strobe for the shared buffer and, in the same cycle, the release of
// the flagged pixels.
//
// From the description: first 6 pixels through a priority queue, hit map plus
// ToTs, rebuilt off-chip by reversing the queue. Own choice: the queue order
// (lowest pixel index first) and unused ToT slots set to zero.
module hit_mapper
  import chipix_pkg::*;
(
  input  hitmap_t    hit_flags,
  input  tot_t       tots_in [NPIX],
  output hitmap_t    hitmap,
  output tots_t      tots_out,
  output logic       latch_en
);

  always_comb begin
    int unsigned slot;
    slot     = 0;
    tots_out = '0;
    for (int unsigned p = 0; p < NPIX; p++) begin
      if (hit_flags[p] && slot < NTOT) begin
        tots_out[slot*TOT_W +: TOT_W] = tots_in[p];
        slot = slot + 1;
      end
    end
  end

  assign hitmap   = hit_flags;
  assign latch_en = |hit_flags;

endmodule
