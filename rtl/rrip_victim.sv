// rrip_victim: victim choice for one set under two-bit RRIP.
//
// The block evicted is always one whose RRPV is 3. If no valid way holds 3,
// SRRIP ages the whole set, adding one to every RRPV until some way reaches
// 3; this unit does all those steps at once by adding (3 - largest RRPV) to
// every valid way, which gives the same result as the step-by-step loop. An
// invalid way, when there is one, is filled first and the set is not aged. Ties
// go to the lowest way number.
//
// Evicting at RRPV 3 and SRRIP ageing follow the described policy; the
// single-step ageing and the tie rule are this design's choices.
//
// Interface: per-way valid bits and RRPVs in; victim way, whether it is a
// valid (evicted) block, and the aged RRPVs of the set out. Combinational.
module rrip_victim
  import llc_pkg::*;
#(
  parameter int unsigned NUM_WAYS = 16,
  localparam int unsigned WAY_W   = $clog2(NUM_WAYS)
) (
  input  logic  [NUM_WAYS-1:0] valid,
  input  rrpv_t [NUM_WAYS-1:0] rrpv,
  output logic  [WAY_W-1:0]    victim,
  output logic                 evict,     // victim holds a valid block
  output rrpv_t [NUM_WAYS-1:0] rrpv_aged  // RRPVs to write back (aged only when a block is evicted)
);

  rrpv_t max_rrpv;
  rrpv_t delta;
  logic  found_inv;

  always_comb begin
    max_rrpv = RRPV_NEAR;
    for (int w = 0; w < NUM_WAYS; w++)
      if (valid[w] && rrpv[w] > max_rrpv) max_rrpv = rrpv[w];
    delta = RRPV_DISTANT - max_rrpv;

    found_inv = 1'b0;
    victim    = '0;
    for (int w = NUM_WAYS - 1; w >= 0; w--) begin
      if (!valid[w]) begin
        found_inv = 1'b1;
        victim    = WAY_W'(w);
      end
    end

    // The set is aged only when something has to be evicted.
    for (int w = 0; w < NUM_WAYS; w++)
      rrpv_aged[w] = (valid[w] && !found_inv) ? rrpv_t'(rrpv[w] + delta) : rrpv[w];

    if (!found_inv) begin
      for (int w = NUM_WAYS - 1; w >= 0; w--)
        if (rrpv_aged[w] == RRPV_DISTANT) victim = WAY_W'(w);
    end
    evict = !found_inv;
  end

endmodule
