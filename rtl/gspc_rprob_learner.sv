// gspc_rprob_learner: reuse-probability counters of the GSPC policy.
//
// Eight saturating counters are fed by the sample sets: HIT and FILL for the
// Z stream, HIT and FILL for texture epoch E0, HIT and FILL for texture epoch
// E1, and PROD (render-target blocks written by the colour ROPs) and CONS
// (such blocks read by the texture samplers). From them it produces, every
// cycle, the comparisons the insertion rules need, using shifts only since
// the threshold t = 8 and the factors 8 and 16 are powers of two:
//   z_low      = 8*HIT(Z)      < FILL(Z)
//   tex_e0_low = 8*HIT(TEX,E0) < FILL(TEX,E0)
//   tex_e1_low = 8*HIT(TEX,E1) < FILL(TEX,E1)
//   rt_rrpv    = PROD > 16*CONS ? 3 : PROD > 8*CONS ? 2 : 0
// The counters, the comparisons and t = 8 follow the described policy. The
// counter width CNT_W and the ageing rule are this design's own: when one
// counter of a pair is about to pass its maximum, both counters of the pair
// are halved in that same cycle, which keeps their ratio and lets the
// estimate follow phase changes.
//
// Interface: one learn_ev_t of increments per cycle in (any subset may be
// set), rprob_t out, registered counters, synchronous active-low reset.
module gspc_rprob_learner
  import llc_pkg::*;
#(
  parameter int unsigned CNT_W   = 16,
  parameter int unsigned T_SHIFT = 3     // t = 2**T_SHIFT = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  learn_ev_t ev,
  output rprob_t    rprob
);

  typedef logic [CNT_W-1:0] cnt_t;
  typedef struct packed { cnt_t hit; cnt_t fill; } pair_t;

  pair_t z_q, e0_q, e1_q, pc_q;   // pc_q.hit = CONS, pc_q.fill = PROD

  function automatic pair_t bump(pair_t p, logic inc_hit, logic inc_fill);
    pair_t r;
    logic  sat;
    sat = (inc_hit && p.hit == '1) || (inc_fill && p.fill == '1);
    r   = sat ? pair_t'{hit: p.hit >> 1, fill: p.fill >> 1} : p;
    r.hit  = r.hit  + cnt_t'(inc_hit);
    r.fill = r.fill + cnt_t'(inc_fill);
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z_q  <= '0;
      e0_q <= '0;
      e1_q <= '0;
      pc_q <= '0;
    end else begin
      z_q  <= bump(z_q,  ev.z_hit,      ev.z_fill);
      e0_q <= bump(e0_q, ev.tex_e0_hit, ev.tex_e0_fill);
      e1_q <= bump(e1_q, ev.tex_e1_hit, ev.tex_e1_fill);
      pc_q <= bump(pc_q, ev.cons,       ev.prod);
    end
  end

  // Comparisons, widened so that the shifted counter cannot overflow.
  typedef logic [CNT_W+4:0] wide_t;

  function automatic logic low(pair_t p);
    return (wide_t'(p.hit) << T_SHIFT) < wide_t'(p.fill);
  endfunction

  always_comb begin
    rprob.z_low      = low(z_q);
    rprob.tex_e0_low = low(e0_q);
    rprob.tex_e1_low = low(e1_q);
    if (wide_t'(pc_q.fill) > (wide_t'(pc_q.hit) << 4))
      rprob.rt_rrpv = RRPV_DISTANT;
    else if (wide_t'(pc_q.fill) > (wide_t'(pc_q.hit) << 3))
      rprob.rt_rrpv = RRPV_LONG;
    else
      rprob.rt_rrpv = RRPV_NEAR;
  end

endmodule
