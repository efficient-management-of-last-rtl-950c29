// gspc_policy: stream-aware RRPV and block-state decision of the LLC.
//
// Given one access that either hits a block or fills a new one, this purely
// combinational unit returns the block's new RRPV, its new state bits and the
// learning events the access raises. It also decides whether the access's set
// is one of the sample sets.
//
// Sample sets always run SRRIP (fill at RRPV 2, hit to RRPV 0) and raise the
// learner's counter events. All other sets follow GSPC:
//   Z fill       RRPV = (t*HIT(Z) < FILL(Z)) ? 3 : 2
//   TEX fill     block enters epoch E0, RRPV = (t*HIT(TEX,E0) < FILL(TEX,E0)) ? 3 : 0
//   TEX hit, E0  block enters epoch E1, RRPV = (t*HIT(TEX,E1) < FILL(TEX,E1)) ? 3 : 0
//   RT fill      RRPV from the PROD/CONS comparison (3, 2 or 0)
//   other fills  RRPV = 2, as in SRRIP
//   other hits   RRPV = 0, as in SRRIP
// These rules, t = 8 and the use of the sample sets follow the described
// policy. This design's own choices: which sets sample (the first set of
// every group of NUM_SETS/NUM_SAMPLE_SETS), that only colour-ROP writes mark
// a block as freshly produced, that a texture hit on such a block counts one
// consumption and moves the block to E0, and that non-texture fills put the
// block in state E2P.
//
// Interface: set index, access kind (fill or hit), stream, write flag and the
// block's old state in; RRPV, state and learning events out. No clock.
module gspc_policy
  import llc_pkg::*;
#(
  parameter int unsigned NUM_SETS        = 8192,
  parameter int unsigned NUM_SAMPLE_SETS = 32,
  localparam int unsigned SET_W          = $clog2(NUM_SETS)
) (
  input  logic [SET_W-1:0] set_idx,
  input  logic             is_fill,    // 1: new block filled, 0: hit on a resident block
  input  stream_e          stream,
  input  logic             write,
  input  blk_state_e       old_state,  // state of the hit block (ignored on a fill)
  input  rprob_t           rprob,
  output logic             sample,     // the set is a sample set
  output rrpv_t            new_rrpv,
  output blk_state_e       new_state,
  output learn_ev_t        ev          // counter events, only raised by sample sets
);

  localparam int unsigned GROUP = NUM_SETS / NUM_SAMPLE_SETS;
  localparam int unsigned GRP_W = (GROUP > 1) ? $clog2(GROUP) : 1;

  initial begin
    assert (NUM_SAMPLE_SETS >= 1 && NUM_SAMPLE_SETS <= NUM_SETS && (GROUP & (GROUP - 1)) == 0)
      else $error("NUM_SETS/NUM_SAMPLE_SETS must be a power of two");
  end

  always_comb begin
    if (GROUP > 1) sample = (set_idx[GRP_W-1:0] == '0);
    else           sample = 1'b1;
  end

  // State bits, kept the same way in sample and follower sets.
  always_comb begin
    new_state = old_state;
    if (is_fill) begin
      if (stream == STR_TEX)               new_state = ST_E0;
      else if (stream == STR_RT && write)  new_state = ST_RT;
      else                                 new_state = ST_E2P;
    end else begin
      if (stream == STR_TEX) begin
        unique case (old_state)
          ST_E0:   new_state = ST_E1;
          ST_E1:   new_state = ST_E2P;
          ST_E2P:  new_state = ST_E2P;
          ST_RT:   new_state = ST_E0;
          default: new_state = ST_E2P;
        endcase
      end else if (stream == STR_RT && write) begin
        new_state = ST_RT;
      end
    end
  end

  // RRPV.
  always_comb begin
    if (sample) begin
      new_rrpv = is_fill ? RRPV_LONG : RRPV_NEAR;
    end else if (is_fill) begin
      unique case (stream)
        STR_Z:   new_rrpv = rprob.z_low      ? RRPV_DISTANT : RRPV_LONG;
        STR_TEX: new_rrpv = rprob.tex_e0_low ? RRPV_DISTANT : RRPV_NEAR;
        STR_RT:  new_rrpv = rprob.rt_rrpv;
        default: new_rrpv = RRPV_LONG;
      endcase
    end else if (stream == STR_TEX && old_state == ST_E0) begin
      new_rrpv = rprob.tex_e1_low ? RRPV_DISTANT : RRPV_NEAR;
    end else begin
      new_rrpv = RRPV_NEAR;
    end
  end

  // Learning events from the sample sets.
  always_comb begin
    ev = '0;
    if (sample) begin
      ev.z_fill      = is_fill  && stream == STR_Z;
      ev.z_hit       = !is_fill && stream == STR_Z;
      ev.tex_e0_fill = is_fill  && stream == STR_TEX;
      ev.tex_e0_hit  = !is_fill && stream == STR_TEX && old_state == ST_E0;
      ev.tex_e1_fill = ev.tex_e0_hit;
      ev.tex_e1_hit  = !is_fill && stream == STR_TEX && old_state == ST_E1;
      ev.prod        = stream == STR_RT && write && (is_fill || old_state != ST_RT);
      ev.cons        = !is_fill && stream == STR_TEX && old_state == ST_RT;
    end
  end

endmodule
