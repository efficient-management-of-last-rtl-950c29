// llc_pkg: types and constants shared by the graphics last-level cache.
//
// The cache serves seven graphics streams, one per render cache, in the
// order of the block diagram of the LLC interface: depth (Z), stencil (STC),
// hierarchical depth (HIZ), render target / colour (RT), vertex index
// (VTXIDX), texture sampler (TEX) and vertex (VTX). Every block carries a
// two-bit re-reference prediction value (RRPV, 0 = re-used soon, 3 = evict
// first) and two state bits that say which texture epoch the block is in
// (E0, E1, E2 and later) or that it is a render-target block freshly written
// by the colour ROPs and not yet read by the samplers.
//
// The stream set, the two-bit RRPV and the four block states follow the
// described design; the numeric encodings are this design's own choice.
package llc_pkg;

  // Graphics streams. The encoding doubles as the arbiter port index.
  typedef enum logic [2:0] {
    STR_Z      = 3'd0,
    STR_STC    = 3'd1,
    STR_HIZ    = 3'd2,
    STR_RT     = 3'd3,
    STR_VTXIDX = 3'd4,
    STR_TEX    = 3'd5,
    STR_VTX    = 3'd6
  } stream_e;

  localparam int unsigned NUM_STREAMS = 7;

  // Per-block state bits.
  typedef enum logic [1:0] {
    ST_E0  = 2'd0,   // texture block, no texture hit yet since it became texture
    ST_E1  = 2'd1,   // texture block, one texture hit
    ST_E2P = 2'd2,   // texture block with two or more hits, or a non-texture block
    ST_RT  = 2'd3    // render-target block written by the colour ROPs, not yet sampled
  } blk_state_e;

  typedef logic [1:0] rrpv_t;
  localparam rrpv_t RRPV_NEAR    = 2'd0;
  localparam rrpv_t RRPV_LONG    = 2'd2;
  localparam rrpv_t RRPV_DISTANT = 2'd3;

  // Threshold comparisons produced by the reuse-probability learner.
  typedef struct packed {
    logic  z_low;       // t*HIT(Z)        < FILL(Z)
    logic  tex_e0_low;  // t*HIT(TEX,E0)   < FILL(TEX,E0)
    logic  tex_e1_low;  // t*HIT(TEX,E1)   < FILL(TEX,E1)
    rrpv_t rt_rrpv;     // insertion RRPV of a produced render-target block
  } rprob_t;

  // One-cycle counter increments raised by an access to a sample set.
  typedef struct packed {
    logic z_fill;
    logic z_hit;
    logic tex_e0_fill;
    logic tex_e0_hit;
    logic tex_e1_fill;
    logic tex_e1_hit;
    logic prod;
    logic cons;
  } learn_ev_t;

endpackage
