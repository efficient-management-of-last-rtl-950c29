// gspc_llc: shared graphics last-level cache with stream-aware replacement.
//
// The cache sits between the per-stream render caches of a GPU (depth,
// stencil, hierarchical depth, render target/colour, vertex index, texture
// and vertex) and DRAM. It is set associative (default 8 MB, 16 ways, 64-byte
// blocks, so 8192 sets), non-inclusive and non-exclusive: evicting a block
// never invalidates a render cache. Replacement is two-bit RRIP whose
// insertion and promotion RRPVs are chosen by the GSPC policy (gspc_policy):
// Z and texture blocks are inserted at the distant RRPV when the reuse
// probability learned for their stream (or texture epoch) is below 1/(t+1),
// render-target blocks according to how many produced render-target blocks
// the texture samplers later consume, everything else as in SRRIP. A few
// sample sets always run SRRIP and feed the learner (gspc_rprob_learner).
// With ucd_en high, displayable colour writes that miss go straight to DRAM
// and are not allocated (the "uncached displayable colour" option).
//
// Operation, one request at a time:
//   reset     the tag array is swept, one set per cycle (NUM_SETS cycles),
//             then init_done rises;
//   accept    llc_stream_arb picks a port; its index is the stream;
//   lookup    the set's row of the tag array (all ways) is read and compared;
//   hit       RRPV/state updated, data read or written, response;
//   miss      rrip_victim picks a way (ageing the set); a dirty victim is
//             read and written to DRAM; a read then fetches the block from
//             DRAM, a write fills the block from the request (whole-block
//             writes, no fetch); the new block gets its RRPV and state.
// A read hit responds 3 cycles after acceptance, a write hit 2; misses add
// the DRAM time. rsp_valid is one-hot on the requesting port, for one cycle,
// and answers writes too (rsp_rdata then holds the written block).
//
// The organisation, the policy and the UCD option follow the described
// design. The address width, block size, the blocking one-request controller,
// whole-block write-allocate and all handshakes are this design's own
// choices.
//
// DRAM port: mem_req_* is a valid/ready request (block address, write flag,
// data); a read is answered later by one mem_rsp_valid pulse with its data.
module gspc_llc
  import llc_pkg::*;
#(
  parameter int unsigned NUM_SETS        = 8192,
  parameter int unsigned NUM_WAYS        = 16,
  parameter int unsigned BLOCK_BYTES     = 64,
  parameter int unsigned ADDR_W          = 36,
  parameter int unsigned NUM_SAMPLE_SETS = 32,
  parameter int unsigned CNT_W           = 16,
  localparam int unsigned NP     = NUM_STREAMS,
  localparam int unsigned PW     = $clog2(NP),
  localparam int unsigned BLK_W  = BLOCK_BYTES * 8,
  localparam int unsigned OFF_W  = $clog2(BLOCK_BYTES),
  localparam int unsigned SET_W  = $clog2(NUM_SETS),
  localparam int unsigned WAY_W  = $clog2(NUM_WAYS),
  localparam int unsigned BA_W   = ADDR_W - OFF_W,
  localparam int unsigned TAG_W  = BA_W - SET_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ucd_en,
  output logic                        init_done,
  // render-cache ports, index = stream_e
  input  logic [NP-1:0]               req_valid,
  output logic [NP-1:0]               req_ready,
  input  logic [NP-1:0][ADDR_W-1:0]   req_addr,
  input  logic [NP-1:0]               req_write,
  input  logic [NP-1:0]               req_disp,    // write of displayable colour
  input  logic [NP-1:0][BLK_W-1:0]    req_wdata,
  output logic [NP-1:0]               rsp_valid,
  output logic [BLK_W-1:0]            rsp_rdata,
  output logic                        rsp_hit,
  // DRAM
  output logic                        mem_req_valid,
  input  logic                        mem_req_ready,
  output logic                        mem_req_write,
  output logic [BA_W-1:0]             mem_req_addr,
  output logic [BLK_W-1:0]            mem_req_wdata,
  input  logic                        mem_rsp_valid,
  input  logic [BLK_W-1:0]            mem_rsp_rdata
);

  typedef struct packed {
    logic             valid;
    logic             dirty;
    rrpv_t            rrpv;
    blk_state_e       state;
    logic [TAG_W-1:0] tag;
  } way_t;
  typedef way_t [NUM_WAYS-1:0] row_t;
  localparam int unsigned ROW_W = $bits(row_t);

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_LOOK, S_DRD, S_VRD, S_WB, S_BYP, S_MRD, S_MWAIT, S_FILL, S_RSP
  } fsm_e;

  fsm_e state_q;

  // ---------------------------------------------------------------- arbiter
  logic          arb_valid, arb_ready;
  logic [PW-1:0] arb_port;

  llc_stream_arb #(.NUM_PORTS(NP)) u_arb (
    .clk, .rst_n,
    .req_valid, .req_ready,
    .out_valid(arb_valid), .out_port(arb_port), .out_ready(arb_ready)
  );

  assign arb_ready = (state_q == S_IDLE);
  wire accept = arb_valid && arb_ready;

  // ------------------------------------------------------- request register
  logic [PW-1:0]      port_q;
  logic [BA_W-1:0]    baddr_q;
  logic               write_q, disp_q;
  logic [BLK_W-1:0]   wdata_q;
  wire  [SET_W-1:0]   set_q = baddr_q[SET_W-1:0];
  wire  [TAG_W-1:0]   tag_q = baddr_q[BA_W-1:SET_W];
  wire  stream_e      stream_q = stream_e'(port_q);

  always_ff @(posedge clk) begin
    if (accept) begin
      port_q  <= arb_port;
      baddr_q <= req_addr[arb_port][ADDR_W-1:OFF_W];
      write_q <= req_write[arb_port];
      disp_q  <= req_disp[arb_port];
      wdata_q <= req_wdata[arb_port];
    end
  end

  // ----------------------------------------------------------------- arrays
  logic             tag_en, tag_we;
  logic [SET_W-1:0] tag_addr;
  row_t             tag_wrow, tag_rrow;
  logic [ROW_W-1:0] tag_rdata;
  assign tag_rrow = row_t'(tag_rdata);

  llc_sram #(.DEPTH(NUM_SETS), .WIDTH(ROW_W)) u_tag (
    .clk, .en(tag_en), .we(tag_we), .addr(tag_addr),
    .wdata(ROW_W'(tag_wrow)), .rdata(tag_rdata)
  );

  logic                   dat_en, dat_we;
  logic [SET_W+WAY_W-1:0] dat_addr;
  logic [BLK_W-1:0]       dat_wdata, dat_rdata;

  llc_sram #(.DEPTH(NUM_SETS * NUM_WAYS), .WIDTH(BLK_W)) u_data (
    .clk, .en(dat_en), .we(dat_we), .addr(dat_addr),
    .wdata(dat_wdata), .rdata(dat_rdata)
  );

  // ----------------------------------------------------------- tag compare
  logic [NUM_WAYS-1:0] hit_vec;
  logic                hit;
  logic [WAY_W-1:0]    hit_way;

  always_comb begin
    hit_way = '0;
    for (int w = NUM_WAYS - 1; w >= 0; w--) begin
      hit_vec[w] = tag_rrow[w].valid && tag_rrow[w].tag == tag_q;
      if (hit_vec[w]) hit_way = WAY_W'(w);
    end
    hit = |hit_vec;
  end

  // ----------------------------------------------------------------- victim
  logic  [NUM_WAYS-1:0] v_valid;
  rrpv_t [NUM_WAYS-1:0] v_rrpv, v_aged;
  logic  [WAY_W-1:0]    v_way;
  logic                 v_evict;

  always_comb begin
    for (int w = 0; w < NUM_WAYS; w++) begin
      v_valid[w] = tag_rrow[w].valid;
      v_rrpv[w]  = tag_rrow[w].rrpv;
    end
  end

  rrip_victim #(.NUM_WAYS(NUM_WAYS)) u_victim (
    .valid(v_valid), .rrpv(v_rrpv),
    .victim(v_way), .evict(v_evict), .rrpv_aged(v_aged)
  );

  // ----------------------------------------------------------------- policy
  row_t             row_q;       // set row kept from lookup to fill
  logic [WAY_W-1:0] way_q;       // hit or victim way
  logic             is_fill;
  blk_state_e       pol_old_state;
  rrpv_t            pol_rrpv;
  blk_state_e       pol_state;
  learn_ev_t        pol_ev, learn_ev;
  rprob_t           rprob;

  assign is_fill       = (state_q == S_FILL);
  assign pol_old_state = is_fill ? ST_E2P : tag_rrow[hit_way].state;

  gspc_policy #(.NUM_SETS(NUM_SETS), .NUM_SAMPLE_SETS(NUM_SAMPLE_SETS)) u_policy (
    .set_idx(set_q), .is_fill, .stream(stream_q), .write(write_q),
    .old_state(pol_old_state), .rprob,
    .sample(), .new_rrpv(pol_rrpv), .new_state(pol_state), .ev(pol_ev)
  );

  wire bypass  = ucd_en && write_q && disp_q;
  wire hit_upd = (state_q == S_LOOK) && hit;
  assign learn_ev = (hit_upd || is_fill) ? pol_ev : '0;

  gspc_rprob_learner #(.CNT_W(CNT_W)) u_learner (
    .clk, .rst_n, .ev(learn_ev), .rprob
  );

  // --------------------------------------------------------------- control
  logic [SET_W-1:0] init_cnt_q;
  logic [BLK_W-1:0] buf_q;       // victim data, DRAM fill data or response data
  logic             hit_q;

  always_comb begin
    tag_en    = 1'b0;
    tag_we    = 1'b0;
    tag_addr  = set_q;
    tag_wrow  = tag_rrow;
    dat_en    = 1'b0;
    dat_we    = 1'b0;
    dat_addr  = {set_q, way_q};
    dat_wdata = wdata_q;
    mem_req_valid = 1'b0;
    mem_req_write = 1'b0;
    mem_req_addr  = baddr_q;
    mem_req_wdata = wdata_q;

    unique case (state_q)
      S_INIT: begin
        tag_en   = 1'b1;
        tag_we   = 1'b1;
        tag_addr = init_cnt_q;
        tag_wrow = '0;
      end
      S_IDLE: begin
        tag_en   = accept;
        tag_addr = req_addr[arb_port][OFF_W +: SET_W];
      end
      S_LOOK: begin
        if (hit) begin
          tag_en   = 1'b1;
          tag_we   = 1'b1;
          tag_wrow[hit_way].rrpv  = pol_rrpv;
          tag_wrow[hit_way].state = pol_state;
          if (write_q) tag_wrow[hit_way].dirty = 1'b1;
          dat_en   = 1'b1;
          dat_we   = write_q;
          dat_addr = {set_q, hit_way};
        end else if (!bypass && v_evict && tag_rrow[v_way].dirty) begin
          dat_en   = 1'b1;
          dat_addr = {set_q, v_way};
        end
      end
      S_WB: begin
        mem_req_valid = 1'b1;
        mem_req_write = 1'b1;
        mem_req_addr  = {row_q[way_q].tag, set_q};
        mem_req_wdata = buf_q;
      end
      S_BYP: begin
        mem_req_valid = 1'b1;
        mem_req_write = 1'b1;
      end
      S_MRD: begin
        mem_req_valid = 1'b1;
      end
      S_FILL: begin
        tag_en   = 1'b1;
        tag_we   = 1'b1;
        tag_wrow = row_q;
        tag_wrow[way_q] = way_t'{valid: 1'b1, dirty: write_q, rrpv: pol_rrpv,
                                 state: pol_state, tag: tag_q};
        dat_en    = 1'b1;
        dat_we    = 1'b1;
        dat_wdata = write_q ? wdata_q : buf_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= S_INIT;
      init_cnt_q <= '0;
      init_done  <= 1'b0;
    end else begin
      unique case (state_q)
        S_INIT: begin
          init_cnt_q <= init_cnt_q + 1'b1;
          if (init_cnt_q == SET_W'(NUM_SETS - 1)) begin
            state_q   <= S_IDLE;
            init_done <= 1'b1;
          end
        end
        S_IDLE: if (accept) state_q <= S_LOOK;
        S_LOOK: begin
          row_q <= tag_rrow;
          hit_q <= hit;
          if (hit) begin
            way_q   <= hit_way;
            state_q <= write_q ? S_RSP : S_DRD;
            buf_q   <= wdata_q;
          end else if (bypass) begin
            state_q <= S_BYP;
            buf_q   <= wdata_q;
          end else begin
            way_q <= v_way;
            for (int w = 0; w < NUM_WAYS; w++) row_q[w].rrpv <= v_aged[w];
            if (v_evict && tag_rrow[v_way].dirty) state_q <= S_VRD;
            else                                  state_q <= write_q ? S_FILL : S_MRD;
          end
        end
        S_DRD: begin
          buf_q   <= dat_rdata;
          state_q <= S_RSP;
        end
        S_VRD: begin
          buf_q   <= dat_rdata;
          state_q <= S_WB;
        end
        S_WB:    if (mem_req_ready) state_q <= write_q ? S_FILL : S_MRD;
        S_BYP:   if (mem_req_ready) state_q <= S_RSP;
        S_MRD:   if (mem_req_ready) state_q <= S_MWAIT;
        S_MWAIT: if (mem_rsp_valid) begin
          buf_q   <= mem_rsp_rdata;
          state_q <= S_FILL;
        end
        S_FILL: begin
          if (write_q) buf_q <= wdata_q;
          state_q <= S_RSP;
        end
        S_RSP:   state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rsp_valid = '0;
    if (state_q == S_RSP) rsp_valid[port_q] = 1'b1;
  end
  assign rsp_rdata = buf_q;
  assign rsp_hit   = hit_q;

  // A DRAM request is held until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr) && $stable(mem_req_write));
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rsp_valid));

endmodule
