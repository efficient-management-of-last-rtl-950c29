// tb_gspc_llc: end-to-end test of the graphics LLC at a reduced size.
//
// A 64-set, 4-way cache (every 8th set a sample set, 8-bit learner counters)
// is driven through its seven stream ports, with a fixed-latency DRAM model
// behind it. Every read is checked against a reference memory that follows
// the testbench's own writes. Directed phases then train the learner and
// check the insertion RRPV the policy picks in follower sets against values
// worked out from the access counts sent: Z and texture distant insertion,
// texture E0->E1 promotion, the three render-target insertion levels, render
// to texture consumption, uncached displayable colour, dirty write-back and
// SRRIP eviction order in a sample set, round-robin arbitration, counter
// halving, and the hit latencies (3 cycles for a read, 2 for a write). A
// random phase follows. Each mechanism is counted; one never seen fails.
module tb_gspc_llc;
  import llc_pkg::*;

  localparam int unsigned SETS   = 64;
  localparam int unsigned WAYS   = 4;
  localparam int unsigned SAMPLE = 8;       // every SETS/SAMPLE = 8th set samples
  localparam int unsigned ADDR_W = 36;
  localparam int unsigned BLK_W  = 512;
  localparam int unsigned BA_W   = ADDR_W - 6;
  localparam int unsigned NP     = 7;
  localparam int unsigned SET_W  = 6;

  logic clk = 0;
  logic rst_n = 0;
  logic ucd_en = 0;
  logic init_done;
  logic [NP-1:0]             req_valid = '0, req_ready;
  logic [NP-1:0][ADDR_W-1:0] req_addr = '0;
  logic [NP-1:0]             req_write = '0, req_disp = '0;
  logic [NP-1:0][BLK_W-1:0]  req_wdata = '0;
  logic [NP-1:0]             rsp_valid;
  logic [BLK_W-1:0]          rsp_rdata;
  logic                      rsp_hit;
  logic                      mem_req_valid, mem_req_ready, mem_req_write;
  logic [BA_W-1:0]           mem_req_addr;
  logic [BLK_W-1:0]          mem_req_wdata, mem_rsp_rdata;
  logic                      mem_rsp_valid;

  gspc_llc #(.NUM_SETS(SETS), .NUM_WAYS(WAYS), .ADDR_W(ADDR_W),
             .NUM_SAMPLE_SETS(SAMPLE), .CNT_W(8)) dut (.*);

  dram_model #(.BA_W(BA_W), .BLK_W(BLK_W), .LATENCY(12)) u_dram (.*);

  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // ------------------------------------------------------ reference memory
  logic [BLK_W-1:0] ref_mem [logic [BA_W-1:0]];

  function automatic logic [BLK_W-1:0] pattern(logic [BA_W-1:0] a);
    logic [BLK_W-1:0] d;
    for (int i = 0; i < BLK_W / 32; i++)
      d[i*32 +: 32] = 32'(a) * 32'h9E37_79B1 + 32'(i);
    return d;
  endfunction

  function automatic logic [BLK_W-1:0] expected(logic [BA_W-1:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : pattern(a);
  endfunction

  function automatic logic [BLK_W-1:0] rand_blk();
    logic [BLK_W-1:0] d;
    for (int i = 0; i < BLK_W / 32; i++) d[i*32 +: 32] = $urandom;
    return d;
  endfunction

  // block address of (tag, set)
  function automatic logic [ADDR_W-1:0] addr_of(int unsigned tag, int unsigned set);
    return ADDR_W'({BA_W'(tag) << SET_W | BA_W'(set), 6'b0});
  endfunction

  // ------------------------------------------------------------- one access
  logic      last_hit;
  int        last_lat;
  rrpv_t     last_fill_rrpv;
  rrpv_t     last_hit_rrpv;

  task automatic access(stream_e s, logic [ADDR_W-1:0] a, bit wr,
                        logic [BLK_W-1:0] d = '0, bit disp = 0);
    int unsigned p = int'(s);
    int          t0;
    @(negedge clk);
    req_valid[p] = 1;
    req_addr[p]  = a;
    req_write[p] = wr;
    req_disp[p]  = disp;
    req_wdata[p] = d;
    #1;
    while (!req_ready[p]) begin
      @(negedge clk);
      #1;
    end
    t0 = cyc;
    @(negedge clk);
    req_valid[p] = 0;
    while (!rsp_valid[p]) @(negedge clk);
    last_lat = cyc - t0;
    last_hit = rsp_hit;
    if (wr) ref_mem[a[ADDR_W-1:6]] = d;
    else check(rsp_rdata == expected(a[ADDR_W-1:6]), $sformatf("read data %h", a));
  endtask

  // ------------------------------------------------------ mechanism probes
  // controller states, in the order of the controller's state list
  localparam logic [3:0] S_IDLE = 1, S_LOOK = 2, S_WB = 5, S_BYP = 6, S_MRD = 7, S_FILL = 9;
  logic [3:0] st;
  assign st = dut.state_q;
  int n_rd_hit, n_rd_miss, n_wr_hit, n_wr_alloc, n_wb, n_byp, n_age, n_arb;
  int n_z_far, n_tex_far, n_e1_far, n_rt3, n_rt2, n_rt0, n_cons, n_halve;

  always @(posedge clk) if (rst_n) begin
    if (st == S_LOOK && dut.hit) begin
      if (dut.write_q) n_wr_hit++; else n_rd_hit++;
      last_hit_rrpv <= dut.pol_rrpv;
      if (!dut.u_policy.sample && dut.stream_q == STR_TEX && dut.pol_old_state == ST_E0
          && dut.pol_rrpv == RRPV_DISTANT) n_e1_far++;
    end
    if (st == S_LOOK && !dut.hit && dut.v_evict) begin
      automatic bit any3 = 0;
      for (int w = 0; w < WAYS; w++) if (dut.v_rrpv[w] == 2'd3) any3 = 1;
      if (!any3) n_age++;
    end
    if (st == S_MRD && mem_req_ready) n_rd_miss++;
    if (st == S_FILL && dut.write_q) n_wr_alloc++;
    if (st == S_WB && mem_req_ready) n_wb++;
    if (st == S_BYP && mem_req_ready) n_byp++;
    if (dut.arb_ready && $countones(req_valid) > 1) n_arb++;
    if (dut.is_fill) begin
      last_fill_rrpv <= dut.pol_rrpv;
      if (!dut.u_policy.sample) begin
        if (dut.stream_q == STR_Z && dut.pol_rrpv == RRPV_DISTANT) n_z_far++;
        if (dut.stream_q == STR_TEX && dut.pol_rrpv == RRPV_DISTANT) n_tex_far++;
        if (dut.stream_q == STR_RT && dut.write_q) begin
          if (dut.pol_rrpv == 2'd3) n_rt3++;
          if (dut.pol_rrpv == 2'd2) n_rt2++;
          if (dut.pol_rrpv == 2'd0) n_rt0++;
        end
      end
    end
    if (dut.learn_ev.cons) n_cons++;
    if (dut.learn_ev.z_fill && dut.u_learner.z_q.fill == 8'hff) n_halve++;
  end

  // --------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ test
  int unsigned tag_next = 1;
  function automatic int unsigned fresh();
    return tag_next++;
  endfunction

  initial begin
    logic [ADDR_W-1:0] a, b;
    logic [BLK_W-1:0]  d;
    int unsigned       order[$];

    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    check(cyc >= SETS, "tag sweep takes one cycle per set");

    // --- basic miss, hit and latencies (follower set 1)
    a = addr_of(fresh(), 1);
    access(STR_VTX, a, 0);
    check(!last_hit, "first read misses");
    access(STR_VTX, a, 0);
    check(last_hit && last_lat == 3, $sformatf("read hit in 3 cycles (got %0d)", last_lat));
    access(STR_STC, a, 1, rand_blk());
    check(last_hit && last_lat == 2, $sformatf("write hit in 2 cycles (got %0d)", last_lat));
    access(STR_VTX, a, 0);

    // --- Z: 9 misses in sample set 0, no hits: 8*0 < 9, Z fills go distant
    for (int i = 0; i < 9; i++) access(STR_Z, addr_of(fresh(), 0), 0);
    check(dut.rprob.z_low, "Z low reuse learned");
    access(STR_Z, addr_of(fresh(), 1), 0);
    check(last_fill_rrpv == 2'd3, "Z follower fill at RRPV 3");
    // two hits in the sample set: 8*2 = 16 >= 9 fills, back to RRPV 2
    a = addr_of(fresh(), 0);
    access(STR_Z, a, 0);                       // fill 10
    access(STR_Z, a, 0);
    check(last_hit && last_hit_rrpv == 2'd0, "sample-set hit to RRPV 0");
    access(STR_Z, a, 0);
    check(!dut.rprob.z_low, "Z reuse high after hits");
    access(STR_Z, addr_of(fresh(), 2), 0);
    check(last_fill_rrpv == 2'd2, "Z follower fill at RRPV 2");

    // --- texture: follower fill with no learning yet is RRPV 0
    access(STR_TEX, addr_of(fresh(), 3), 0);
    check(last_fill_rrpv == 2'd0, "TEX follower fill at RRPV 0 before learning");
    // 3 texture fills in sample set 8 and one E0 hit: 8*1 < 3 is false;
    // 6 more fills: 8*1 < 9, texture fills go distant
    b = addr_of(fresh(), 8);
    access(STR_TEX, b, 0);
    for (int i = 0; i < 2; i++) access(STR_TEX, addr_of(fresh(), 8), 0);
    access(STR_TEX, b, 0);
    check(last_hit && !dut.rprob.tex_e0_low, "E0 hit counted");
    for (int i = 0; i < 6; i++) access(STR_TEX, addr_of(fresh(), 8), 0);
    check(dut.rprob.tex_e0_low, "TEX E0 low reuse learned");
    a = addr_of(fresh(), 3);
    access(STR_TEX, a, 0);
    check(last_fill_rrpv == 2'd3, "TEX follower fill at RRPV 3");
    // E1 so far: FILL = number of E0 hits, HIT = 0 -> E1 low, promotion distant
    check(dut.rprob.tex_e1_low, "TEX E1 low reuse learned");
    access(STR_TEX, a, 0);
    check(last_hit && last_hit_rrpv == 2'd3, "TEX E0->E1 hit stays distant");
    access(STR_TEX, a, 0);
    check(last_hit && last_hit_rrpv == 2'd0, "TEX E1 hit to RRPV 0");

    // --- render targets
    access(STR_RT, addr_of(fresh(), 4), 1, rand_blk());
    check(last_fill_rrpv == 2'd0, "RT fill at RRPV 0 with PROD = 8*CONS = 0");
    for (int i = 0; i < 12; i++) access(STR_RT, addr_of(fresh(), 16), 1, rand_blk());
    check(dut.rprob.rt_rrpv == 2'd3, "PROD > 16*CONS");
    access(STR_RT, addr_of(fresh(), 4), 1, rand_blk());
    check(last_fill_rrpv == 2'd3, "RT fill at RRPV 3");
    // consume the newest produced block from the sample set: CONS = 1
    access(STR_TEX, addr_of(tag_next - 2, 16), 0);
    check(last_hit, "texture sampler reads produced RT block from LLC");
    check(dut.rprob.rt_rrpv == 2'd2, "16*CONS >= PROD > 8*CONS");
    access(STR_RT, addr_of(fresh(), 5), 1, rand_blk());
    check(last_fill_rrpv == 2'd2, "RT fill at RRPV 2");

    // --- uncached displayable colour
    ucd_en = 1;
    a = addr_of(fresh(), 6);
    d = rand_blk();
    access(STR_RT, a, 1, d, 1);
    check(u_dram.mem.exists(a[ADDR_W-1:6]) && u_dram.mem[a[ADDR_W-1:6]] == d, "UCD write in DRAM");
    access(STR_RT, a, 0);
    check(!last_hit, "UCD write not allocated");
    ucd_en = 0;
    a = addr_of(fresh(), 6);
    access(STR_RT, a, 1, rand_blk(), 1);
    access(STR_RT, a, 0);
    check(last_hit, "display write allocated with UCD off");

    // --- SRRIP eviction and dirty write-back in sample set 24
    begin
      logic [ADDR_W-1:0] blk [5];
      int unsigned       wb0;
      for (int i = 0; i < 5; i++) blk[i] = addr_of(fresh(), 24);
      for (int i = 0; i < 4; i++) access(STR_HIZ, blk[i], 1, rand_blk());
      wb0 = u_dram.writes;
      access(STR_HIZ, blk[4], 0);
      check(u_dram.writes == wb0 + 1, "dirty victim written back");
      check(u_dram.mem.exists(blk[0][ADDR_W-1:6]) &&
            u_dram.mem[blk[0][ADDR_W-1:6]] == ref_mem[blk[0][ADDR_W-1:6]],
            "oldest block (way 0) evicted with its data");
      access(STR_HIZ, blk[1], 0);
      check(last_hit, "second block still resident");
      access(STR_HIZ, blk[0], 0);
      check(!last_hit, "evicted block misses and is re-read from DRAM");
    end

    // --- round-robin: all ports at once, last grant was port 2 (HIZ)
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      req_valid[p] = 1;
      req_write[p] = 0;
      req_disp[p]  = 0;
      req_addr[p]  = addr_of(fresh(), 40 + p);
    end
    while (order.size() < NP) begin
      #1;
      for (int p = 0; p < NP; p++) if (req_valid[p] && dut.accept && dut.arb_port == p) begin
        order.push_back(p);
      end
      // drop the request once it has been taken (state left IDLE)
      if (st == S_LOOK) req_valid[dut.port_q] = 0;
      if (|rsp_valid) check(rsp_rdata == expected(req_addr[dut.port_q][ADDR_W-1:6]), "rr read data");
      @(negedge clk);
    end
    while (st != S_IDLE) @(negedge clk);
    for (int k = 0; k < NP; k++)
      check(order[k] == (3 + k) % NP, $sformatf("grant %0d to port %0d", k, order[k]));

    // --- counter halving: 250 more Z misses into the sample sets
    for (int i = 0; i < 250; i++) access(STR_Z, addr_of(fresh(), 8 * (i % 8)), 0);

    // --- random traffic over a small footprint
    for (int i = 0; i < 3000; i++) begin
      stream_e s;
      bit      wr;
      s  = stream_e'($urandom_range(0, NP - 1));
      wr = (s inside {STR_Z, STR_STC, STR_HIZ, STR_RT}) && ($urandom_range(0, 2) == 0);
      a = addr_of(1000 + $urandom_range(0, 11), $urandom_range(0, 7));
      access(s, a, wr, rand_blk(), $urandom_range(0, 3) == 0);
      if ((i % 500) == 0) ucd_en = ~ucd_en;
    end
    // read back the whole footprint
    for (int t = 0; t < 12; t++)
      for (int s = 0; s < 8; s++) access(STR_VTX, addr_of(1000 + t, s), 0);

    $display("mechanisms: rd_hit=%0d rd_miss=%0d wr_hit=%0d wr_alloc=%0d writeback=%0d ucd_bypass=%0d ageing=%0d arb_conflict=%0d",
             n_rd_hit, n_rd_miss, n_wr_hit, n_wr_alloc, n_wb, n_byp, n_age, n_arb);
    $display("mechanisms: z_distant=%0d tex_distant=%0d e1_distant=%0d rt3=%0d rt2=%0d rt0=%0d rt_consumed=%0d halving=%0d",
             n_z_far, n_tex_far, n_e1_far, n_rt3, n_rt2, n_rt0, n_cons, n_halve);
    check(n_rd_hit > 0, "read hit seen");
    check(n_rd_miss > 0, "read miss seen");
    check(n_wr_hit > 0, "write hit seen");
    check(n_wr_alloc > 0, "write allocate seen");
    check(n_wb > 0, "write-back seen");
    check(n_byp > 0, "UCD bypass seen");
    check(n_age > 0, "set ageing seen");
    check(n_arb > 0, "arbitration conflict seen");
    check(n_z_far > 0, "Z distant insertion seen");
    check(n_tex_far > 0, "TEX distant insertion seen");
    check(n_e1_far > 0, "E1 distant promotion seen");
    check(n_rt3 > 0 && n_rt2 > 0 && n_rt0 > 0, "all RT insertion levels seen");
    check(n_cons > 0, "render-to-texture consumption seen");
    check(n_halve > 0, "counter halving seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
