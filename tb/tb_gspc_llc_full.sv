// tb_gspc_llc_full: the graphics LLC at its full default size.
//
// 8 MB, 16 ways, 64-byte blocks, 8192 sets, 32 sample sets (every 256th
// set), 16-bit learner counters. After the reset sweep of the tag array
// (8192 cycles) the test makes read misses and hits, fills one sample set
// with 17 dirty render-target blocks so that the oldest is written back and
// re-read from DRAM, trains the Z reuse counters in the sample sets until a
// follower-set Z fill is inserted at RRPV 3, and finishes with random
// traffic from all seven streams, every read checked against a reference
// memory. Texture learning, the render-target insertion levels 0 and 3 and
// the uncached displayable-colour bypass are also exercised at this size.
module tb_gspc_llc_full;
  import llc_pkg::*;

  localparam int unsigned ADDR_W = 36;
  localparam int unsigned BLK_W  = 512;
  localparam int unsigned BA_W   = ADDR_W - 6;
  localparam int unsigned NP     = 7;
  localparam int unsigned SET_W  = 13;
  localparam int unsigned WAYS   = 16;

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

  gspc_llc dut (.*);

  dram_model #(.BA_W(BA_W), .BLK_W(BLK_W), .LATENCY(40)) u_dram (.*);

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

  function automatic logic [ADDR_W-1:0] addr_of(int unsigned tag, int unsigned set);
    return ADDR_W'({BA_W'(tag) << SET_W | BA_W'(set), 6'b0});
  endfunction

  logic  last_hit;
  int    last_lat;
  rrpv_t last_fill_rrpv;

  always @(posedge clk) if (dut.is_fill) last_fill_rrpv <= dut.pol_rrpv;

  task automatic access(stream_e s, logic [ADDR_W-1:0] a, bit wr, logic [BLK_W-1:0] d = '0);
    int unsigned p = int'(s);
    int          t0;
    @(negedge clk);
    req_valid[p] = 1;
    req_addr[p]  = a;
    req_write[p] = wr;
    req_disp[p]  = 0;
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

  // a displayable-colour write on the render-target port
  task automatic access_disp(logic [ADDR_W-1:0] a, logic [BLK_W-1:0] d);
    int unsigned p = int'(STR_RT);
    @(negedge clk);
    req_valid[p] = 1;
    req_addr[p]  = a;
    req_write[p] = 1;
    req_disp[p]  = 1;
    req_wdata[p] = d;
    #1;
    while (!req_ready[p]) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    req_valid[p] = 0;
    req_disp[p]  = 0;
    while (!rsp_valid[p]) @(negedge clk);
    ref_mem[a[ADDR_W-1:6]] = d;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ADDR_W-1:0] a;
    logic [ADDR_W-1:0] blk [WAYS + 1];
    int unsigned       wb0;

    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    check(cyc >= 8192, "tag sweep over 8192 sets");

    a = addr_of(7, 1234);
    access(STR_VTX, a, 0);
    check(!last_hit, "cold read misses");
    access(STR_VTXIDX, a, 0);
    check(last_hit && last_lat == 3, "read hit in 3 cycles");

    // 17 render-target writes into sample set 256: the first is evicted
    for (int i = 0; i <= WAYS; i++) blk[i] = addr_of(100 + i, 256);
    for (int i = 0; i < WAYS; i++) access(STR_RT, blk[i], 1, rand_blk());
    wb0 = u_dram.writes;
    access(STR_RT, blk[WAYS], 1, rand_blk());
    check(u_dram.writes == wb0 + 1, "dirty victim written back");
    check(u_dram.mem.exists(blk[0][ADDR_W-1:6]) &&
          u_dram.mem[blk[0][ADDR_W-1:6]] == ref_mem[blk[0][ADDR_W-1:6]], "victim is the oldest block");
    for (int i = 1; i <= WAYS; i++) begin
      access(STR_TEX, blk[i], 0);
      check(last_hit, "produced block read by the sampler");
    end
    access(STR_TEX, blk[0], 0);
    check(!last_hit, "evicted block re-read from DRAM");

    // Z misses in the sample sets: 8*HIT(Z) < FILL(Z)
    for (int i = 0; i < 20; i++) access(STR_Z, addr_of(500 + i, 256 * (i % 32)), 0);
    check(dut.rprob.z_low, "Z low reuse learned");
    access(STR_Z, addr_of(999, 77), 0);
    check(last_fill_rrpv == 2'd3, "Z follower fill at RRPV 3");

    // texture misses in the sample sets: texture fills go distant
    for (int i = 0; i < 20; i++) access(STR_TEX, addr_of(600 + i, 256 * (i % 32) + 512), 0);
    check(dut.rprob.tex_e0_low, "TEX E0 low reuse learned");
    access(STR_TEX, addr_of(999, 78), 0);
    check(last_fill_rrpv == 2'd3, "TEX follower fill at RRPV 3");

    // render targets produced in sample sets: 16 of 17 consumed above, so
    // PROD = 17 <= 8*CONS and follower RT fills stay at RRPV 0
    access(STR_RT, addr_of(999, 79), 1, rand_blk());
    check(last_fill_rrpv == 2'd0, "RT follower fill at RRPV 0 while consumed");
    // 300 more produced, none consumed: PROD > 16*CONS
    for (int i = 0; i < 300; i++) access(STR_RT, addr_of(700 + i, 256 * (i % 32)), 1, rand_blk());
    check(dut.rprob.rt_rrpv == 2'd3, "PROD > 16*CONS");
    access(STR_RT, addr_of(999, 80), 1, rand_blk());
    check(last_fill_rrpv == 2'd3, "RT follower fill at RRPV 3");

    // uncached displayable colour
    ucd_en = 1;
    a = addr_of(999, 81);
    begin
      logic [BLK_W-1:0] d;
      d = rand_blk();
      access_disp(a, d);
      check(u_dram.mem.exists(a[ADDR_W-1:6]) && u_dram.mem[a[ADDR_W-1:6]] == d, "UCD write goes to DRAM");
      access(STR_TEX, a, 0);
      check(!last_hit, "UCD write not allocated");
    end
    ucd_en = 0;

    // random traffic over 48 sets x 24 tags
    for (int i = 0; i < 3000; i++) begin
      stream_e s;
      bit      wr;
      s  = stream_e'($urandom_range(0, NP - 1));
      wr = (s inside {STR_Z, STR_STC, STR_HIZ, STR_RT}) && ($urandom_range(0, 2) == 0);
      a = addr_of(2000 + $urandom_range(0, 23), 256 * $urandom_range(0, 3) + $urandom_range(0, 11));
      access(s, a, wr, rand_blk());
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
