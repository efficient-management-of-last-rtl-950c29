// tb_rrip_victim: victim selection against a step-by-step SRRIP reference.
//
// Random sets (with and without invalid ways) are applied; the reference
// takes the lowest invalid way, or else increments every RRPV one step at
// a time until some way reaches 3 and takes the lowest such way. Victim,
// evict flag and the aged RRPVs are compared.
module tb_rrip_victim;
  import llc_pkg::*;

  localparam int unsigned W = 16;

  logic  [W-1:0]         valid;
  rrpv_t [W-1:0]         rrpv, rrpv_aged;
  logic  [$clog2(W)-1:0] victim;
  logic                  evict;

  rrip_victim #(.NUM_WAYS(W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      rrpv_t [W-1:0] r;
      int            ev_way;
      bit            e_evict, any3;
      valid = (n % 4 == 0) ? W'($urandom) : '1;
      for (int w = 0; w < W; w++) rrpv[w] = rrpv_t'($urandom_range(0, (n % 3 == 0) ? 2 : 3));
      #1;
      r = rrpv;
      ev_way = -1;
      for (int w = 0; w < W; w++) if (!valid[w] && ev_way < 0) ev_way = w;
      e_evict = (ev_way < 0);
      if (e_evict) begin
        any3 = 0;
        while (!any3) begin
          for (int w = 0; w < W; w++) if (r[w] == 3) any3 = 1;
          if (!any3) for (int w = 0; w < W; w++) r[w] = r[w] + 1;
        end
        for (int w = W - 1; w >= 0; w--) if (r[w] == 3) ev_way = w;
      end
      checks++;
      if (victim !== ev_way[$clog2(W)-1:0] || evict !== e_evict || rrpv_aged !== r) begin
        failures++;
        if (failures < 10) $display("FAIL v=%h r=%h: got %0d %0d %h exp %0d %0d %h",
                                    valid, rrpv, victim, evict, rrpv_aged, ev_way, e_evict, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
