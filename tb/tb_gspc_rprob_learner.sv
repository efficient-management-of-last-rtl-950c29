// tb_gspc_rprob_learner: counters and threshold outputs of the learner.
//
// Directed cases check the exact thresholds (8*HIT < FILL, PROD against 8x
// and 16x CONS) at their boundaries; a long random run with 6-bit counters
// compares all outputs each cycle with a reference model of the counters,
// including the halving of a pair when one of its counters saturates.
module tb_gspc_rprob_learner;
  import llc_pkg::*;

  localparam int unsigned W = 6;

  logic      clk = 0, rst_n = 0;
  learn_ev_t ev = '0;
  rprob_t    rprob;

  gspc_rprob_learner #(.CNT_W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned zh, zf, e0h, e0f, e1h, e1f, pr, co;   // reference counters
  int          halvings = 0;

  task automatic bump(ref int unsigned h, ref int unsigned f, input bit ih, input bit inc_f);
    if ((ih && h == 2**W - 1) || (inc_f && f == 2**W - 1)) begin
      h = h / 2;
      f = f / 2;
      halvings++;
    end
    h += ih;
    f += inc_f;
  endtask

  task automatic compare();
    rrpv_t e_rt;
    e_rt = (pr > 16 * co) ? 2'd3 : (pr > 8 * co) ? 2'd2 : 2'd0;
    checks++;
    if (rprob.z_low !== (8 * zh < zf) || rprob.tex_e0_low !== (8 * e0h < e0f) ||
        rprob.tex_e1_low !== (8 * e1h < e1f) || rprob.rt_rrpv !== e_rt) begin
      failures++;
      if (failures < 10)
        $display("FAIL z %0d/%0d e0 %0d/%0d e1 %0d/%0d pc %0d/%0d got %b", zh, zf, e0h, e0f, e1h, e1f, pr, co, rprob);
    end
  endtask

  task automatic step(learn_ev_t e);
    @(negedge clk);
    ev = e;
    @(negedge clk);
    ev = '0;
    bump(zh, zf, e.z_hit, e.z_fill);
    bump(e0h, e0f, e.tex_e0_hit, e.tex_e0_fill);
    bump(e1h, e1f, e.tex_e1_hit, e.tex_e1_fill);
    bump(co, pr, e.cons, e.prod);
    compare();
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    learn_ev_t e;
    {zh, zf, e0h, e0f, e1h, e1f, pr, co} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    checks++;
    if (rprob.z_low || rprob.rt_rrpv != 2'd0) failures++;   // 0 < 0 is false
    // Z: one hit, then fills; low only once fills exceed 8
    e = '0; e.z_hit = 1; step(e);
    e = '0; e.z_fill = 1;
    for (int i = 0; i < 9; i++) begin
      step(e);
      checks++;
      if (rprob.z_low !== (i == 8)) failures++;
    end
    // PROD/CONS: one consumption, then productions
    e = '0; e.cons = 1; step(e);
    e = '0; e.prod = 1;
    for (int i = 1; i <= 17; i++) begin
      step(e);
      checks++;
      if (rprob.rt_rrpv !== ((i > 16) ? 2'd3 : (i > 8) ? 2'd2 : 2'd0)) failures++;
    end
    // random traffic, long enough to saturate every pair several times
    for (int i = 0; i < 20000; i++) begin
      e = learn_ev_t'($urandom);
      e.z_hit  = e.z_hit && ($urandom_range(0, 5) == 0);
      e.cons   = e.cons && ($urandom_range(0, 7) == 0);
      step(e);
    end
    checks++;
    if (halvings == 0) failures++;
    $display("halvings=%0d", halvings);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
