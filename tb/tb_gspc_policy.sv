// tb_gspc_policy: exhaustive check of the GSPC decision unit.
//
// Every combination of set kind (sample or follower), fill or hit, stream,
// write flag, old block state and learner outcome is applied, and the RRPV,
// state and learning events are compared with a reference written here
// from the policy rules: SRRIP in sample sets; in follower sets Z fills at
// 3 or 2, texture fills and E0 hits at 3 or 0, render-target fills at the
// PROD/CONS level, other fills at 2, other hits at 0.
module tb_gspc_policy;
  import llc_pkg::*;

  localparam int unsigned SETS = 64, SAMPLES = 8;

  logic [5:0] set_idx;
  logic       is_fill, write, sample;
  stream_e    stream;
  blk_state_e old_state, new_state;
  rprob_t     rprob;
  rrpv_t      new_rrpv;
  learn_ev_t  ev;

  gspc_policy #(.NUM_SETS(SETS), .NUM_SAMPLE_SETS(SAMPLES)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int si = 0; si < 2; si++)
    for (int f = 0; f < 2; f++)
    for (int s = 0; s < NUM_STREAMS; s++)
    for (int w = 0; w < 2; w++)
    for (int os = 0; os < 4; os++)
    for (int rp = 0; rp < 32; rp++) begin
      rrpv_t      e_rrpv;
      blk_state_e e_state;
      learn_ev_t  e_ev;
      bit         samp, tex, rt;
      set_idx   = si ? 6'(8 * $urandom_range(0, 7)) : 6'(8 * $urandom_range(0, 7) + $urandom_range(1, 7));
      is_fill   = f[0];
      stream    = stream_e'(s);
      write     = w[0];
      old_state = blk_state_e'(os);
      rprob     = rprob_t'(5'(rp));
      if (rprob.rt_rrpv == 2'd1) continue;   // the learner never produces 1
      #1;
      samp = si;
      tex  = (s == 5);
      rt   = (s == 3) && w;
      // expected state
      if (f) e_state = tex ? ST_E0 : rt ? ST_RT : ST_E2P;
      else if (tex) e_state = (os == 0) ? ST_E1 : (os == 3) ? ST_E0 : ST_E2P;
      else if (rt)  e_state = ST_RT;
      else          e_state = blk_state_e'(os);
      // expected RRPV
      if (samp)          e_rrpv = f ? 2'd2 : 2'd0;
      else if (f) begin
        if (s == 0)      e_rrpv = rprob.z_low ? 2'd3 : 2'd2;
        else if (tex)    e_rrpv = rprob.tex_e0_low ? 2'd3 : 2'd0;
        else if (s == 3) e_rrpv = rprob.rt_rrpv;
        else             e_rrpv = 2'd2;
      end
      else if (tex && os == 0) e_rrpv = rprob.tex_e1_low ? 2'd3 : 2'd0;
      else                     e_rrpv = 2'd0;
      // expected events
      e_ev = '0;
      if (samp) begin
        e_ev.z_fill      = f && s == 0;
        e_ev.z_hit       = !f && s == 0;
        e_ev.tex_e0_fill = f && tex;
        e_ev.tex_e0_hit  = !f && tex && os == 0;
        e_ev.tex_e1_fill = !f && tex && os == 0;
        e_ev.tex_e1_hit  = !f && tex && os == 1;
        e_ev.prod        = rt && (f || os != 3);
        e_ev.cons        = !f && tex && os == 3;
      end
      checks++;
      if (sample !== samp || new_rrpv !== e_rrpv || new_state !== e_state || ev !== e_ev) begin
        failures++;
        if (failures < 10)
          $display("FAIL set=%0d fill=%0d s=%0d w=%0d os=%0d rp=%b: got %0d %0d %0d %b exp %0d %0d %0d %b",
                   set_idx, f, s, w, os, rp, sample, new_rrpv, new_state, ev, samp, e_rrpv, e_state, e_ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
