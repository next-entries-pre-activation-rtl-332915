// tb_drowsy_btb_top: end-to-end run of the drowsy BTB at full size (512
// entries, 4 ways, decay interval 128) under the synthetic program of
// btb_program_driver, once with the one-direction policy (default
// parameters) and once with the two-direction policy.
//
// Besides the driver's functional checks it counts every mechanism of the
// design and fails if one never happens: decay deactivation, pre-activation
// (and pre-activation of an entry that was actually drowsy), on-demand
// wake-up stalls, LR gating of a deactivation, NBET writes, NBET rows cleared
// by a replacement, replacement in a full set, predicted-direction changes
// and skipped one-direction NBET writes. A pre-activated entry must be active
// the next cycle, and the row held in the location register (the NBET row
// the next update writes) must always be active. It also reports BTB leakage energy with the per-entry
// figures 0.33 pJ/cycle (active), 0.0495 pJ/cycle (drowsy) and 11 pJ per
// wake-up, against a BTB that is always active.
module tb_drowsy_btb_top;
  localparam int E = 512;
  localparam int N = 30000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------- one-direction
  logic          le1, hit1, st1, pt1, uv1, ut1, done1;
  logic [31:0]   lp1, tg1, up1, utg1;
  logic [E-1:0]  act1, drw1, pre1, dea1, ws1;
  int c1, f1, lk1, h1, s1, m1, b1;
  longint cy1;

  drowsy_btb_top u_one (
    .clk, .rst_n, .lookup_en_i(le1), .lookup_pc_i(lp1), .hit_o(hit1), .stall_o(st1),
    .pred_taken_o(pt1), .target_o(tg1), .upd_valid_i(uv1), .upd_pc_i(up1),
    .upd_taken_i(ut1), .upd_target_i(utg1), .active_o(act1), .drowsy_o(drw1),
    .preact_o(pre1), .deact_o(dea1), .wake_start_o(ws1));

  btb_program_driver #(.N_CYCLES(N)) d_one (
    .clk, .rst_n, .lookup_en(le1), .lookup_pc(lp1), .hit(hit1), .stall(st1),
    .pred_taken(pt1), .target(tg1), .upd_valid(uv1), .upd_pc(up1), .upd_taken(ut1),
    .upd_target(utg1), .done(done1), .checks(c1), .failures(f1), .n_lookups(lk1),
    .n_hits(h1), .n_stalls(s1), .n_mispredicts(m1), .n_branches(b1), .n_cycles(cy1));

  // ---------------------------------------------------------- two-direction
  logic          le2, hit2, st2, pt2, uv2, ut2, done2;
  logic [31:0]   lp2, tg2, up2, utg2;
  logic [E-1:0]  act2, drw2, pre2, dea2, ws2;
  int c2, f2, lk2, h2, s2, m2, b2;
  longint cy2;

  drowsy_btb_top #(.ONE_DIR(1'b0)) u_two (
    .clk, .rst_n, .lookup_en_i(le2), .lookup_pc_i(lp2), .hit_o(hit2), .stall_o(st2),
    .pred_taken_o(pt2), .target_o(tg2), .upd_valid_i(uv2), .upd_pc_i(up2),
    .upd_taken_i(ut2), .upd_target_i(utg2), .active_o(act2), .drowsy_o(drw2),
    .preact_o(pre2), .deact_o(dea2), .wake_start_o(ws2));

  btb_program_driver #(.N_CYCLES(N)) d_two (
    .clk, .rst_n, .lookup_en(le2), .lookup_pc(lp2), .hit(hit2), .stall(st2),
    .pred_taken(pt2), .target(tg2), .upd_valid(uv2), .upd_pc(up2), .upd_taken(ut2),
    .upd_target(utg2), .done(done2), .checks(c2), .failures(f2), .n_lookups(lk2),
    .n_hits(h2), .n_stalls(s2), .n_mispredicts(m2), .n_branches(b2), .n_cycles(cy2));

  // ---------------------------------------------------------- mechanism counters
  typedef struct {
    int deact, preact, preact_drowsy, wake, gated, nbet_wr, nbet_clr, evict, dirchg,
        skipped, both_regs;
    real energy;
  } stats_t;
  stats_t s_one, s_two;
  logic [E-1:0] pre1_q, pre2_q, drw1_q, drw2_q;
  longint run_cycles = 0;

  function automatic real leak(logic [E-1:0] drowsy, logic [E-1:0] wstart);
    int nd = $countones(drowsy);
    return (E - nd) * 0.33 + nd * 0.0495 + $countones(wstart) * 11.0;
  endfunction

  always @(posedge clk) if (rst_n && !done1) begin
    run_cycles++;
    s_one.deact         += $countones(drw1 & ~drw1_q);
    s_one.preact        += (|pre1) ? 1 : 0;
    s_one.preact_drowsy += $countones(pre1 & drw1);
    s_one.wake          += $countones(ws1);
    s_one.gated         += (|(u_one.decay_deact & ~u_one.deact_o)) ? 1 : 0;
    s_one.nbet_wr       += u_one.g_one.u_nbet.wr_en ? 1 : 0;
    s_one.skipped       += (u_one.upd_fire && u_one.lr_valid && !u_one.lr_dir) ? 1 : 0;
    s_one.nbet_clr      += (u_one.upd_fire && u_one.upd_insert) ? 1 : 0;
    s_one.evict         += (u_one.upd_insert && !u_one.u_btb.have_free) ? 1 : 0;
    s_one.dirchg        += (u_one.upd_changed && !u_one.upd_insert) ? 1 : 0;
    s_one.energy        += leak(drw1, ws1);
    s_two.deact         += $countones(drw2 & ~drw2_q);
    s_two.preact        += (|pre2) ? 1 : 0;
    s_two.preact_drowsy += $countones(pre2 & drw2);
    s_two.wake          += $countones(ws2);
    s_two.gated         += (|(u_two.decay_deact & ~u_two.deact_o)) ? 1 : 0;
    s_two.nbet_wr       += (u_two.upd_fire && u_two.lr_valid) ? 1 : 0;
    s_two.both_regs     += (&u_two.pa_valid) ? 1 : 0;
    s_two.nbet_clr      += (u_two.upd_fire && u_two.upd_insert) ? 1 : 0;
    s_two.evict         += (u_two.upd_insert && !u_two.u_btb.have_free) ? 1 : 0;
    s_two.dirchg        += (u_two.upd_changed && !u_two.upd_insert) ? 1 : 0;
    s_two.energy        += leak(drw2, ws2);
    // an entry pre-activated in the previous cycle is active now
    checks++;
    if ((pre1_q & ~act1) != '0 || (pre2_q & ~act2) != '0) begin
      failures++;
      $display("FAIL pre-activated entry not active one cycle later");
    end
    // the NBET row the next update will write (held in LR) is never asleep
    checks++;
    if ((u_one.lr_valid && !act1[u_one.lr_idx]) || (u_two.lr_valid && !act2[u_two.lr_idx])) begin
      failures++;
      $display("FAIL row held in the location register is not active");
    end
    pre1_q <= pre1; pre2_q <= pre2; drw1_q <= drw1; drw2_q <= drw2;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  task automatic report(string name, stats_t s, int lk, int h, int st, int m, int b);
    real base;
    base = real'(run_cycles) * E * 0.33;
    $display("%s: lookups %0d hits %0d wake-up stalls %0d mispredicts %0d branches %0d",
             name, lk, h, st, m, b);
    $display("%s: deactivations %0d pre-activation cycles %0d pre-activations of drowsy rows %0d wake-ups %0d",
             name, s.deact, s.preact, s.preact_drowsy, s.wake);
    $display("%s: LR-gated cycles %0d NBET writes %0d NBET clears %0d replacements %0d direction changes %0d",
             name, s.gated, s.nbet_wr, s.nbet_clr, s.evict, s.dirchg);
    $display("%s: BTB leakage energy %0.1f pJ = %0.3f of always-active", name, s.energy, s.energy / base);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_one = '{default: 0}; s_two = '{default: 0};
    pre1_q = '0; pre2_q = '0; drw1_q = '0; drw2_q = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (done1 && done2);
    report("one-direction", s_one, lk1, h1, s1, m1, b1);
    report("two-direction", s_two, lk2, h2, s2, m2, b2);
    need("deactivation (1-dir)", s_one.deact);
    need("deactivation (2-dir)", s_two.deact);
    need("pre-activation of a drowsy row (1-dir)", s_one.preact_drowsy);
    need("pre-activation of a drowsy row (2-dir)", s_two.preact_drowsy);
    need("on-demand wake-up stall (1-dir)", s1);
    need("on-demand wake-up stall (2-dir)", s2);
    need("LR gating (1-dir)", s_one.gated);
    need("LR gating (2-dir)", s_two.gated);
    need("NBET write (1-dir)", s_one.nbet_wr);
    need("NBET write skipped, no prediction change (1-dir)", s_one.skipped);
    need("NBET write (2-dir)", s_two.nbet_wr);
    need("both pre-activation registers valid (2-dir)", s_two.both_regs);
    need("NBET row cleared on insertion", s_one.nbet_clr);
    need("replacement in a full set", s_one.evict);
    need("predicted direction change", s_one.dirchg);
    need("misprediction", m1);
    // leakage must fall below an always-active BTB
    checks++;
    if (!(s_one.energy < real'(run_cycles) * E * 0.33)) begin failures++; $display("FAIL no energy saving"); end
    // stalls stay a small fraction of lookups
    checks++;
    if (s1 * 10 > lk1) begin failures++; $display("FAIL too many wake-up stalls"); end
    checks += c1 + c2;
    failures += f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
