// tb_decay_sweep: the decay-interval sweep of the evaluation (32 to 2048
// cycles, one-direction pre-activation, 512-entry 4-way BTB), run on the
// synthetic program of btb_program_driver instead of real benchmarks. For
// each interval it prints wake-up stalls (the performance loss), rows put to
// sleep and the BTB leakage energy relative to an always-active BTB
// (0.33 pJ/cycle active, 0.0495 pJ/cycle drowsy, 11 pJ per wake-up).
// Checks: every run passes the driver's functional checks, and the shortest
// interval stalls at least as often and spends no more leakage than the
// longest one.
module tb_decay_sweep;
  localparam int E = 512;
  localparam int NC = 40000;
  localparam int NI = 7;
  localparam int DECAYS [NI] = '{32, 64, 128, 256, 512, 1024, 2048};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int   checks = 0, failures = 0;
  logic done [NI];
  int   c [NI], f [NI], lk [NI], h [NI], s [NI], m [NI], b [NI];
  real  energy [NI];
  int   sleeps [NI];
  longint cycles = 0;

  for (genvar g = 0; g < NI; g++) begin : g_run
    logic          le, hit, st, pt, uv, ut;
    logic [31:0]   lp, tg, up, utg;
    logic [E-1:0]  act, drw, pre, dea, ws, drw_q;
    longint        cy;

    drowsy_btb_top #(.DECAY_INTERVAL(DECAYS[g])) dut (
      .clk, .rst_n, .lookup_en_i(le), .lookup_pc_i(lp), .hit_o(hit), .stall_o(st),
      .pred_taken_o(pt), .target_o(tg), .upd_valid_i(uv), .upd_pc_i(up),
      .upd_taken_i(ut), .upd_target_i(utg), .active_o(act), .drowsy_o(drw),
      .preact_o(pre), .deact_o(dea), .wake_start_o(ws));

    btb_program_driver #(.N_CYCLES(NC)) drv (
      .clk, .rst_n, .lookup_en(le), .lookup_pc(lp), .hit, .stall(st),
      .pred_taken(pt), .target(tg), .upd_valid(uv), .upd_pc(up), .upd_taken(ut),
      .upd_target(utg), .done(done[g]), .checks(c[g]), .failures(f[g]), .n_lookups(lk[g]),
      .n_hits(h[g]), .n_stalls(s[g]), .n_mispredicts(m[g]), .n_branches(b[g]), .n_cycles(cy));

    initial begin energy[g] = 0.0; sleeps[g] = 0; drw_q = '0; end

    always @(posedge clk) if (rst_n && !done[g]) begin
      energy[g] += (E - $countones(drw)) * 0.33 + $countones(drw) * 0.0495 + $countones(ws) * 11.0;
      sleeps[g] += $countones(drw & ~drw_q);
      drw_q <= drw;
    end
  end

  always @(posedge clk) if (rst_n && !done[0]) cycles++;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < NI; i++) if (!done[i]) all_done = 0;
    end while (!all_done);
    for (int i = 0; i < NI; i++) begin
      $display("decay %4d: lookups %0d hits %0d stalls %0d (%0.2f%% of lookups) sleeps %0d energy %0.3f",
               DECAYS[i], lk[i], h[i], s[i], 100.0 * s[i] / lk[i], sleeps[i],
               energy[i] / (real'(cycles) * E * 0.33));
      checks += c[i];
      failures += f[i];
    end
    checks++;
    if (s[0] < s[NI-1]) begin failures++; $display("FAIL shortest interval stalls less than longest"); end
    checks++;
    if (energy[0] > energy[NI-1]) begin failures++; $display("FAIL shortest interval uses more leakage than longest"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
