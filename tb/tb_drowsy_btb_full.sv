// tb_drowsy_btb_full: the drowsy BTB with every parameter at its default
// (one-direction pre-activation, 512 entries, 4 ways, decay interval 128,
// one-cycle wake-up) running 60000 cycles of the synthetic program of
// btb_program_driver. It checks the driver's functional checks, that
// pre-activation, decay and on-demand wake-up all occur, and that the row
// held in the location register never sleeps; it reports the BTB leakage
// energy relative to an always-active BTB.
module tb_drowsy_btb_full;
  localparam int E = 512;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic          le, hit, st, pt, uv, ut, done;
  logic [31:0]   lp, tg, up, utg;
  logic [E-1:0]  act, drw, pre, dea, ws;
  int c, f, lk, h, s, m, b;
  longint cy;
  longint cycles = 0;
  int n_pre_drowsy = 0, n_sleep = 0;
  real energy = 0.0;
  logic [E-1:0] drw_q;

  drowsy_btb_top dut (
    .clk, .rst_n, .lookup_en_i(le), .lookup_pc_i(lp), .hit_o(hit), .stall_o(st),
    .pred_taken_o(pt), .target_o(tg), .upd_valid_i(uv), .upd_pc_i(up),
    .upd_taken_i(ut), .upd_target_i(utg), .active_o(act), .drowsy_o(drw),
    .preact_o(pre), .deact_o(dea), .wake_start_o(ws));

  btb_program_driver #(.N_CYCLES(60000)) drv (
    .clk, .rst_n, .lookup_en(le), .lookup_pc(lp), .hit, .stall(st),
    .pred_taken(pt), .target(tg), .upd_valid(uv), .upd_pc(up), .upd_taken(ut),
    .upd_target(utg), .done, .checks(c), .failures(f), .n_lookups(lk),
    .n_hits(h), .n_stalls(s), .n_mispredicts(m), .n_branches(b), .n_cycles(cy));

  always @(posedge clk) if (rst_n && !done) begin
    cycles++;
    n_pre_drowsy += $countones(pre & drw);
    n_sleep      += $countones(drw & ~drw_q);
    energy       += (E - $countones(drw)) * 0.33 + $countones(drw) * 0.0495 + $countones(ws) * 11.0;
    checks++;
    if (dut.lr_valid && !act[dut.lr_idx]) begin
      failures++;
      $display("FAIL row held in the location register is not active");
    end
    drw_q <= drw;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    drw_q = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (done);
    $display("lookups %0d hits %0d wake-up stalls %0d mispredicts %0d branches %0d",
             lk, h, s, m, b);
    $display("rows put to sleep %0d, drowsy rows pre-activated %0d", n_sleep, n_pre_drowsy);
    $display("BTB leakage energy %0.3f of always-active", energy / (real'(cycles) * E * 0.33));
    checks++; if (n_pre_drowsy == 0) begin failures++; $display("FAIL no pre-activation of a drowsy row"); end
    checks++; if (n_sleep == 0)      begin failures++; $display("FAIL no row put to sleep"); end
    checks++; if (s == 0)            begin failures++; $display("FAIL no on-demand wake-up"); end
    checks += c;
    failures += f;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
