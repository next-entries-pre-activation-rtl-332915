// tb_drowsy_btb: a 4-set, 2-way BTB with 16-bit addresses, driven with random
// lookups and updates from a pool of 12 branch addresses (so sets overflow and
// entries are replaced), plus random deactivation and pre-activation. A
// reference BTB in the testbench (invalid way first, then round-robin
// victim; 2-bit predictor table; one-cycle wake-up) predicts every output in
// every cycle: hit, stall, direction, target, location, update results and
// the power state of every entry.
module tb_drowsy_btb;
  localparam int S = 4, W = 2, E = S * W, AW = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          lk_en, lk_hit, lk_stall, lk_taken;
  logic [AW-1:0] lk_pc, lk_target;
  logic [2:0]    lk_idx;
  logic          up_v, up_t, up_fire, up_ins, up_chg;
  logic [AW-1:0] up_pc, up_tgt;
  logic [2:0]    up_idx;
  logic [E-1:0]  deact, preact, active, drowsy, wstart, touch;

  drowsy_btb #(.SETS(S), .WAYS(W), .ADDR_W(AW), .OFFSET_W(2), .WAKE_LAT(1)) dut (
    .clk, .rst_n,
    .lk_en_i(lk_en), .lk_pc_i(lk_pc), .lk_hit_o(lk_hit), .lk_stall_o(lk_stall),
    .lk_taken_o(lk_taken), .lk_target_o(lk_target), .lk_idx_o(lk_idx),
    .upd_valid_i(up_v), .upd_pc_i(up_pc), .upd_taken_i(up_t), .upd_target_i(up_tgt),
    .upd_fire_o(up_fire), .upd_insert_o(up_ins), .upd_changed_o(up_chg), .upd_idx_o(up_idx),
    .deact_i(deact), .preact_i(preact), .active_o(active), .drowsy_o(drowsy),
    .wake_start_o(wstart), .touch_o(touch));

  // reference state
  bit            rvalid [E];
  int            rtag   [E];
  logic [AW-1:0] rtgt   [E];
  int            rst    [E];     // 0 SNT, 1 WNT, 2 WT, 3 ST
  int            rrr    [S];
  bit            rdrowsy[E];
  int nxt [4][2] = '{'{0, 1}, '{0, 3}, '{0, 3}, '{2, 3}};

  logic [AW-1:0] pool [12];
  int n_hit = 0, n_stall = 0, n_ins = 0, n_evict = 0, n_chg = 0;

  function automatic int set_of(logic [AW-1:0] pc); return int'(pc[3:2]);  endfunction
  function automatic int tag_of(logic [AW-1:0] pc); return int'(pc[15:4]); endfunction
  function automatic int find(logic [AW-1:0] pc);
    for (int w = 0; w < W; w++)
      if (rvalid[set_of(pc) * W + w] && rtag[set_of(pc) * W + w] == tag_of(pc)) return w;
    return -1;
  endfunction

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 12; i++) pool[i] = AW'(16'h1000 + i * 16'h0034);
    for (int e = 0; e < E; e++) begin rvalid[e] = 0; rtag[e] = 0; rtgt[e] = 0; rst[e] = 2; rdrowsy[e] = 0; end
    for (int s = 0; s < S; s++) rrr[s] = 0;
    lk_en = 0; lk_pc = 0; up_v = 0; up_pc = 0; up_t = 0; up_tgt = 0; deact = '0; preact = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int lw, le, uw, ue, us, victim;
      bit ex_hit, ex_stall, ex_fire, ex_ins, ex_chg;
      logic [E-1:0] wake;
      @(negedge clk);
      lk_en  = ($urandom % 8) != 0;
      lk_pc  = pool[$urandom % 12];
      up_v   = ($urandom % 2) == 0;
      up_pc  = pool[$urandom % 12];
      up_t   = ($urandom % 3) != 0;
      up_tgt = AW'($urandom);
      for (int e = 0; e < E; e++) begin
        deact[e]  = ($urandom % 6) == 0;
        preact[e] = ($urandom % 20) == 0;
      end
      #1;
      // lookup
      lw = find(lk_pc);
      le = set_of(lk_pc) * W + lw;
      ex_hit   = lk_en && lw >= 0 && !rdrowsy[le];
      ex_stall = lk_en && lw >= 0 && rdrowsy[le];
      chk("lookup hit", lk_hit == ex_hit);
      chk("lookup stall", lk_stall == ex_stall);
      if (lw >= 0 && lk_en) begin
        chk("lookup location", int'(lk_idx) == le);
        if (ex_hit) begin
          chk("lookup target", lk_target == rtgt[le]);
          chk("lookup direction", lk_taken == (rst[le] >= 2));
        end
      end
      if (ex_hit) n_hit++;
      if (ex_stall) n_stall++;
      // update
      us = set_of(up_pc);
      uw = find(up_pc);
      victim = -1;
      for (int w = W - 1; w >= 0; w--) if (!rvalid[us * W + w]) victim = w;
      if (victim < 0) victim = rrr[us];
      ex_fire = up_v && (uw >= 0 || up_t);
      ex_ins  = up_v && uw < 0 && up_t;
      ue = us * W + ((uw >= 0) ? uw : victim);
      ex_chg  = ex_ins || (ex_fire && ((rst[ue] >= 2) != (nxt[rst[ue]][up_t] >= 2)));
      chk("update fire", up_fire == ex_fire);
      chk("update insert", up_ins == ex_ins);
      if (ex_fire) begin
        chk("update location", int'(up_idx) == ue);
        chk("update changed", up_chg == ex_chg);
      end
      // power outputs
      for (int e = 0; e < E; e++) chk("power state", active[e] == !rdrowsy[e] && drowsy[e] == rdrowsy[e]);
      // reference next state
      wake = '0;
      if (ex_stall) wake[le] = 1;
      if (ex_fire)  wake[ue] = 1;
      @(posedge clk);
      if (ex_fire) begin
        if (ex_ins) begin
          if (rvalid[ue]) n_evict++;
          n_ins++;
          if (victim == rrr[us] && rvalid[ue]) rrr[us] = (rrr[us] + 1) % W;
          rvalid[ue] = 1; rtag[ue] = tag_of(up_pc); rst[ue] = 2;
        end else begin
          if ((rst[ue] >= 2) != (nxt[rst[ue]][up_t] >= 2)) n_chg++;
          rst[ue] = nxt[rst[ue]][up_t];
        end
        if (up_t) rtgt[ue] = up_tgt;
      end
      for (int e = 0; e < E; e++) begin
        if (rdrowsy[e] && (preact[e] || wake[e])) rdrowsy[e] = 0;
        else if (!rdrowsy[e] && deact[e] && !preact[e] && !wake[e]) rdrowsy[e] = 1;
      end
    end
    chk("coverage", n_hit > 0 && n_stall > 0 && n_evict > 0 && n_chg > 0);
    $display("hits %0d stalls %0d inserts %0d evictions %0d direction changes %0d",
             n_hit, n_stall, n_ins, n_evict, n_chg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
