// tb_nbet_two_dir: 4-set, 2-way table. First a directed run of the
// two-branch example (branch 1 taken, then branch 2: branch 2's location must
// land in the Taken field of branch 1's row and come out of pre-activation
// register 1 two cycles after a lookup hit on branch 1). Then random writes,
// insertions and lookups against a reference table kept in the testbench.
module tb_nbet_two_dir;
  localparam int E = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       fire, ins, lrv, lrd, hit;
  logic [2:0] uidx, lri, lki;
  logic [1:0] pav;
  logic [2:0] pai [2];

  nbet_two_dir #(.SETS(4), .WAYS(2)) dut (
    .clk, .rst_n, .upd_fire_i(fire), .upd_insert_i(ins), .upd_idx_i(uidx),
    .lr_valid_i(lrv), .lr_idx_i(lri), .lr_dir_i(lrd), .lk_hit_i(hit), .lk_idx_i(lki),
    .pa_valid_o(pav), .pa_idx_o(pai));

  // reference
  bit       rv [2][E];
  int       rl [2][E];
  bit       bv;
  int       bi;
  bit       ev [2];
  int       ei [2];
  int       writes = 0, clears = 0, preacts = 0;

  task automatic idle();
    fire = 0; ins = 0; lrv = 0; lrd = 0; hit = 0; uidx = 0; lri = 0; lki = 0;
  endtask

  task automatic step();
    @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      ev[f] = bv && rv[f][bi];
      ei[f] = rl[f][bi];
    end
    if (fire && lrv) begin
      rv[lrd ? 0 : 1][lri] = 1; rl[lrd ? 0 : 1][lri] = int'(uidx); writes++;
    end
    if (fire && ins) begin rv[0][uidx] = 0; rv[1][uidx] = 0; clears++; end
    bv = hit;
    if (hit) bi = int'(lki);
    @(negedge clk);
    for (int f = 0; f < 2; f++) begin
      checks++;
      if (pav[f] != ev[f] || (ev[f] && int'(pai[f]) != ei[f])) begin
        failures++;
        $display("FAIL reg %0d: valid %0d idx %0d, expected %0d %0d", f, pav[f], pai[f], ev[f], ei[f]);
      end
      if (pav[f]) preacts++;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 2; f++) for (int i = 0; i < E; i++) begin rv[f][i] = 0; rl[f][i] = 0; end
    bv = 0; bi = 0;
    idle();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // branch 1 inserted at location 1 (no previous branch in LR)
    fire = 1; ins = 1; uidx = 3'd1; step();
    // branch 2 written at location 6; LR holds branch 1, taken
    fire = 1; ins = 1; uidx = 3'd6; lrv = 1; lri = 3'd1; lrd = 1; step();
    idle();
    // lookup hit on branch 1
    hit = 1; lki = 3'd1; step();
    idle(); step();
    checks++;
    if (!(pav[0] && pai[0] == 3'd6 && !pav[1])) begin
      failures++; $display("FAIL directed: taken field of branch 1 not pre-activated");
    end
    // random phase
    for (int n = 0; n < 3000; n++) begin
      fire = ($urandom % 3) == 0; ins = ($urandom % 4) == 0;
      uidx = 3'($urandom); lrv = ($urandom % 5) != 0; lri = 3'($urandom); lrd = 1'($urandom);
      hit = ($urandom % 2) == 0; lki = 3'($urandom);
      step();
    end
    checks++;
    if (writes == 0 || clears == 0 || preacts == 0) begin failures++; $display("FAIL coverage"); end
    $display("writes %0d clears %0d pre-activations %0d", writes, clears, preacts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
