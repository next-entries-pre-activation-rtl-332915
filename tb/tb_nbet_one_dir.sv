// tb_nbet_one_dir: 4-set, 2-way table. A directed run checks that a row is
// written only when the location register's Change bit is set, and that the
// pre-activation register shows the row two cycles after a lookup hit. Then
// random writes, insertions and lookups against a reference table.
module tb_nbet_one_dir;
  localparam int E = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       fire, ins, lrv, lrc, hit;
  logic [2:0] uidx, lri, lki;
  logic       pav;
  logic [2:0] pai;

  nbet_one_dir #(.SETS(4), .WAYS(2)) dut (
    .clk, .rst_n, .upd_fire_i(fire), .upd_insert_i(ins), .upd_idx_i(uidx),
    .lr_valid_i(lrv), .lr_idx_i(lri), .lr_change_i(lrc), .lk_hit_i(hit), .lk_idx_i(lki),
    .pa_valid_o(pav), .pa_idx_o(pai));

  bit rv [E];
  int rl [E];
  bit bv, ev;
  int bi, ei;
  int writes = 0, skipped = 0, preacts = 0;

  task automatic idle();
    fire = 0; ins = 0; lrv = 0; lrc = 0; hit = 0; uidx = 0; lri = 0; lki = 0;
  endtask

  task automatic step();
    @(posedge clk);
    ev = bv && rv[bi];
    ei = rl[bi];
    if (fire && lrv && lrc) begin rv[lri] = 1; rl[lri] = int'(uidx); writes++; end
    if (fire && lrv && !lrc) skipped++;
    if (fire && ins) rv[uidx] = 0;
    bv = hit;
    if (hit) bi = int'(lki);
    @(negedge clk);
    checks++;
    if (pav != ev || (ev && int'(pai) != ei)) begin
      failures++;
      $display("FAIL valid %0d idx %0d, expected %0d %0d", pav, pai, ev, ei);
    end
    if (pav) preacts++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < E; i++) begin rv[i] = 0; rl[i] = 0; end
    bv = 0; bi = 0;
    idle();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // branch I (loc 2) inserted; next branch J at loc 5: Change = 1, recorded
    fire = 1; ins = 1; uidx = 3'd2; step();
    fire = 1; ins = 1; uidx = 3'd5; lrv = 1; lri = 3'd2; lrc = 1; step();
    // later, I is followed by K at loc 7 without a prediction change: ignored
    fire = 1; ins = 1; uidx = 3'd7; lrv = 1; lri = 3'd2; lrc = 0; step();
    idle();
    hit = 1; lki = 3'd2; step();
    idle(); step();
    checks++;
    if (!(pav && pai == 3'd5)) begin failures++; $display("FAIL directed: row of I should name J"); end
    for (int n = 0; n < 3000; n++) begin
      fire = ($urandom % 3) == 0; ins = ($urandom % 4) == 0;
      uidx = 3'($urandom); lrv = ($urandom % 5) != 0; lri = 3'($urandom); lrc = 1'($urandom);
      hit = ($urandom % 2) == 0; lki = 3'($urandom);
      step();
    end
    checks++;
    if (writes == 0 || skipped == 0 || preacts == 0) begin failures++; $display("FAIL coverage"); end
    $display("writes %0d skipped %0d pre-activations %0d", writes, skipped, preacts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
