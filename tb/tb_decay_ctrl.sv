// tb_decay_ctrl: decay interval 16, global interval 4, 4 entries, random
// sparse touches. The reference counts global ticks since the last touch of
// each entry; in addition every deactivation must come between
// DECAY - GLOBAL + 1 and DECAY cycles after the last touch, and the global
// tick must have period GLOBAL.
module tb_decay_ctrl;
  localparam int E = 4, D = 16, G = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [E-1:0] touch, deact;
  logic tick;

  decay_ctrl #(.ENTRIES(E), .DECAY_INTERVAL(D), .GLOBAL_INTERVAL(G)) dut (
    .clk, .rst_n, .touch_i(touch), .tick_o(tick), .deact_o(deact));

  int     ticks_since [E];
  longint last_touch  [E];
  longint cyc = 1;
  int     rises = 0;
  logic [E-1:0] prev_deact;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    touch = '0; prev_deact = '0;
    for (int i = 0; i < E; i++) begin ticks_since[i] = 0; last_touch[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int i = 0; i < E; i++) begin
        checks++;
        if (deact[i] != (ticks_since[i] >= D / G)) begin
          failures++;
          $display("FAIL cycle %0d entry %0d deact=%0d ticks=%0d", cyc, i, deact[i], ticks_since[i]);
        end
        if (deact[i] && !prev_deact[i]) begin
          rises++;
          checks++;
          if (cyc - last_touch[i] < D - G + 1 || cyc - last_touch[i] > D) begin
            failures++;
            $display("FAIL entry %0d decayed %0d cycles after its touch", i, cyc - last_touch[i]);
          end
        end
      end
      prev_deact = deact;
      checks++;
      if (tick != ((cyc % G) == G - 1)) begin failures++; $display("FAIL tick at cycle %0d", cyc); end
      // touches: entry 0 often, entry 3 never after reset, others in bursts
      touch[0] = ($urandom % 8) == 0;
      touch[1] = ($urandom % 30) == 0;
      touch[2] = (n % 200) < 20 && ($urandom % 2 == 0);
      touch[3] = 1'b0;
      @(posedge clk);
      for (int i = 0; i < E; i++) begin
        if (touch[i]) begin ticks_since[i] = 0; last_touch[i] = cyc + 1; end
        else if (tick && ticks_since[i] < D / G) ticks_since[i]++;
      end
      cyc++;
    end
    checks++;
    if (rises < 3) begin failures++; $display("FAIL too few deactivations (%0d)", rises); end
    $display("deactivations %0d", rises);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
