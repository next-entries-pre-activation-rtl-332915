// tb_power_mode_ctrl: random deactivation, pre-activation and wake-up
// requests on two small controllers (wake-up latency 1 and 3). A time-based
// reference records the cycle each wake-up was requested and expects the
// entry to be accessible exactly WAKE_LAT cycles later; deactivation must put
// only active entries to sleep, and never in a cycle with a wake request.
module tb_power_mode_ctrl;
  localparam int E = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [E-1:0] deact, preact, wake;
  logic [E-1:0] act1, drw1, ws1, act3, drw3, ws3;

  power_mode_ctrl #(.ENTRIES(E), .WAKE_LAT(1)) dut1 (
    .clk, .rst_n, .deact_i(deact), .preact_i(preact), .wake_i(wake),
    .active_o(act1), .drowsy_o(drw1), .wake_start_o(ws1));
  power_mode_ctrl #(.ENTRIES(E), .WAKE_LAT(3)) dut3 (
    .clk, .rst_n, .deact_i(deact), .preact_i(preact), .wake_i(wake),
    .active_o(act3), .drowsy_o(drw3), .wake_start_o(ws3));

  // reference: 0 active, 1 drowsy, 2 waking until cycle ready_at
  int m1 [E], m3 [E];
  longint r1 [E], r3 [E];
  longint cyc = 0;
  int wakes = 0, sleeps = 0;

  task automatic ref_step(ref int m [E], ref longint r [E], input int lat);
    for (int i = 0; i < E; i++) begin
      case (m[i])
        0: if (deact[i] && !preact[i] && !wake[i]) m[i] = 1;
        1: if (preact[i] || wake[i]) begin m[i] = 2; r[i] = cyc + lat; end
        default: ;
      endcase
      if (m[i] == 2 && cyc + 1 >= r[i]) m[i] = 0;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    deact = '0; preact = '0; wake = '0;
    for (int i = 0; i < E; i++) begin m1[i] = 0; m3[i] = 0; r1[i] = 0; r3[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check present state
      for (int i = 0; i < E; i++) begin
        checks++;
        if (act1[i] != (m1[i] == 0) || drw1[i] != (m1[i] == 1) ||
            act3[i] != (m3[i] == 0) || drw3[i] != (m3[i] == 1)) begin
          failures++;
          $display("FAIL cycle %0d entry %0d: act1=%0d drw1=%0d ref=%0d act3=%0d drw3=%0d ref=%0d",
                   cyc, i, act1[i], drw1[i], m1[i], act3[i], drw3[i], m3[i]);
        end
      end
      // new requests: deactivate often, wake rarely
      for (int i = 0; i < E; i++) begin
        deact[i]  = ($urandom % 4) == 0;
        preact[i] = ($urandom % 10) == 0;
        wake[i]   = ($urandom % 12) == 0;
      end
      #1;
      for (int i = 0; i < E; i++) begin
        checks++;
        if (ws1[i] != (m1[i] == 1 && (preact[i] || wake[i]))) begin
          failures++; $display("FAIL wake_start1 cycle %0d entry %0d", cyc, i);
        end
        if (m1[i] == 1 && (preact[i] || wake[i])) wakes++;
        if (m1[i] == 0 && deact[i] && !preact[i] && !wake[i]) sleeps++;
      end
      @(posedge clk);
      ref_step(m1, r1, 1);
      ref_step(m3, r3, 3);
      cyc++;
    end
    checks++;
    if (wakes == 0 || sleeps == 0) begin failures++; $display("FAIL no wake-up or no sleep seen"); end
    $display("wake-ups %0d, deactivations %0d", wakes, sleeps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
