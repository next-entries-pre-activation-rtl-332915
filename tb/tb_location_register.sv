// tb_location_register: random BTB writes into a one-direction and a
// two-direction location register; the register must hold the location of
// the last write, with DIR = changed (one-direction) or taken (two-direction),
// and keep its value when no write happens.
module tb_location_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       fire, tk, chg;
  logic [6:0] s;
  logic [1:0] w;
  logic       v1, d1, v2, d2;
  logic [6:0] s1, s2;
  logic [1:0] w1, w2;

  location_register #(.SET_W(7), .WAY_W(2), .ONE_DIR(1'b1)) dut1 (
    .clk, .rst_n, .upd_fire_i(fire), .upd_set_i(s), .upd_way_i(w), .upd_taken_i(tk),
    .upd_changed_i(chg), .valid_o(v1), .set_o(s1), .way_o(w1), .dir_o(d1));
  location_register #(.SET_W(7), .WAY_W(2), .ONE_DIR(1'b0)) dut2 (
    .clk, .rst_n, .upd_fire_i(fire), .upd_set_i(s), .upd_way_i(w), .upd_taken_i(tk),
    .upd_changed_i(chg), .valid_o(v2), .set_o(s2), .way_o(w2), .dir_o(d2));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       ev;
    logic [6:0] es;
    logic [1:0] ew;
    logic       et, ec;
    ev = 0; es = 0; ew = 0; et = 0; ec = 0;
    fire = 0; tk = 0; chg = 0; s = 0; w = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    checks++; if (v1 || v2) begin failures++; $display("FAIL valid after reset"); end
    for (int n = 0; n < 300; n++) begin
      fire = ($urandom % 3) != 0; tk = 1'($urandom); chg = 1'($urandom);
      s = 7'($urandom); w = 2'($urandom);
      @(posedge clk);
      if (fire) begin ev = 1; es = s; ew = w; et = tk; ec = chg; end
      @(negedge clk);
      checks++;
      if (v1 != ev || v2 != ev || (ev && (s1 != es || w1 != ew || s2 != es || w2 != ew ||
                                          d1 != ec || d2 != et))) begin
        failures++;
        $display("FAIL step %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
