// tb_way_encoder: drives every zero or one-hot match vector of a 4-way and an
// 8-way set into the way encoder and checks the hit flag and way number.
module tb_way_encoder;
  int checks = 0, failures = 0;

  logic [3:0] m4;  logic h4;  logic [1:0] w4;
  logic [7:0] m8;  logic h8;  logic [2:0] w8;

  way_encoder #(.WAYS(4)) dut4 (.match_i(m4), .hit_o(h4), .way_o(w4));
  way_encoder #(.WAYS(8)) dut8 (.match_i(m8), .hit_o(h8), .way_o(w8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m4 = '0; m8 = '0; #1;
    checks++; if (h4 || h8) begin failures++; $display("FAIL hit on empty match"); end
    for (int w = 0; w < 4; w++) begin
      m4 = 4'b1 << w; #1;
      checks++;
      if (!h4 || int'(w4) != w) begin failures++; $display("FAIL 4-way %0d -> %0d", w, w4); end
    end
    for (int w = 0; w < 8; w++) begin
      m8 = 8'b1 << w; #1;
      checks++;
      if (!h8 || int'(w8) != w) begin failures++; $display("FAIL 8-way %0d -> %0d", w, w8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
