// tb_preact_circuit: random pre-activation register contents for a one- and a
// two-register circuit; each output line must be the OR of the decoded valid
// registers.
module tb_preact_circuit;
  int checks = 0, failures = 0;

  logic [1:0]  v2;  logic [6:0] i2 [2];  logic [127:0] o2;
  logic [0:0]  v1;  logic [6:0] i1 [1];  logic [127:0] o1;

  preact_circuit #(.ENTRIES(128), .NREG(2)) dut2 (.pa_valid_i(v2), .pa_idx_i(i2), .preact_o(o2));
  preact_circuit #(.ENTRIES(128), .NREG(1)) dut1 (.pa_valid_i(v1), .pa_idx_i(i1), .preact_o(o1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pop;
    for (int n = 0; n < 400; n++) begin
      v2 = 2'($urandom); i2[0] = 7'($urandom); i2[1] = (n % 5 == 0) ? i2[0] : 7'($urandom);
      v1 = 1'($urandom); i1[0] = 7'($urandom);
      #1;
      for (int e = 0; e < 128; e++) begin
        logic exp2, exp1;
        exp2 = (v2[0] && int'(i2[0]) == e) || (v2[1] && int'(i2[1]) == e);
        exp1 = v1[0] && int'(i1[0]) == e;
        if (o2[e] != exp2 || o1[e] != exp1) begin
          failures++;
          $display("FAIL entry %0d", e);
        end
      end
      checks++;
      pop = $countones(o2);
      checks++;
      if (pop > 2) begin failures++; $display("FAIL more than two lines active"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
