// tb_deact_gate: random deactivation vectors and LR contents; the entry named
// by a valid LR must never be deactivated, all others pass unchanged.
module tb_deact_gate;
  int checks = 0, failures = 0;

  logic [63:0] din, dout;
  logic        lrv;
  logic [5:0]  lri;

  deact_gate #(.ENTRIES(64)) dut (.deact_i(din), .lr_valid_i(lrv), .lr_idx_i(lri), .deact_o(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] expd;
    for (int n = 0; n < 500; n++) begin
      din = {$urandom, $urandom};
      if (n % 3 == 0) din = '1;
      lrv = ($urandom % 4) != 0;
      lri = 6'($urandom);
      #1;
      for (int i = 0; i < 64; i++) expd[i] = din[i] && !(lrv && i == int'(lri));
      checks++;
      if (dout !== expd) begin
        failures++;
        $display("FAIL in=%h lr=%0d/%0d out=%h exp=%h", din, lrv, lri, dout, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
