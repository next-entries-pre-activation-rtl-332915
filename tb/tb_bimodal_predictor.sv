// tb_bimodal_predictor: exhaustive check of the 2-bit predictor next-state
// logic against a transition table written out by hand from the predictor's
// state diagram (weak states jump to the opposite strong state on a
// misprediction).
module tb_bimodal_predictor;
  import btb_pkg::*;

  int checks = 0, failures = 0;
  pred_state_t st, nx;
  logic tk, pred, chg;

  bimodal_predictor dut (.state_i(st), .taken_i(tk), .state_o(nx), .pred_o(pred), .changed_o(chg));

  // expected next state, indexed [state][taken]; states SNT,WNT,WT,ST = 0..3
  int exp_next [4][2] = '{'{0, 1}, '{0, 3}, '{0, 3}, '{2, 3}};
  int exp_pred [4]    = '{0, 0, 1, 1};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int t = 0; t < 2; t++) begin
        st = pred_state_t'(s);
        tk = t[0];
        #1;
        checks++;
        if (int'(nx) != exp_next[s][t]) begin
          failures++;
          $display("FAIL state %0d taken %0d: next %0d expected %0d", s, t, nx, exp_next[s][t]);
        end
        checks++;
        if (pred != exp_pred[exp_next[s][t]][0]) begin
          failures++;
          $display("FAIL pred for state %0d taken %0d", s, t);
        end
        checks++;
        if (chg != (exp_pred[exp_next[s][t]] != exp_pred[s])) begin
          failures++;
          $display("FAIL changed for state %0d taken %0d", s, t);
        end
      end
    end
    // the predicted direction changes exactly on WT->SNT and WNT->ST
    st = WT;  tk = 1'b0; #1; checks++; if (!(nx == SNT && chg)) failures++;
    st = WNT; tk = 1'b1; #1; checks++; if (!(nx == ST && chg))  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
