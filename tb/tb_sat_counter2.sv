// tb_sat_counter2: exhaustive check of the two-bit saturating counter.
// All four states are tried with both outcomes; the expected next state is
// count+1 capped at 3 for taken and count-1 floored at 0 for not-taken, and
// the prediction must be the state's upper bit (states 2 and 3 predict taken).
module tb_sat_counter2;
  import bp_pkg::*;

  ctr_t ctr, nxt;
  logic taken, pred;
  int   checks = 0, failures = 0;

  sat_counter2 dut (.ctr_i(ctr), .taken_i(taken), .ctr_o(nxt), .predict_o(pred));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 4; c++) begin
      for (int t = 0; t < 2; t++) begin
        int exp_n;
        ctr   = ctr_t'(c);
        taken = t[0];
        #1;
        exp_n = t ? ((c == 3) ? 3 : c + 1) : ((c == 0) ? 0 : c - 1);
        checks++;
        if (int'(nxt) != exp_n) begin
          failures++;
          $display("FAIL state %0d taken %0d: next %0d expected %0d", c, t, nxt, exp_n);
        end
        checks++;
        if (pred != (c >= 2)) begin
          failures++;
          $display("FAIL state %0d: prediction %0b", c, pred);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
