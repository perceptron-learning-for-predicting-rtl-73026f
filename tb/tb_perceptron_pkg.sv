// tb_perceptron_pkg -- checks the sizing functions of perceptron_pkg.
//
// The best history length of every listed budget, the threshold
// floor(1.93*h + 14) worked out in real arithmetic, and the number of
// perceptrons a budget holds, against values computed here independently.
module tb_perceptron_pkg;
  import perceptron_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int unsigned budgets [10] = '{1, 2, 4, 8, 16, 32, 64, 128, 256, 512};
  int unsigned hists   [10] = '{12, 22, 28, 34, 36, 59, 59, 62, 62, 62};

  initial begin
    for (int i = 0; i < 10; i++) begin
      int unsigned h;
      h = hist_len_for_budget(budgets[i]);
      check($sformatf("history length of %0d KB", budgets[i]), h, hists[i]);
      check($sformatf("theta of h=%0d", h), theta_for_hist(h), longint'($floor(1.93 * h + 14.0)));
      check($sformatf("perceptrons in %0d KB", budgets[i]),
            num_perceptrons(budgets[i], h, 9), (longint'(budgets[i]) * 8192) / ((h + 1) * 9));
    end
    // a few spot values worked out by hand
    check("theta h=62", theta_for_hist(62), 133);
    check("theta h=12", theta_for_hist(12), 37);
    check("perceptrons 128 KB", num_perceptrons(128, 62, 9), 1849);
    check("output width h=62 w=9", output_width(62, 9), 15);
    check("weight width", DEFAULT_WEIGHT_W, 9);
    check("default budget", DEFAULT_BUDGET_KB, 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
