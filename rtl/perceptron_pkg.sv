// perceptron_pkg -- sizing rules shared by the perceptron branch predictor.
//
// The predictor is sized from one number, its hardware budget in kilobytes of
// weight storage. From it follow the history length (best values measured per
// budget), the training threshold (a linear function of the history length) and
// the number of perceptrons that fit in the budget. These functions are
// elaboration-time constants; nothing here is hardware by itself.
//
// From the method: the budget-to-history-length table, 9-bit weights and
// theta = floor(1.93*h + 14). Own choices: the budget counts weight bits only
// (h+1 weights of WEIGHT_W bits per perceptron), budgets between the listed
// ones take the history length of the next smaller listed budget, and the
// output word is wide enough that the dot product can never overflow.
package perceptron_pkg;

  // Default weight width: 9-bit signed weights gave the best balance.
  localparam int unsigned DEFAULT_WEIGHT_W = 9;

  // Default hardware budget in kilobytes.
  localparam int unsigned DEFAULT_BUDGET_KB = 128;

  // Best history length for a hardware budget (kilobytes).
  function automatic int unsigned hist_len_for_budget(input int unsigned budget_kb);
    if      (budget_kb >= 128) return 62;
    else if (budget_kb >= 32)  return 59;
    else if (budget_kb >= 16)  return 36;
    else if (budget_kb >= 8)   return 34;
    else if (budget_kb >= 4)   return 28;
    else if (budget_kb >= 2)   return 22;
    else                       return 12;
  endfunction

  // Training threshold theta = floor(1.93*h + 14), in exact integer arithmetic.
  function automatic int unsigned theta_for_hist(input int unsigned hist_len);
    return (193 * hist_len + 1400) / 100;
  endfunction

  // Perceptrons that fit in the budget: each holds hist_len+1 weights.
  function automatic int unsigned num_perceptrons(input int unsigned budget_kb,
                                                  input int unsigned hist_len,
                                                  input int unsigned weight_w);
    return (budget_kb * 1024 * 8) / ((hist_len + 1) * weight_w);
  endfunction

  // Width of the signed perceptron output: |y| <= (h+1) * 2^(W-1).
  function automatic int unsigned output_width(input int unsigned hist_len,
                                               input int unsigned weight_w);
    return weight_w + $clog2(hist_len + 2);
  endfunction

endpackage
