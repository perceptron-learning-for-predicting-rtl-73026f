// history_register -- global pattern history register of the perceptron predictor.
//
// Holds the outcomes of the last HIST_LEN resolved conditional branches, one bit
// each (1 = taken, 0 = not taken). Every time a branch outcome becomes known
// (shift_i high), the outcome is shifted in at bit 0, so hist_o[0] is the most
// recent branch and hist_o[HIST_LEN-1] the oldest; the oldest bit falls out.
// The new value is visible on hist_o the cycle after shift_i.
//
// The shift-in-on-resolution behaviour follows the method. Own choices: the bit
// order, and clearing the register to all not-taken on reset.
module history_register #(
  parameter int unsigned HIST_LEN = 62
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_i,  // a branch outcome is known this cycle
  input  logic                taken_i,  // that outcome (1 = taken)
  output logic [HIST_LEN-1:0] hist_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       hist_o <= '0;
    else if (shift_i) hist_o <= {hist_o[HIST_LEN-2:0], taken_i};
  end

endmodule
