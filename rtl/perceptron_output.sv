// perceptron_output -- output and prediction of one perceptron.
//
// The inputs of the perceptron are a constant bias input of 1 and the HIST_LEN
// history bits taken as bipolar values (taken = +1, not taken = -1). The output
// is the dot product of these inputs with the weight vector:
//   y = w[0] + sum_i x_i * w[i+1],   x_i = hist_i ? +1 : -1
// and the branch is predicted taken when y >= 0.
//
// Because every input is +1 or -1 no multiplier is needed. A weight times -1 is
// its two's complement, ~w + 1, so the dot product is the sum of the weights,
// each either passed or bit-inverted by its history bit, plus the number of
// not-taken history bits as a carry-in term: one multi-operand addition, like
// the partial-product sum of an integer multiplier.
//
// Purely combinational. weights_i[0] is the bias weight; y_o is signed, Y_W
// bits wide, enough that it cannot overflow. The method gives the arithmetic
// and the sign rule; the inverted-weight-plus-count form is this design's way
// of writing it.
module perceptron_output #(
  parameter int unsigned HIST_LEN = 62,
  parameter int unsigned WEIGHT_W = 9,
  parameter int unsigned Y_W      = perceptron_pkg::output_width(HIST_LEN, WEIGHT_W)
) (
  input  logic [HIST_LEN:0][WEIGHT_W-1:0] weights_i,
  input  logic [HIST_LEN-1:0]             hist_i,
  output logic signed [Y_W-1:0]           y_o,
  output logic                            taken_o
);

  logic signed [Y_W-1:0] sum;
  logic signed [Y_W-1:0] term;
  logic        [Y_W-1:0] n_not_taken;

  always_comb begin
    sum         = Y_W'($signed(weights_i[0]));
    n_not_taken = '0;
    for (int unsigned i = 0; i < HIST_LEN; i++) begin
      term = Y_W'($signed(hist_i[i] ? weights_i[i+1] : ~weights_i[i+1]));
      sum  = sum + term;
      n_not_taken = n_not_taken + Y_W'(!hist_i[i]);
    end
    y_o     = sum + $signed(n_not_taken);
    taken_o = !y_o[Y_W-1];
  end

endmodule
