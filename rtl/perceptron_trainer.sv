// perceptron_trainer -- perceptron learning rule with saturating weights.
//
// Given the weight vector of the perceptron that predicted a branch, the history
// and output y it predicted with, and the branch's real outcome t (+1 taken,
// -1 not taken), decides whether to train and computes the new weights.
// Training happens when the prediction (taken iff y >= 0) was wrong, or when
// |y| is below the threshold THETA. Training is perceptron learning with unit
// rate: every weight moves by t * x_i, i.e. up by one where the input agreed
// with the outcome and down by one where it did not; the bias weight (input 1)
// moves toward the outcome. The weights are small signed integers with
// saturating arithmetic: they stay within [-2^(W-1), 2^(W-1)-1].
//
// Purely combinational. train_o says whether weights_o should be written back;
// weights_o equals weights_i when it is low. mispredict_o and saturated_o (a
// weight held at a limit it would have crossed) are status outputs.
//
// From the method: the training condition, unit learning rate and saturating
// integer weights. Own choice: "below the threshold" is read as |y| < THETA.
module perceptron_trainer #(
  parameter int unsigned HIST_LEN = 62,
  parameter int unsigned WEIGHT_W = 9,
  parameter int unsigned Y_W      = perceptron_pkg::output_width(HIST_LEN, WEIGHT_W),
  parameter int unsigned THETA    = perceptron_pkg::theta_for_hist(HIST_LEN)
) (
  input  logic [HIST_LEN:0][WEIGHT_W-1:0] weights_i,
  input  logic [HIST_LEN-1:0]             hist_i,
  input  logic signed [Y_W-1:0]           y_i,
  input  logic                            taken_i,
  output logic                            train_o,
  output logic                            mispredict_o,
  output logic                            saturated_o,
  output logic [HIST_LEN:0][WEIGHT_W-1:0] weights_o
);

  localparam logic signed [WEIGHT_W-1:0] W_MAX = {1'b0, {(WEIGHT_W-1){1'b1}}};
  localparam logic signed [WEIGHT_W-1:0] W_MIN = {1'b1, {(WEIGHT_W-1){1'b0}}};
  localparam logic signed [WEIGHT_W-1:0] W_ONE = WEIGHT_W'(1);

  logic              [Y_W-1:0]      y_mag;
  logic                             input_agrees;
  logic signed       [WEIGHT_W-1:0] w;

  always_comb begin
    mispredict_o = (y_i >= 0) != taken_i;
    y_mag        = y_i[Y_W-1] ? Y_W'(-y_i) : Y_W'(y_i);
    train_o      = mispredict_o || (y_mag < Y_W'(THETA));
    saturated_o  = 1'b0;
    weights_o    = weights_i;
    input_agrees = 1'b0;
    w            = '0;
    if (train_o) begin
      for (int unsigned i = 0; i <= HIST_LEN; i++) begin
        // input x_i agrees with the outcome t  <=>  t * x_i = +1
        input_agrees = (i == 0) ? taken_i : (hist_i[i-1] == taken_i);
        w = $signed(weights_i[i]);
        if (input_agrees) begin
          if (w == W_MAX) saturated_o = 1'b1;
          else            w = w + W_ONE;
        end else begin
          if (w == W_MIN) saturated_o = 1'b1;
          else            w = w - W_ONE;
        end
        weights_o[i] = w;
      end
    end
  end

endmodule
