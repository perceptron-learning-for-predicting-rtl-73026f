// tb_perceptron_output -- checks the perceptron dot product and prediction.
//
// For random weights and histories (and the extreme cases: all weights at the
// most negative or most positive value, all-taken and all-not-taken history),
// the output must equal bias + sum of (+w or -w) computed here with plain
// integers, and the prediction must be taken exactly when it is >= 0.
module tb_perceptron_output;
  localparam int unsigned H   = 62;
  localparam int unsigned W   = 9;
  localparam int unsigned Y_W = 15;

  logic [H:0][W-1:0]     weights;
  logic [H-1:0]          hist;
  logic signed [Y_W-1:0] y;
  logic                  taken;

  int checks = 0;
  int failures = 0;
  int n_taken = 0;

  perceptron_output #(.HIST_LEN(H), .WEIGHT_W(W), .Y_W(Y_W)) dut (
    .weights_i(weights), .hist_i(hist), .y_o(y), .taken_o(taken));

  function automatic int wval(input logic [W-1:0] v);
    return (v >= (1 << (W - 1))) ? int'(v) - (1 << W) : int'(v);
  endfunction

  task automatic try();
    int exp;
    #1;
    exp = wval(weights[0]);
    for (int i = 0; i < H; i++) exp += hist[i] ? wval(weights[i+1]) : -wval(weights[i+1]);
    checks++;
    if (int'(y) != exp || taken != (exp >= 0)) begin
      failures++;
      $display("FAIL y %0d taken %0b, expected %0d %0b", y, taken, exp, exp >= 0);
    end
    if (taken) n_taken++;
  endtask

  initial begin
    for (int i = 0; i <= H; i++) weights[i] = W'(1 << (W - 1));   // most negative
    hist = '1;  try();
    hist = '0;  try();
    for (int i = 0; i <= H; i++) weights[i] = W'((1 << (W - 1)) - 1); // most positive
    hist = '1;  try();
    hist = '0;  try();
    weights = '0; hist = '0; try();
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i <= H; i++) weights[i] = W'($urandom);
      hist = {$urandom, $urandom};
      try();
      // small weights give outputs near zero, where the sign matters
      for (int i = 0; i <= H; i++) weights[i] = W'(int'($urandom % 5) - 2);
      try();
    end
    checks++;
    if (n_taken == 0 || n_taken == checks - 1) begin
      failures++;
      $display("FAIL only one prediction direction seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
