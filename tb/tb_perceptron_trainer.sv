// tb_perceptron_trainer -- checks the training decision and weight update.
//
// For random weights (many at or next to the saturation limits), histories,
// outputs around the threshold and outcomes, the trainer must train exactly
// when the sign of y disagrees with the outcome or |y| < THETA, move each weight
// by +1 or -1 according to outcome times input (bias input 1), hold weights at
// [-256, 255], and flag saturation. The model here uses plain integers.
module tb_perceptron_trainer;
  localparam int unsigned H     = 62;
  localparam int unsigned W     = 9;
  localparam int unsigned Y_W   = 15;
  localparam int          THETA = 133;

  logic [H:0][W-1:0]     w_in, w_out;
  logic [H-1:0]          hist;
  logic signed [Y_W-1:0] y;
  logic                  taken;
  logic                  train, mispredict, saturated;

  int checks = 0;
  int failures = 0;
  int n_train = 0, n_keep = 0, n_sat = 0, n_mis = 0;

  perceptron_trainer #(.HIST_LEN(H), .WEIGHT_W(W), .Y_W(Y_W), .THETA(THETA)) dut (
    .weights_i(w_in), .hist_i(hist), .y_i(y), .taken_i(taken),
    .train_o(train), .mispredict_o(mispredict), .saturated_o(saturated), .weights_o(w_out));

  function automatic int wval(input logic [W-1:0] v);
    return (v >= (1 << (W - 1))) ? int'(v) - (1 << W) : int'(v);
  endfunction

  task automatic try();
    int  t, x, nw, yi;
    bit  exp_train, exp_mis, exp_sat;
    logic [H:0][W-1:0] exp_w;
    #1;
    yi = int'(y);
    t = taken ? 1 : -1;
    exp_mis   = (yi >= 0) != taken;
    exp_train = exp_mis || ((yi < 0 ? -yi : yi) < THETA);
    exp_sat   = 0;
    exp_w     = w_in;
    if (exp_train)
      for (int i = 0; i <= H; i++) begin
        x  = (i == 0) ? 1 : (hist[i-1] ? 1 : -1);
        nw = wval(w_in[i]) + t * x;
        if (nw > 255)  begin nw = 255;  exp_sat = 1; end
        if (nw < -256) begin nw = -256; exp_sat = 1; end
        exp_w[i] = W'(nw);
      end
    checks++;
    if (train != exp_train || mispredict != exp_mis || saturated != exp_sat || w_out !== exp_w) begin
      failures++;
      $display("FAIL y=%0d t=%0b: train %0b/%0b mis %0b/%0b sat %0b/%0b weights %s",
               yi, taken, train, exp_train, mispredict, exp_mis, saturated, exp_sat,
               (w_out === exp_w) ? "ok" : "differ");
    end
    if (exp_train) n_train++; else n_keep++;
    if (exp_sat) n_sat++;
    if (exp_mis) n_mis++;
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      for (int i = 0; i <= H; i++)
        case ($urandom % 4)
          0: w_in[i] = W'(255 - ($urandom % 2));
          1: w_in[i] = W'(-256 + ($urandom % 2));
          default: w_in[i] = W'($urandom);
        endcase
      hist  = {$urandom, $urandom};
      taken = $urandom[0];
      case ($urandom % 3)
        0: y = Y_W'(int'($urandom % 9) - 4 + ($urandom[0] ? THETA : -THETA));
        1: y = Y_W'(int'($urandom % 20) - 10);
        default: y = Y_W'(int'($urandom % 4000) - 2000);
      endcase
      try();
    end
    // exact threshold boundary
    taken = 1'b1; y = Y_W'(THETA - 1); try();
    taken = 1'b1; y = Y_W'(THETA);     try();
    taken = 1'b0; y = Y_W'(-THETA);    try();
    taken = 1'b1; y = '0;              try();
    checks++;
    if (n_train == 0 || n_keep == 0 || n_sat == 0 || n_mis == 0) begin
      failures++;
      $display("FAIL coverage train=%0d keep=%0d sat=%0d mis=%0d", n_train, n_keep, n_sat, n_mis);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
