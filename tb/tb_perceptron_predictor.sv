// tb_perceptron_predictor -- end-to-end test of the predictor at a small size.
//
// A 1 KB budget (history length 12, threshold 37, 8192 / (13 * 6) = 105
// perceptrons) with 6-bit weights, so that weights reach their saturation
// limits within a short run; everything else is as in the full-size design.
// predictor_driver supplies the workload, the reference model and the checks.
module tb_perceptron_predictor;
  localparam int unsigned BUDGET_KB = 1;
  localparam int unsigned WEIGHT_W  = 6;
  localparam int unsigned H   = perceptron_pkg::hist_len_for_budget(BUDGET_KB);
  localparam int unsigned N   = perceptron_pkg::num_perceptrons(BUDGET_KB, H, WEIGHT_W);
  localparam int unsigned TH  = perceptron_pkg::theta_for_hist(H);
  localparam int unsigned Y_W = perceptron_pkg::output_width(H, WEIGHT_W);

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  logic                  ready, pred_req, pred_valid, pred_taken;
  logic [31:0]           pred_pc, upd_pc;
  logic signed [Y_W-1:0] pred_y, upd_y;
  logic [H-1:0]          pred_hist, upd_hist;
  logic                  upd_valid, upd_taken, train, mispredict, saturated, bypass;
  logic                  done;
  int                    checks, failures;

  perceptron_predictor #(.BUDGET_KB(BUDGET_KB), .WEIGHT_W(WEIGHT_W)) dut (
    .clk(clk), .rst_n(rst_n), .ready_o(ready),
    .pred_req_i(pred_req), .pred_pc_i(pred_pc), .pred_valid_o(pred_valid),
    .pred_taken_o(pred_taken), .pred_y_o(pred_y), .pred_hist_o(pred_hist),
    .upd_valid_i(upd_valid), .upd_pc_i(upd_pc), .upd_taken_i(upd_taken),
    .upd_y_i(upd_y), .upd_hist_i(upd_hist), .train_o(train),
    .mispredict_o(mispredict), .saturated_o(saturated), .bypass_o(bypass));

  predictor_driver #(
    .HIST_LEN(H), .WEIGHT_W(WEIGHT_W), .NUM_PERCEPTRONS(N), .THETA(TH), .Y_W(Y_W),
    .SEQ_BRANCHES(6000), .PIPE_CYCLES(6000), .REQUIRE_SAT(1'b1)
  ) drv (
    .clk(clk), .rst_n(rst_n), .ready(ready),
    .pred_req(pred_req), .pred_pc(pred_pc), .pred_valid(pred_valid),
    .pred_taken(pred_taken), .pred_y(pred_y), .pred_hist(pred_hist),
    .upd_valid(upd_valid), .upd_pc(upd_pc), .upd_taken(upd_taken),
    .upd_y(upd_y), .upd_hist(upd_hist), .train(train),
    .mispredict(mispredict), .saturated(saturated), .bypass(bypass),
    .done(done), .checks(checks), .failures(failures));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
  end

  initial begin
    fork
      begin @(posedge rst_n); wait (done); end
      repeat (200000) @(posedge clk);
    join_any
    if (!done) begin
      $display("FAIL watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    end else
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
