// tb_budget_sweep -- the predictor at every hardware budget of the sizing table.
//
// Ten predictors side by side, at 1, 2, 4, ... 512 KB (history lengths 12 to
// 62, 70 to 7397 perceptrons, 9-bit weights), each sized only through its
// BUDGET_KB parameter. Each runs predictor_driver's program, sequentially and
// then pipelined, checked against the reference model, and must learn the
// learnable branches at every size.
module tb_budget_sweep;
  localparam int NCFG = 10;
  localparam int unsigned BUDGETS [NCFG] = '{1, 2, 4, 8, 16, 32, 64, 128, 256, 512};

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  logic [NCFG-1:0] done;
  int              checks   [NCFG];
  int              failures [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    localparam int unsigned KB  = BUDGETS[g];
    localparam int unsigned H   = perceptron_pkg::hist_len_for_budget(KB);
    localparam int unsigned N   = perceptron_pkg::num_perceptrons(KB, H, 9);
    localparam int unsigned TH  = perceptron_pkg::theta_for_hist(H);
    localparam int unsigned Y_W = perceptron_pkg::output_width(H, 9);

    logic                  ready, pred_req, pred_valid, pred_taken;
    logic [31:0]           pred_pc, upd_pc;
    logic signed [Y_W-1:0] pred_y, upd_y;
    logic [H-1:0]          pred_hist, upd_hist;
    logic                  upd_valid, upd_taken, train, mispredict, saturated, bypass;

    perceptron_predictor #(.BUDGET_KB(KB)) dut (
      .clk(clk), .rst_n(rst_n), .ready_o(ready),
      .pred_req_i(pred_req), .pred_pc_i(pred_pc), .pred_valid_o(pred_valid),
      .pred_taken_o(pred_taken), .pred_y_o(pred_y), .pred_hist_o(pred_hist),
      .upd_valid_i(upd_valid), .upd_pc_i(upd_pc), .upd_taken_i(upd_taken),
      .upd_y_i(upd_y), .upd_hist_i(upd_hist), .train_o(train),
      .mispredict_o(mispredict), .saturated_o(saturated), .bypass_o(bypass));

    predictor_driver #(
      .HIST_LEN(H), .WEIGHT_W(9), .NUM_PERCEPTRONS(N), .THETA(TH), .Y_W(Y_W),
      .SEQ_BRANCHES(4000), .PIPE_CYCLES(3000), .REQUIRE_SAT(1'b0)
    ) drv (
      .clk(clk), .rst_n(rst_n), .ready(ready),
      .pred_req(pred_req), .pred_pc(pred_pc), .pred_valid(pred_valid),
      .pred_taken(pred_taken), .pred_y(pred_y), .pred_hist(pred_hist),
      .upd_valid(upd_valid), .upd_pc(upd_pc), .upd_taken(upd_taken),
      .upd_y(upd_y), .upd_hist(upd_hist), .train(train),
      .mispredict(mispredict), .saturated(saturated), .bypass(bypass),
      .done(done[g]), .checks(checks[g]), .failures(failures[g]));

    initial begin
      @(posedge rst_n);
      $display("config %0d KB: history %0d, theta %0d, %0d perceptrons", KB, H, TH, N);
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
  end

  initial begin
    int c, f;
    fork
      begin @(posedge rst_n); wait (&done); end
      repeat (100000) @(posedge clk);
    join_any
    c = 0; f = 0;
    for (int i = 0; i < NCFG; i++) begin c += checks[i]; f += failures[i]; end
    if (!(&done)) begin
      $display("FAIL watchdog");
      f++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
