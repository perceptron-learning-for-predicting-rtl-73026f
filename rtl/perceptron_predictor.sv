// perceptron_predictor -- dynamic conditional branch predictor built from a
// table of perceptrons.
//
// Instead of a table of two-bit counters, the predictor keeps a table of
// perceptrons, each a vector of HIST_LEN+1 small signed weights. The branch
// address is hashed to pick one perceptron; its output is the dot product of
// its weights with the global branch history (bipolar, plus a bias input of 1),
// and the branch is predicted taken when the output is at least zero. When the
// outcome is known, the perceptron is trained if it mispredicted or if its
// output was below the threshold THETA in magnitude, and the outcome is shifted
// into the history register.
//
// Sizing: everything follows from BUDGET_KB, the kilobytes of weight storage.
// The history length is the best one for that budget, THETA = floor(1.93h+14),
// weights are 9 bits, and as many perceptrons as fit are built (1849 of 63
// weights at the default 128 KB).
//
// Interface and timing. The predictor is pipelined so that a prediction and a
// training step overlap; both ports can be used in every cycle.
//   Predict: pred_req_i with pred_pc_i in cycle t. In cycle t+1 pred_valid_o is
//     high with pred_taken_o, the output pred_y_o and pred_hist_o, the history
//     the prediction used. The history seen is the one before any outcome
//     given in cycle t.
//   Update:  upd_valid_i in cycle u with the branch address, its outcome, and
//     the pred_y_o and pred_hist_o its prediction returned. The outcome enters
//     the history at the end of cycle u. The perceptron's row is read in cycle
//     u and the trained row is written at the end of cycle u+1; a table bypass
//     makes a read of that row in cycle u+1 see the new weights.
//   ready_o is low for NUM_PERCEPTRONS cycles after reset while the table
//     clears to zero weights; requests are ignored then.
// train_o pulses in cycle u+1 when weights are written back; mispredict_o and
// saturated_o qualify that cycle, and bypass_o marks a cycle whose table read
// data came through the bypass.
//
// The perceptron arithmetic, training rule, sizing table and threshold follow
// the method. Own choices: the caller returns the prediction's output and
// history with the update (so training uses exactly what predicted), the
// address hash, the one-cycle table pipeline, and reset clearing.
module perceptron_predictor #(
  parameter int unsigned BUDGET_KB       = perceptron_pkg::DEFAULT_BUDGET_KB,
  parameter int unsigned WEIGHT_W        = perceptron_pkg::DEFAULT_WEIGHT_W,
  parameter int unsigned HIST_LEN        = perceptron_pkg::hist_len_for_budget(BUDGET_KB),
  parameter int unsigned NUM_PERCEPTRONS = perceptron_pkg::num_perceptrons(BUDGET_KB, HIST_LEN, WEIGHT_W),
  parameter int unsigned THETA           = perceptron_pkg::theta_for_hist(HIST_LEN),
  parameter int unsigned PC_W            = 32,
  parameter int unsigned PC_SHIFT        = 2,
  parameter int unsigned Y_W             = perceptron_pkg::output_width(HIST_LEN, WEIGHT_W)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     ready_o,
  // prediction
  input  logic                     pred_req_i,
  input  logic [PC_W-1:0]          pred_pc_i,
  output logic                     pred_valid_o,
  output logic                     pred_taken_o,
  output logic signed [Y_W-1:0]    pred_y_o,
  output logic [HIST_LEN-1:0]      pred_hist_o,
  // update with the resolved outcome
  input  logic                     upd_valid_i,
  input  logic [PC_W-1:0]          upd_pc_i,
  input  logic                     upd_taken_i,
  input  logic signed [Y_W-1:0]    upd_y_i,
  input  logic [HIST_LEN-1:0]      upd_hist_i,
  output logic                     train_o,
  // status, for performance counters
  output logic                     mispredict_o,  // the trained branch was mispredicted
  output logic                     saturated_o,   // a weight was held at its limit
  output logic                     bypass_o       // a table read was served by the bypass
);

  localparam int unsigned NUM_WEIGHTS = HIST_LEN + 1;
  localparam int unsigned IDX_W       = (NUM_PERCEPTRONS > 1) ? $clog2(NUM_PERCEPTRONS) : 1;

  typedef logic [HIST_LEN:0][WEIGHT_W-1:0] row_t;

  logic busy;
  assign ready_o = !busy;

  logic pred_fire, upd_fire;
  assign pred_fire = pred_req_i  && !busy;
  assign upd_fire  = upd_valid_i && !busy;

  // ---------------------------------------------------------------- history
  logic [HIST_LEN-1:0] ghr;

  history_register #(.HIST_LEN(HIST_LEN)) u_ghr (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_i (upd_fire),
    .taken_i (upd_taken_i),
    .hist_o  (ghr)
  );

  // ---------------------------------------------------------------- hashing
  logic [IDX_W-1:0] pred_idx, upd_idx;

  index_hash #(.PC_W(PC_W), .PC_SHIFT(PC_SHIFT), .NUM_ENTRIES(NUM_PERCEPTRONS), .IDX_W(IDX_W))
    u_hash_pred (.pc_i(pred_pc_i), .idx_o(pred_idx));

  index_hash #(.PC_W(PC_W), .PC_SHIFT(PC_SHIFT), .NUM_ENTRIES(NUM_PERCEPTRONS), .IDX_W(IDX_W))
    u_hash_upd  (.pc_i(upd_pc_i),  .idx_o(upd_idx));

  // ---------------------------------------------------------------- table
  row_t             pred_row, train_row, new_row;
  logic             wr_en;
  logic [IDX_W-1:0] t2_idx;
  logic             byp_a, byp_b;

  weight_table #(
    .NUM_ENTRIES (NUM_PERCEPTRONS),
    .NUM_WEIGHTS (NUM_WEIGHTS),
    .WEIGHT_W    (WEIGHT_W),
    .IDX_W       (IDX_W)
  ) u_table (
    .clk         (clk),
    .rst_n       (rst_n),
    .init_busy_o (busy),
    .rd_a_en_i   (pred_fire),
    .rd_a_idx_i  (pred_idx),
    .rd_a_data_o (pred_row),
    .rd_a_byp_o  (byp_a),
    .rd_b_en_i   (upd_fire),
    .rd_b_idx_i  (upd_idx),
    .rd_b_data_o (train_row),
    .rd_b_byp_o  (byp_b),
    .wr_en_i     (wr_en),
    .wr_idx_i    (t2_idx),
    .wr_data_i   (new_row)
  );

  // ---------------------------------------------------------------- predict stage
  logic [HIST_LEN-1:0] p2_hist;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pred_valid_o <= 1'b0;
      p2_hist      <= '0;
    end else begin
      pred_valid_o <= pred_fire;
      if (pred_fire) p2_hist <= ghr;
    end
  end

  perceptron_output #(.HIST_LEN(HIST_LEN), .WEIGHT_W(WEIGHT_W), .Y_W(Y_W)) u_output (
    .weights_i (pred_row),
    .hist_i    (p2_hist),
    .y_o       (pred_y_o),
    .taken_o   (pred_taken_o)
  );

  assign pred_hist_o = p2_hist;

  // ---------------------------------------------------------------- training stage
  logic                  t2_valid;
  logic                  t2_taken;
  logic signed [Y_W-1:0] t2_y;
  logic [HIST_LEN-1:0]   t2_hist;
  logic                  train, mispredict, saturated;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t2_valid <= 1'b0;
      t2_taken <= 1'b0;
      t2_y     <= '0;
      t2_hist  <= '0;
      t2_idx   <= '0;
    end else begin
      t2_valid <= upd_fire;
      if (upd_fire) begin
        t2_taken <= upd_taken_i;
        t2_y     <= upd_y_i;
        t2_hist  <= upd_hist_i;
        t2_idx   <= upd_idx;
      end
    end
  end

  perceptron_trainer #(
    .HIST_LEN (HIST_LEN),
    .WEIGHT_W (WEIGHT_W),
    .Y_W      (Y_W),
    .THETA    (THETA)
  ) u_trainer (
    .weights_i    (train_row),
    .hist_i       (t2_hist),
    .y_i          (t2_y),
    .taken_i      (t2_taken),
    .train_o      (train),
    .mispredict_o (mispredict),
    .saturated_o  (saturated),
    .weights_o    (new_row)
  );

  assign wr_en   = t2_valid && train;
  assign train_o = wr_en;

  assign mispredict_o = t2_valid && mispredict;
  assign saturated_o  = wr_en && saturated;
  assign bypass_o     = byp_a || byp_b;

  // A training step always works on a row that was read for it.
  a_train_after_read: assert property (@(posedge clk) disable iff (!rst_n)
    t2_valid |-> !busy);

endmodule
