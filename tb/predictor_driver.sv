// predictor_driver -- workload, reference model and checker for the complete
// perceptron predictor, shared by the end-to-end testbenches.
//
// Connects to the predictor's ports. It waits out the table clearing (and
// checks that it lasts NUM_PERCEPTRONS cycles and that requests are ignored
// meanwhile), then runs a small synthetic program of conditional branches:
//   loop  (pc 0x100)  inner-loop back edge: taken 5 times, then not taken
//   rand  (pc 0x200)  random, 50% taken
//   corr  (pc 0x300)  same outcome as the rand branch just before it
//   bias  (pc 0x400)  always taken
//   rand2 (pc 0x500)  random, 50% taken
//   xor   (pc 0x600)  rand XOR rand2: not a linearly separable function of
//                     the history, so a perceptron cannot learn it exactly
//                     (a linear decision gets at most 3 of its 4 cases right)
// and, in the pipelined phase, a few branches at random addresses (aliasing).
//
// Phase 1 (sequential): every branch is predicted, then updated the next cycle,
// so each prediction sees the full history. The learnable branches must reach
// the accuracy limits below in the second half of the phase, while the random
// branches stay mispredicted at least a quarter of the time and the XOR branch
// at least an eighth of the time.
// Phase 2 (pipelined): predictions and updates overlap at random, with 0 to 3
// branches between a prediction and its update.
//
// Every prediction (output, direction, history used, one-cycle latency) and
// every training decision is compared with a plain-integer model of the
// predictor, which processes each cycle's prediction before that cycle's
// update. Each mechanism -- clearing, training, skipped training, mispredict,
// saturation, bypass on either table port, overlap -- must happen at least once.
module predictor_driver #(
  parameter int unsigned HIST_LEN        = 12,
  parameter int unsigned WEIGHT_W        = 9,
  parameter int unsigned NUM_PERCEPTRONS = 70,
  parameter int unsigned THETA           = 37,
  parameter int unsigned Y_W             = 13,
  parameter int unsigned SEQ_BRANCHES    = 4000,
  parameter int unsigned PIPE_CYCLES     = 4000,
  parameter bit          REQUIRE_SAT     = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ready,
  output logic                  pred_req,
  output logic [31:0]           pred_pc,
  input  logic                  pred_valid,
  input  logic                  pred_taken,
  input  logic signed [Y_W-1:0] pred_y,
  input  logic [HIST_LEN-1:0]   pred_hist,
  output logic                  upd_valid,
  output logic [31:0]           upd_pc,
  output logic                  upd_taken,
  output logic signed [Y_W-1:0] upd_y,
  output logic [HIST_LEN-1:0]   upd_hist,
  input  logic                  train,
  input  logic                  mispredict,
  input  logic                  saturated,
  input  logic                  bypass,
  output logic                  done,
  output int                    checks,
  output int                    failures
);

  localparam int W_MAX = (1 << (WEIGHT_W - 1)) - 1;
  localparam int W_MIN = -(1 << (WEIGHT_W - 1));

  // ------------------------------------------------------------ model
  int                  wt [NUM_PERCEPTRONS][HIST_LEN+1];
  logic [HIST_LEN-1:0] ghr_m;

  function automatic int unsigned idx_of(input logic [31:0] pc);
    return (pc >> 2) % NUM_PERCEPTRONS;
  endfunction

  function automatic int model_y(input logic [31:0] pc);
    int unsigned r = idx_of(pc);
    int y = wt[r][0];
    for (int i = 0; i < HIST_LEN; i++) y += ghr_m[i] ? wt[r][i+1] : -wt[r][i+1];
    return y;
  endfunction

  // applies one update to the model; returns what the hardware should report
  task automatic model_update(input logic [31:0] pc, input bit t, input int y,
                              input logic [HIST_LEN-1:0] h,
                              output bit tr, output bit mis, output bit sat);
    int unsigned r = idx_of(pc);
    int nw, x;
    mis = (y >= 0) != t;
    tr  = mis || ((y < 0 ? -y : y) < int'(THETA));
    sat = 0;
    if (tr)
      for (int i = 0; i <= HIST_LEN; i++) begin
        x  = (i == 0) ? 1 : (h[i-1] ? 1 : -1);
        nw = wt[r][i] + (t ? 1 : -1) * x;
        if (nw > W_MAX) begin nw = W_MAX; sat = 1; end
        if (nw < W_MIN) begin nw = W_MIN; sat = 1; end
        wt[r][i] = nw;
      end
    ghr_m = {ghr_m[HIST_LEN-2:0], t};
  endtask

  // ------------------------------------------------------------ program
  int unsigned prog_pos;
  int unsigned loop_count;
  bit          last_rand, last_rand2;
  bit          pipelined;

  task automatic next_branch(output logic [31:0] pc, output bit t, output int kind);
    if (pipelined && ($urandom % 8) == 0) begin
      pc = {$urandom} & 32'h0000_fffc; t = $urandom[0]; kind = 4;
      return;
    end
    case (prog_pos)
      0: begin
        pc = 32'h100; kind = 0;
        loop_count++;
        t = (loop_count < 6);
        if (loop_count == 6) begin loop_count = 0; prog_pos = 1; end
      end
      1: begin pc = 32'h200; kind = 1; t = $urandom[0]; last_rand = t; prog_pos = 2; end
      2: begin pc = 32'h300; kind = 2; t = last_rand; prog_pos = 3; end
      3: begin pc = 32'h400; kind = 3; t = 1'b1; prog_pos = 4; end
      4: begin pc = 32'h500; kind = 1; t = $urandom[0]; last_rand2 = t; prog_pos = 5; end
      default: begin pc = 32'h600; kind = 5; t = last_rand ^ last_rand2; prog_pos = 0; end
    endcase
  endtask

  // ------------------------------------------------------------ counters
  int n_clear, n_ignored, n_pred, n_upd, n_train, n_keep, n_mis, n_sat;
  int n_byp_a, n_byp_b, n_overlap;
  int seen [6], wrong [6];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ------------------------------------------------------------ one cycle
  // expectations carried from the previous cycle
  bit                  pend_pred, pend_upd;
  int                  pend_y;
  logic [HIST_LEN-1:0] pend_hist;
  bit                  pend_tr, pend_mis, pend_sat, pend_byp;
  bit                  last_wr;
  int unsigned         last_widx;

  int                  obs_y;
  logic [HIST_LEN-1:0] obs_hist;
  bit                  obs_taken;

  task automatic step(input bit pr, input logic [31:0] ppc,
                      input bit up, input logic [31:0] upc, input bit ut,
                      input int uy, input logic [HIST_LEN-1:0] uh);
    bit tr, mis, sat, byp;
    @(negedge clk);
    // what the previous cycle's update should have produced this cycle
    if (pend_upd) begin
      chk(train == pend_tr, $sformatf("train %0b expected %0b", train, pend_tr));
      chk(mispredict == pend_mis, "mispredict flag");
      chk(saturated == (pend_tr && pend_sat), "saturated flag");
    end else chk(!train, "train without update");
    pred_req  = pr;  pred_pc = ppc;
    upd_valid = up;  upd_pc  = upc; upd_taken = ut;
    upd_y     = Y_W'(uy); upd_hist = uh;
    // a read of the row written this cycle must be bypassed
    byp = last_wr && ((pr && idx_of(ppc) == last_widx) || (up && idx_of(upc) == last_widx));
    if (last_wr && pr && idx_of(ppc) == last_widx) n_byp_a++;
    if (last_wr && up && idx_of(upc) == last_widx) n_byp_b++;
    if (pr) begin
      pend_y    = model_y(ppc);
      pend_hist = ghr_m;
      n_pred++;
    end
    if (pr && up) n_overlap++;
    last_wr = 0;
    if (up) begin
      model_update(upc, ut, uy, uh, tr, mis, sat);
      pend_tr = tr; pend_mis = mis; pend_sat = sat;
      last_wr = tr; last_widx = idx_of(upc);
      n_upd++;
      if (tr) n_train++; else n_keep++;
      if (mis) n_mis++;
      if (tr && sat) n_sat++;
    end
    pend_upd  = up;
    pend_pred = pr;
    pend_byp  = byp;
    @(posedge clk);
    #1;
    chk(pred_valid == pend_pred, "prediction latency: valid one cycle after request");
    chk(bypass == pend_byp, $sformatf("bypass %0b expected %0b", bypass, pend_byp));
    if (pend_pred) begin
      obs_y     = int'(pred_y);
      obs_hist  = pred_hist;
      obs_taken = pred_taken;
      chk(obs_y == pend_y, $sformatf("y %0d expected %0d", obs_y, pend_y));
      chk(obs_hist == pend_hist, "history used by the prediction");
      chk(obs_taken == (pend_y >= 0), "prediction direction");
    end
  endtask

  // ------------------------------------------------------------ pipelined queue
  typedef struct {
    logic [31:0]         pc;
    bit                  t;
    int                  y;
    logic [HIST_LEN-1:0] h;
  } inflight_t;

  inflight_t q [$];

  initial begin
    logic [31:0] pc;
    bit          t;
    int          kind;
    bit          do_pred, do_upd;
    inflight_t   head, fresh;
    int          held;

    done = 0; checks = 0; failures = 0;
    pred_req = 0; pred_pc = '0; upd_valid = 0; upd_pc = '0; upd_taken = 0;
    upd_y = '0; upd_hist = '0;
    pend_pred = 0; pend_upd = 0; last_wr = 0;
    prog_pos = 0; loop_count = 0; last_rand = 0; last_rand2 = 0; pipelined = 0;
    n_clear = 0; n_ignored = 0; n_pred = 0; n_upd = 0; n_train = 0; n_keep = 0;
    n_mis = 0; n_sat = 0; n_byp_a = 0; n_byp_b = 0; n_overlap = 0;
    foreach (seen[k]) begin seen[k] = 0; wrong[k] = 0; end
    for (int r = 0; r < NUM_PERCEPTRONS; r++)
      for (int i = 0; i <= HIST_LEN; i++) wt[r][i] = 0;
    ghr_m = '0;

    // ---- clearing: requests are ignored and ready stays low for N cycles
    @(posedge rst_n);
    @(negedge clk);
    pred_req = 1; pred_pc = 32'h100; upd_valid = 1; upd_pc = 32'h100; upd_taken = 1;
    while (!ready) begin
      @(posedge clk);
      n_clear++;
      #1;
      if (pred_valid || train) n_ignored++;
    end
    chk(n_clear == NUM_PERCEPTRONS,
        $sformatf("clearing took %0d cycles, expected %0d", n_clear, NUM_PERCEPTRONS));
    chk(n_ignored == 0, "requests during clearing must be ignored");
    @(negedge clk);
    pred_req = 0; upd_valid = 0;

    // ---- phase 1: sequential, each prediction sees the complete history
    for (int b = 0; b < int'(SEQ_BRANCHES); b++) begin
      next_branch(pc, t, kind);
      step(1, pc, 0, '0, 0, 0, '0);
      if (b >= int'(SEQ_BRANCHES) / 2) begin
        seen[kind]++;
        if (obs_taken != t) wrong[kind]++;
      end
      step(0, '0, 1, pc, t, obs_y, obs_hist);
    end
    $display("phase 1 mispredictions in 2nd half: loop %0d/%0d rand %0d/%0d corr %0d/%0d bias %0d/%0d xor %0d/%0d",
             wrong[0], seen[0], wrong[1], seen[1], wrong[2], seen[2], wrong[3], seen[3],
             wrong[5], seen[5]);
    chk(wrong[3] * 50 <= seen[3], "always-taken branch must be predicted >= 98%");
    chk(wrong[2] * 10 <= seen[2], "correlated branch must be predicted >= 90%");
    chk(wrong[0] * 10 <= seen[0], "loop branch must be predicted >= 90%");
    chk(wrong[1] * 4 >= seen[1], "a random branch cannot be predicted");
    // a linear function can get at most 3 of the 4 XOR cases right
    chk(wrong[5] * 8 >= seen[5], "an XOR of two earlier outcomes is not linearly separable");

    // ---- phase 2: overlapped predictions and updates
    pipelined = 1;
    held = 0;
    for (int c = 0; c < int'(PIPE_CYCLES); c++) begin
      do_pred = ($urandom % 4) != 0 && q.size() < 4;
      do_upd  = q.size() > 0 && ($urandom % 3) != 0;
      if (do_upd) head = q.pop_front();
      if (do_pred) next_branch(pc, t, kind);
      step(do_pred, pc, do_upd, head.pc, head.t, head.y, head.h);
      if (do_pred) begin
        fresh.pc = pc; fresh.t = t; fresh.y = obs_y; fresh.h = obs_hist;
        q.push_back(fresh);
      end
    end
    while (q.size() > 0) begin
      head = q.pop_front();
      step(0, '0, 1, head.pc, head.t, head.y, head.h);
    end
    step(0, '0, 0, '0, 0, 0, '0);

    $display("mechanisms: clear=%0d pred=%0d upd=%0d train=%0d keep=%0d mispredict=%0d saturate=%0d bypassA=%0d bypassB=%0d overlap=%0d",
             n_clear, n_pred, n_upd, n_train, n_keep, n_mis, n_sat, n_byp_a, n_byp_b, n_overlap);
    chk(n_train > 0,   "no training happened");
    chk(n_keep > 0,    "no update skipped training");
    chk(n_mis > 0,     "no misprediction happened");
    chk(n_byp_a > 0,   "no prediction-port bypass happened");
    chk(n_byp_b > 0,   "no training-port bypass happened");
    chk(n_overlap > 0, "no overlapped prediction and update happened");
    if (REQUIRE_SAT) chk(n_sat > 0, "no weight saturated");
    done = 1;
  end

endmodule
