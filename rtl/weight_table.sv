// weight_table -- the table of perceptrons: one weight vector per row.
//
// Each row holds NUM_WEIGHTS signed weights of WEIGHT_W bits (weight 0 is the
// bias weight, weight i the weight of history bit i-1). The table has two
// synchronous read ports, A for predictions and B for training, and one write
// port for trained weights, so a prediction and a training step can be in
// flight in the same cycle.
//
// Timing: a read issued in cycle t (rd_*_en_i, rd_*_idx_i) returns its row on
// rd_*_data_o in cycle t+1; the data stays until the next read on that port.
// A write in cycle t is in the array from cycle t+1. When a read and a write hit
// the same row in the same cycle, the read returns the row being written
// (write-first bypass) and rd_*_byp_o is high with the data, so back-to-back
// trainings of one perceptron never work on stale weights.
//
// After reset the table clears itself, one row per cycle, to all-zero weights;
// init_busy_o is high meanwhile (NUM_ENTRIES cycles) and reads and writes are
// ignored. The table itself follows the method (a table of neurons kept in
// SRAM); the port structure, bypass and clearing are this design's choices.
module weight_table #(
  parameter int unsigned NUM_ENTRIES = 1849,
  parameter int unsigned NUM_WEIGHTS = 63,
  parameter int unsigned WEIGHT_W    = 9,
  parameter int unsigned IDX_W       = (NUM_ENTRIES > 1) ? $clog2(NUM_ENTRIES) : 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  output logic                                  init_busy_o,
  // read port A (prediction)
  input  logic                                  rd_a_en_i,
  input  logic [IDX_W-1:0]                      rd_a_idx_i,
  output logic [NUM_WEIGHTS-1:0][WEIGHT_W-1:0]  rd_a_data_o,
  output logic                                  rd_a_byp_o,
  // read port B (training)
  input  logic                                  rd_b_en_i,
  input  logic [IDX_W-1:0]                      rd_b_idx_i,
  output logic [NUM_WEIGHTS-1:0][WEIGHT_W-1:0]  rd_b_data_o,
  output logic                                  rd_b_byp_o,
  // write port
  input  logic                                  wr_en_i,
  input  logic [IDX_W-1:0]                      wr_idx_i,
  input  logic [NUM_WEIGHTS-1:0][WEIGHT_W-1:0]  wr_data_i
);

  typedef logic [NUM_WEIGHTS-1:0][WEIGHT_W-1:0] row_t;

  row_t mem [NUM_ENTRIES];

  // Clearing sequencer.
  logic [IDX_W-1:0] init_idx;
  logic             init_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_idx  <= '0;
    end else if (init_busy) begin
      if (init_idx == IDX_W'(NUM_ENTRIES - 1)) init_busy <= 1'b0;
      init_idx <= init_idx + 1'b1;
    end
  end

  assign init_busy_o = init_busy;

  // The one write port of the array, shared by clearing and training.
  logic             mem_we;
  logic [IDX_W-1:0] mem_widx;
  row_t             mem_wdata;

  always_comb begin
    if (init_busy) begin
      mem_we    = 1'b1;
      mem_widx  = init_idx;
      mem_wdata = '0;
    end else begin
      mem_we    = wr_en_i;
      mem_widx  = wr_idx_i;
      mem_wdata = wr_data_i;
    end
  end

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_widx] <= mem_wdata;
  end

  // Read ports with write-first bypass.
  logic hit_a, hit_b;
  assign hit_a = !init_busy && wr_en_i && rd_a_en_i && (wr_idx_i == rd_a_idx_i);
  assign hit_b = !init_busy && wr_en_i && rd_b_en_i && (wr_idx_i == rd_b_idx_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_a_data_o <= '0;
      rd_a_byp_o  <= 1'b0;
    end else begin
      rd_a_byp_o <= hit_a;
      if (!init_busy && rd_a_en_i) rd_a_data_o <= hit_a ? wr_data_i : mem[rd_a_idx_i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_b_data_o <= '0;
      rd_b_byp_o  <= 1'b0;
    end else begin
      rd_b_byp_o <= hit_b;
      if (!init_busy && rd_b_en_i) rd_b_data_o <= hit_b ? wr_data_i : mem[rd_b_idx_i];
    end
  end

endmodule
