// index_hash -- selects the perceptron that predicts a branch.
//
// The branch address is hashed to a row of the weight table: the low PC_SHIFT
// bits (always zero for aligned instructions) are dropped and the rest is taken
// modulo the number of perceptrons, so every row is reachable even when the
// number of perceptrons a budget affords is not a power of two.
// Purely combinational: idx_o follows pc_i in the same cycle.
//
// That the address is hashed to pick a perceptron follows the method; the hash
// itself (drop alignment bits, then modulo) is this design's choice.
module index_hash #(
  parameter int unsigned PC_W        = 32,
  parameter int unsigned PC_SHIFT    = 2,
  parameter int unsigned NUM_ENTRIES = 1849,
  parameter int unsigned IDX_W       = (NUM_ENTRIES > 1) ? $clog2(NUM_ENTRIES) : 1
) (
  input  logic [PC_W-1:0]  pc_i,
  output logic [IDX_W-1:0] idx_o
);

  localparam int unsigned ADDR_W = PC_W - PC_SHIFT;

  logic [ADDR_W-1:0] addr;

  // The dropped alignment bits pc_i[PC_SHIFT-1:0] are deliberately unused.
  always_comb begin
    addr  = pc_i[PC_W-1:PC_SHIFT];
    idx_o = IDX_W'(addr % ADDR_W'(NUM_ENTRIES));
  end

endmodule
