// tb_index_hash -- checks the address hash against (pc / 4) mod N.
//
// Runs at the default 1849 perceptrons (not a power of two) on random and edge
// addresses, and checks that every index stays in range.
module tb_index_hash;
  localparam int unsigned N = 1849;

  logic [31:0] pc;
  logic [10:0] idx;

  int checks = 0;
  int failures = 0;

  index_hash #(.PC_W(32), .PC_SHIFT(2), .NUM_ENTRIES(N)) dut (.pc_i(pc), .idx_o(idx));

  task automatic try(input logic [31:0] p);
    longint unsigned exp;
    pc = p;
    #1;
    exp = (longint'(p) / 4) % N;
    checks++;
    if (idx != exp || idx >= N) begin
      failures++;
      $display("FAIL pc %h: idx %0d expected %0d", p, idx, exp);
    end
  endtask

  initial begin
    try(32'h0); try(32'h4); try(32'h3); try(32'hFFFF_FFFF);
    try(32'(N * 4)); try(32'(N * 4 - 4)); try(32'(N * 4 + 4));
    for (int n = 0; n < 2000; n++) try($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
