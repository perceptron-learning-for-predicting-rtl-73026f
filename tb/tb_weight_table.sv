// tb_weight_table -- checks the perceptron weight table.
//
// A small table (7 rows of 3 weights) is checked against an array model:
// clearing after reset takes exactly NUM_ENTRIES cycles and leaves zeros,
// reads return their row one cycle later, writes land the cycle after, and a
// read of the row being written in the same cycle returns the new row (bypass)
// on either port. Random reads and writes on all three ports follow.
module tb_weight_table;
  localparam int unsigned N  = 7;
  localparam int unsigned NW = 3;
  localparam int unsigned W  = 9;
  localparam int unsigned IW = $clog2(N);

  typedef logic [NW-1:0][W-1:0] row_t;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           busy;
  logic           a_en = 1'b0, b_en = 1'b0, we = 1'b0;
  logic [IW-1:0]  a_idx = '0, b_idx = '0, w_idx = '0;
  row_t           a_data, b_data, w_data = '0;
  logic           a_byp, b_byp;

  row_t model [N];
  row_t exp_a, exp_b;
  logic exp_a_byp, exp_b_byp;

  int checks = 0;
  int failures = 0;
  int bypasses = 0;

  weight_table #(.NUM_ENTRIES(N), .NUM_WEIGHTS(NW), .WEIGHT_W(W)) dut (
    .clk(clk), .rst_n(rst_n), .init_busy_o(busy),
    .rd_a_en_i(a_en), .rd_a_idx_i(a_idx), .rd_a_data_o(a_data), .rd_a_byp_o(a_byp),
    .rd_b_en_i(b_en), .rd_b_idx_i(b_idx), .rd_b_data_o(b_data), .rd_b_byp_o(b_byp),
    .wr_en_i(we), .wr_idx_i(w_idx), .wr_data_i(w_data));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [NW*W-1:0] got, input logic [NW*W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // one cycle with the given port activity; checks the read results after it
  task automatic cycle(input logic ae, input int ai, input logic be, input int bi,
                       input logic e, input int wi, input row_t wd);
    @(negedge clk);
    a_en = ae; a_idx = IW'(ai); b_en = be; b_idx = IW'(bi);
    we = e; w_idx = IW'(wi); w_data = wd;
    exp_a_byp = e && ae && (wi == ai);
    exp_b_byp = e && be && (wi == bi);
    if (ae) exp_a = exp_a_byp ? wd : model[ai];
    if (be) exp_b = exp_b_byp ? wd : model[bi];
    @(posedge clk);
    if (e) model[wi] = wd;
    #1;
    if (ae) chk($sformatf("port A row %0d", ai), a_data, exp_a);
    if (be) chk($sformatf("port B row %0d", bi), b_data, exp_b);
    chk("port A bypass flag", a_byp, exp_a_byp);
    chk("port B bypass flag", b_byp, exp_b_byp);
    if (exp_a_byp || exp_b_byp) bypasses++;
  endtask

  int busy_cycles;

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    busy_cycles = 0;
    while (busy) begin
      @(posedge clk);
      busy_cycles++;
      #1;
    end
    checks++;
    if (busy_cycles != N) begin
      failures++;
      $display("FAIL clearing took %0d cycles, expected %0d", busy_cycles, N);
    end
    // every row reads back as zero after clearing
    for (int i = 0; i < N; i++) cycle(1, i, 1, N - 1 - i, 0, 0, '0);
    // write then read back
    for (int i = 0; i < N; i++) cycle(0, 0, 0, 0, 1, i, row_t'({$urandom, $urandom}));
    for (int i = 0; i < N; i++) cycle(1, i, 1, i, 0, 0, '0);
    // same-cycle read and write of one row, on each port and both
    cycle(1, 3, 0, 0, 1, 3, row_t'({$urandom, $urandom}));
    cycle(0, 0, 1, 4, 1, 4, row_t'({$urandom, $urandom}));
    cycle(1, 5, 1, 5, 1, 5, row_t'({$urandom, $urandom}));
    cycle(1, 5, 1, 2, 0, 0, '0);
    // random traffic
    for (int n = 0; n < 3000; n++)
      cycle($urandom[0], $urandom % N, $urandom[0], $urandom % N,
            $urandom[0], $urandom % N, row_t'({$urandom, $urandom}));
    checks++;
    if (bypasses < 10) begin
      failures++;
      $display("FAIL only %0d bypasses exercised", bypasses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
