// tb_history_register -- checks the global history shift register.
//
// Random outcomes are shifted in (with random idle cycles) and the register is
// compared every cycle with a model that keeps the last HIST_LEN outcomes,
// newest in bit 0. Also checks that reset clears it.
module tb_history_register;
  localparam int unsigned HIST_LEN = 62;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                shift = 1'b0;
  logic                taken = 1'b0;
  logic [HIST_LEN-1:0] hist;
  logic [HIST_LEN-1:0] model;

  int checks = 0;
  int failures = 0;

  history_register #(.HIST_LEN(HIST_LEN)) dut (
    .clk(clk), .rst_n(rst_n), .shift_i(shift), .taken_i(taken), .hist_o(hist));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (hist !== '0) begin failures++; $display("FAIL reset value %h", hist); end
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      shift = ($urandom % 4) != 0;
      taken = $urandom[0];
      @(posedge clk);
      if (shift) model = {model[HIST_LEN-2:0], taken};
      #1;
      checks++;
      if (hist !== model) begin
        failures++;
        $display("FAIL step %0d: hist %h model %h", n, hist, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
