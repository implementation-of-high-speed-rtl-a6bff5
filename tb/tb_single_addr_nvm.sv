// Self-checking testbench for single_addr_nvm.
//
// The expected byte at address i is round(1024 / Q[i]) with Q the MPEG
// default intra quantizer matrix, which the testbench holds and divides on
// its own; a few entries are also checked against hand-worked constants
// (Q = 8 -> 128, Q = 16 -> 64, Q = 83 -> 12). All 64 addresses are read in
// a random order, each checked one clk edge after the address is applied.
module tb_single_addr_nvm;
  logic       clk = 1'b0;
  logic [5:0] a;
  logic [7:0] d;
  int checks = 0, failures = 0;

  localparam int Q [64] = '{
     8, 16, 19, 22, 26, 27, 29, 34,   16, 16, 22, 24, 27, 29, 34, 37,
    19, 22, 26, 27, 29, 34, 34, 38,   22, 22, 26, 27, 29, 34, 37, 40,
    22, 26, 27, 29, 32, 35, 40, 48,   26, 27, 29, 32, 35, 40, 48, 58,
    26, 27, 29, 34, 38, 46, 56, 69,   27, 29, 35, 38, 46, 56, 69, 83
  };

  always #5 clk = ~clk;

  single_addr_nvm dut (.*);

  task automatic read_check(int i, int exp);
    @(negedge clk);
    a = 6'(i);
    @(posedge clk);
    #1;
    checks++;
    if (int'(d) != exp) begin
      failures++;
      $display("FAIL a=%0d got %0d expected %0d", i, d, exp);
    end
  endtask

  initial begin : stimulus
    automatic int order [64];
    a = 0;
    for (int i = 0; i < 64; i++) order[i] = i;
    for (int i = 63; i > 0; i--) begin
      automatic int j = int'($urandom_range(i, 0));
      automatic int t = order[i]; order[i] = order[j]; order[j] = t;
    end
    for (int k = 0; k < 64; k++) begin
      automatic int i = order[k];
      // round(1024 / Q) = floor((2048 + Q) / (2Q))
      read_check(i, (2048 + Q[i]) / (2 * Q[i]));
    end
    read_check(0, 128);
    read_check(1, 64);
    read_check(63, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
