// Self-checking testbench for dual_addr_nvm.
//
// The expected contents are the 8x8 DCT-II basis matrix scaled by 256 and
// rounded, worked out separately and written here as hex words (byte n of
// word k = coefficient n of basis row k). The testbench reads every pair
// of addresses (a1, a2), including a1 = a2, and checks both outputs one clk
// edge after the addresses are applied.
module tb_dual_addr_nvm;
  logic        clk = 1'b0;
  logic [2:0]  a1, a2;
  logic [63:0] dout1, dout2;
  int checks = 0, failures = 0;

  localparam logic [63:0] EXP [8] = '{
    64'h5b5b5b5b5b5b5b5b, 64'h8296b9e719476a7e,
    64'h7631cf8a8acf3176, 64'h96197e47b982e76a,
    64'h5ba5a55b5ba5a55b, 64'hb97ee7966a198247,
    64'h318a76cfcf768a31, 64'he747967e826ab919
  };

  always #5 clk = ~clk;

  dual_addr_nvm dut (.*);

  initial begin
    a1 = 0; a2 = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        @(negedge clk);
        a1 = 3'(i); a2 = 3'(j);
        @(posedge clk);
        #1;
        checks += 2;
        if (dout1 !== EXP[i]) begin failures++; $display("FAIL dout1 a1=%0d %h", i, dout1); end
        if (dout2 !== EXP[j]) begin failures++; $display("FAIL dout2 a2=%0d %h", j, dout2); end
      end
    // outputs are registered: a change of address between edges is not seen
    @(negedge clk); a1 = 3'd1; a2 = 3'd2;
    @(posedge clk); #1;
    a1 = 3'd5; a2 = 3'd6; #2;
    checks++;
    if (dout1 !== EXP[1] || dout2 !== EXP[2]) begin failures++; $display("FAIL outputs not registered"); end
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
