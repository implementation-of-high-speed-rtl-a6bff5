// Self-checking testbench for dual_port_vm.
//
// pci_clk (period 6) and clk (period 10) are unrelated. The testbench streams four
// random 8x8 blocks through the ping-pong buffer: block b is written into
// one bank (eight rows, one row per pci_clk cycle, with some idle cycles
// where din_valid is low and some rows written in two halves through the
// byte enables) while, at the same time, block b-1 is read column by column
// from the other bank and compared with the transpose of the testbench's
// own copy. rnw toggles between blocks. Checked: the written bank never
// disturbs the read bank, the one-cycle read latency, and that a block of
// 64 pixels enters in 8 write cycles (64 bits per pci_clk cycle).
module tb_dual_port_vm;
  localparam int unsigned ROWS = 8;

  logic        clk = 1'b0, pci_clk = 1'b0;
  logic [63:0] di;
  logic        din_valid;
  logic [7:0]  be;
  logic [2:0]  wa, ra;
  logic        rnw;
  logic [63:0] d0;

  logic [7:0] blk [4][ROWS][ROWS];  // blk[b][row][col]
  int checks = 0, failures = 0;
  int wcycles;

  always #3 pci_clk = ~pci_clk;
  always #5 clk     = ~clk;

  dual_port_vm dut (.*);

  function automatic logic [63:0] row_of(int b, int r);
    logic [63:0] w;
    for (int c = 0; c < ROWS; c++) w[c*8 +: 8] = blk[b][r][c];
    return w;
  endfunction

  // Write block b into the bank selected by the current rnw.
  task automatic write_block(int b, bit split);
    wcycles = 0;
    for (int r = 0; r < ROWS; r++) begin
      if (split && r == 3) begin
        // two half-row writes through the byte enables, junk in the other half
        @(negedge pci_clk);
        din_valid = 1; wa = 3'(r); be = 8'h0F;
        di = {32'hDEAD_BEEF, row_of(b, r)[31:0]};
        @(negedge pci_clk);
        be = 8'hF0; di = {row_of(b, r)[63:32], 32'hCAFE_F00D};
        @(negedge pci_clk);
        din_valid = 0;
      end else begin
        @(negedge pci_clk);
        din_valid = 1; wa = 3'(r); be = 8'hFF; di = row_of(b, r);
        wcycles++;
        @(negedge pci_clk);
        din_valid = 0; di = ~di;
        // an idle bus cycle in the middle of the block
        if (r == 5) @(negedge pci_clk);
      end
    end
  endtask

  // Read block b column-wise from the bank not being written.
  task automatic read_block(int b);
    logic [63:0] exp;
    for (int col = 0; col < ROWS; col++) begin
      @(negedge clk);
      ra = 3'(col);
      @(posedge clk);
      #1;
      for (int r = 0; r < ROWS; r++) exp[r*8 +: 8] = blk[b][r][col];
      checks++;
      if (d0 !== exp) begin
        failures++;
        $display("FAIL block %0d column %0d: got %h expected %h", b, col, d0, exp);
      end
    end
  endtask

  initial begin
    for (int b = 0; b < 4; b++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < ROWS; c++)
          blk[b][r][c] = 8'($urandom);
    din_valid = 0; be = 0; wa = 0; ra = 0; di = 0; rnw = 1;
    // block 0 into VM1, nothing to read yet
    write_block(0, 0);
    checks++;
    if (wcycles != ROWS) begin failures++; $display("FAIL write cycles %0d", wcycles); end
    for (int b = 1; b < 4; b++) begin
      @(negedge clk); @(negedge pci_clk);
      rnw = ~rnw;                    // swap banks between blocks
      fork
        write_block(b, b == 2);
        read_block(b - 1);
      join
    end
    @(negedge clk); @(negedge pci_clk);
    rnw = ~rnw;
    read_block(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
