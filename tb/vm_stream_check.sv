// Stimulus and checker for one dual_port_vm of a given block size, used by
// the workload testbench.
//
// Instantiates a dual_port_vm with ADDR_W (an N x N block, N = 2^ADDR_W,
// 8-bit pixels, N*8-bit bus), streams NBLK random blocks through its
// ping-pong banks with their own clocks (pci_clk period 6, clk period 10),
// writing block b (one row per pci_clk cycle) while reading block b-1 column
// by column, and compares every column with the transpose of its own copy.
// It also counts the write cycles per block, which must equal N (one row of
// N pixels per cycle). When all blocks are read it raises done; checks and
// failures hold the totals.
module vm_stream_check #(
  parameter int unsigned ADDR_W = 3,
  parameter int unsigned NBLK   = 2
) (
  output int checks,
  output int failures,
  output bit done
);
  localparam int unsigned N = 1 << ADDR_W;
  localparam int unsigned W = 8 * N;

  logic              clk = 1'b0, pci_clk = 1'b0;
  logic [W-1:0]      di, d0;
  logic              din_valid, rnw;
  logic [N-1:0]      be;
  logic [ADDR_W-1:0] wa, ra;

  logic [7:0] blk [NBLK][N][N];

  always #3 pci_clk = ~pci_clk;
  always #5 clk     = ~clk;

  dual_port_vm #(.ADDR_W(ADDR_W)) dut (.*);

  task automatic note(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL N=%0d %s", N, what);
    end
  endtask

  task automatic write_block(int b);
    int cycles = 0;
    for (int r = 0; r < N; r++) begin
      @(negedge pci_clk);
      din_valid = 1; wa = ADDR_W'(r); be = '1;
      for (int c = 0; c < N; c++) di[c*8 +: 8] = blk[b][r][c];
      cycles++;
    end
    @(negedge pci_clk);
    din_valid = 0;
    note(cycles == N, $sformatf("block %0d took %0d write cycles", b, cycles));
  endtask

  task automatic read_block(int b);
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      ra = ADDR_W'(c);
      @(posedge clk);
      #1;
      for (int r = 0; r < N; r++)
        note(d0[r*8 +: 8] == blk[b][r][c], $sformatf("block %0d row %0d col %0d", b, r, c));
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          blk[b][r][c] = 8'($urandom);
    din_valid = 0; be = '0; wa = '0; ra = '0; di = '0; rnw = 1;
    write_block(0);
    for (int b = 1; b <= NBLK; b++) begin
      @(negedge clk); @(negedge pci_clk);
      rnw = ~rnw;
      fork
        if (b < int'(NBLK)) write_block(b);
        read_block(b - 1);
      join
    end
    done = 1;
  end
endmodule
