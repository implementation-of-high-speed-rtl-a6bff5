// End-to-end testbench for video_mem_top at its default sizes.
//
// The testbench plays both neighbours of the memories. As the host it
// streams NBLK random 8x8 monochrome blocks into the ping-pong buffer over
// the 64-bit bus on pci_clk, one row per cycle, with idle cycles and
// byte-enabled half-row writes mixed in, toggling rnw after each block. As
// the DCT/quantization stage it reads, while the next block is being
// written, each column of the previous block (ra), two DCT basis rows per
// cycle (a1, a2) and the reciprocal quantizer of the matching coefficient
// (qa), all on clk. From those outputs it computes the column DCT
// coefficients Y[k][c] = sum_r C[k][r] * X[r][c] and the quantized values
// (Y * R) >>> 10, and compares them, together with the raw outputs, with
// values computed from its own copy of the pixels, its own DCT table and
// its own quantizer matrix.
//
// Mechanisms counted, each of which must occur at least once: bank swaps,
// reads overlapping writes, byte-enabled partial writes, idle bus cycles,
// dual-address reads with two different addresses, and quantizer reads.
module tb_video_mem_top;
  localparam int NBLK = 6;

  logic        clk = 1'b0, pci_clk = 1'b0;
  logic [63:0] di;
  logic        din_valid;
  logic [7:0]  be;
  logic [2:0]  wa, ra, a1, a2;
  logic        rnw;
  logic [63:0] d0, dout1, dout2;
  logic [5:0]  qa;
  logic [7:0]  qd;

  localparam logic [63:0] DCT [8] = '{
    64'h5b5b5b5b5b5b5b5b, 64'h8296b9e719476a7e,
    64'h7631cf8a8acf3176, 64'h96197e47b982e76a,
    64'h5ba5a55b5ba5a55b, 64'hb97ee7966a198247,
    64'h318a76cfcf768a31, 64'he747967e826ab919
  };
  localparam int Q [64] = '{
     8, 16, 19, 22, 26, 27, 29, 34,   16, 16, 22, 24, 27, 29, 34, 37,
    19, 22, 26, 27, 29, 34, 34, 38,   22, 22, 26, 27, 29, 34, 37, 40,
    22, 26, 27, 29, 32, 35, 40, 48,   26, 27, 29, 32, 35, 40, 48, 58,
    26, 27, 29, 34, 38, 46, 56, 69,   27, 29, 35, 38, 46, 56, 69, 83
  };

  logic [7:0] blk [NBLK][8][8];   // blk[b][row][col]
  int checks = 0, failures = 0;
  int n_swap = 0, n_overlap = 0, n_partial = 0, n_idle = 0, n_dual = 0, n_quant = 0;
  bit writing = 0;

  always #3 pci_clk = ~pci_clk;
  always #5 clk     = ~clk;

  video_mem_top dut (.*);

  function automatic int coef(int k, int n);
    return int'($signed(DCT[k][n*8 +: 8]));
  endfunction

  function automatic logic [63:0] row_of(int b, int r);
    logic [63:0] w;
    for (int c = 0; c < 8; c++) w[c*8 +: 8] = blk[b][r][c];
    return w;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic write_block(int b);
    writing = 1;
    for (int r = 0; r < 8; r++) begin
      @(negedge pci_clk);
      if (r == 2 + b % 4) begin
        // half rows through the byte enables, junk in the disabled half
        din_valid = 1; wa = 3'(r); be = 8'h0F; di = {32'hFFFF_FFFF, row_of(b, r)[31:0]};
        @(negedge pci_clk);
        be = 8'hF0; di = {row_of(b, r)[63:32], 32'h0};
        n_partial++;
      end else begin
        din_valid = 1; wa = 3'(r); be = 8'hFF; di = row_of(b, r);
      end
      @(negedge pci_clk);
      din_valid = 0; di = ~di; be = 8'($urandom);
      if (r % 3 == 1) begin
        n_idle++;
        @(negedge pci_clk);
      end
    end
    writing = 0;
  endtask

  // Column DCT and quantization of block b from the bank being read.
  task automatic process_block(int b);
    for (int c = 0; c < 8; c++) begin
      for (int k = 0; k < 8; k += 2) begin
        int y1, y2, x, q1;
        int ka, kb;
        ka = k; kb = (b % 2 != 0) ? k + 1 : 7 - k;   // vary the address pairs
        @(negedge clk);
        ra = 3'(c); a1 = 3'(ka); a2 = 3'(kb); qa = 6'(ka * 8 + c);
        if (writing) n_overlap++;
        if (ka != kb) n_dual++;
        @(posedge clk);
        #1;
        // raw outputs
        for (int r = 0; r < 8; r++)
          check(d0[r*8 +: 8] == blk[b][r][c], $sformatf("d0 blk %0d col %0d row %0d", b, c, r));
        check(dout1 == DCT[ka], $sformatf("dout1 a1=%0d", ka));
        check(dout2 == DCT[kb], $sformatf("dout2 a2=%0d", kb));
        check(int'(qd) == (2048 + Q[ka*8+c]) / (2 * Q[ka*8+c]), $sformatf("qd qa=%0d", ka*8+c));
        n_quant++;
        // column DCT from the memory outputs against the reference
        y1 = 0; y2 = 0;
        for (int r = 0; r < 8; r++) begin
          x  = int'(d0[r*8 +: 8]);
          y1 += int'($signed(dout1[r*8 +: 8])) * x;
          y2 += int'($signed(dout2[r*8 +: 8])) * x;
        end
        begin
          int ref1 = 0, ref2 = 0;
          for (int r = 0; r < 8; r++) begin
            ref1 += coef(ka, r) * int'(blk[b][r][c]);
            ref2 += coef(kb, r) * int'(blk[b][r][c]);
          end
          check(y1 == ref1 && y2 == ref2, $sformatf("DCT blk %0d col %0d k=%0d/%0d", b, c, ka, kb));
          q1 = (y1 * int'(qd)) >>> 10;
          check(q1 == ((ref1 * ((2048 + Q[ka*8+c]) / (2 * Q[ka*8+c]))) >>> 10),
                $sformatf("quant blk %0d col %0d k=%0d", b, c, ka));
        end
      end
    end
  endtask

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          blk[b][r][c] = 8'($urandom);
    din_valid = 0; be = 0; wa = 0; ra = 0; di = 0; a1 = 0; a2 = 0; qa = 0; rnw = 1;
    write_block(0);
    for (int b = 1; b <= NBLK; b++) begin
      @(negedge clk); @(negedge pci_clk);
      rnw = ~rnw;
      n_swap++;
      fork
        if (b < NBLK) write_block(b);
        process_block(b - 1);
      join
    end
    check(n_swap     > 0, "no bank swap");
    check(n_overlap  > 0, "no read overlapping a write");
    check(n_partial  > 0, "no byte-enabled partial write");
    check(n_idle     > 0, "no idle bus cycle");
    check(n_dual     > 0, "no dual-address read with distinct addresses");
    check(n_quant    > 0, "no quantizer read");
    $display("swaps=%0d overlapped_reads=%0d partial_writes=%0d idle_cycles=%0d dual_reads=%0d quant_reads=%0d",
             n_swap, n_overlap, n_partial, n_idle, n_dual, n_quant);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
