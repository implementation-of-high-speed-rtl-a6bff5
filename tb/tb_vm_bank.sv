// Self-checking testbench for vm_bank.
//
// Write and read ports run on unrelated clocks (periods of 8 and 10 time units). The
// testbench keeps its own 8x8 byte model, fills the bank row by row with
// random rows, then overwrites random bytes through random byte enables and
// issues cycles with we low, and after each phase reads every column and
// compares rdata with the transposed model. Each read is checked exactly
// one rclk edge after ra is applied (one cycle of latency).
module tb_vm_bank;
  localparam int unsigned ADDR_W = 3;
  localparam int unsigned PIX_W  = 8;
  localparam int unsigned ROWS   = 1 << ADDR_W;
  localparam int unsigned ROW_W  = PIX_W * ROWS;

  logic              wclk = 1'b0, rclk = 1'b0;
  logic              we;
  logic [ROWS-1:0]   be;
  logic [ADDR_W-1:0] wa, ra;
  logic [ROW_W-1:0]  wdata, rdata;

  logic [PIX_W-1:0]  model [ROWS][ROWS];
  int checks = 0, failures = 0;

  always #4   wclk = ~wclk;
  always #5   rclk = ~rclk;

  vm_bank dut (.*);

  task automatic write_row(input logic [ADDR_W-1:0] row, input logic [ROW_W-1:0] data,
                           input logic [ROWS-1:0] en, input logic valid);
    @(negedge wclk);
    we = valid; wa = row; wdata = data; be = en;
    @(negedge wclk);
    we = 1'b0;
    if (valid)
      for (int c = 0; c < ROWS; c++)
        if (en[c]) model[row][c] = data[c*PIX_W +: PIX_W];
  endtask

  task automatic read_all_columns();
    logic [ROW_W-1:0] exp;
    for (int col = 0; col < ROWS; col++) begin
      @(negedge rclk);
      ra = ADDR_W'(col);
      @(posedge rclk);
      #1;
      for (int r = 0; r < ROWS; r++) exp[r*PIX_W +: PIX_W] = model[r][col];
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL column %0d: got %h expected %h", col, rdata, exp);
      end
    end
  endtask

  initial begin
    we = 0; be = '0; wa = '0; ra = '0; wdata = '0;
    // full block, all bytes enabled
    for (int r = 0; r < ROWS; r++)
      write_row(ADDR_W'(r), {$urandom, $urandom}, '1, 1'b1);
    read_all_columns();
    // partial writes through byte enables
    for (int i = 0; i < 24; i++)
      write_row(ADDR_W'($urandom), {$urandom, $urandom}, ROWS'($urandom), 1'b1);
    read_all_columns();
    // we low: nothing may change
    for (int i = 0; i < 8; i++)
      write_row(ADDR_W'($urandom), {$urandom, $urandom}, '1, 1'b0);
    read_all_columns();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge rclk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
