// Workload testbench for the pixel-block double buffer.
//
// Runs three block workloads through dual_port_vm, each with its own
// instance and clocks:
//   * monochrome 8x8 blocks (default size, 1 byte per pixel), four blocks;
//   * one colour 8x8 block of 3 bytes per pixel, sent as its three one-byte
//     component planes, one after the other, through the default-size buffer;
//   * 256-pixel blocks (16x16, ADDR_W = 4, 128-bit bus), three blocks.
// Every pixel read back is checked against the written block, transposed,
// and every block must be written in N cycles for an N x N block.
module tb_vm_workloads;
  int  c_mono, f_mono, c_col, f_col, c_256, f_256;
  bit  d_mono, d_col, d_256;
  int  checks, failures;

  vm_stream_check #(.ADDR_W(3), .NBLK(4)) u_mono   (.checks(c_mono), .failures(f_mono), .done(d_mono));
  vm_stream_check #(.ADDR_W(3), .NBLK(3)) u_colour (.checks(c_col),  .failures(f_col),  .done(d_col));
  vm_stream_check #(.ADDR_W(4), .NBLK(3)) u_256    (.checks(c_256),  .failures(f_256),  .done(d_256));

  initial begin
    wait (d_mono && d_col && d_256);
    checks   = c_mono + c_col + c_256;
    failures = f_mono + f_col + f_256;
    $display("mono8x8: %0d checks, colour8x8: %0d checks, 16x16: %0d checks", c_mono, c_col, c_256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", c_mono + c_col + c_256, f_mono + f_col + f_256 + 1);
    $finish;
  end
endmodule
