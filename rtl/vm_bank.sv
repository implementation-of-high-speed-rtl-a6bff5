// vm_bank: one pixel-block buffer (VM1 or VM2 of the double buffer).
//
// Holds one square block of ROWS x ROWS pixels (8x8 of 8-bit pixels at the
// defaults). It is written a row at a time and read a column at a time, so a
// block written in raster order comes out transposed, which is the order the
// column pass of a 2-D DCT needs.
//
// Write port (wclk domain): on a rising edge of wclk with we high, every byte
//   c of wdata whose enable be[c] is set is stored at row wa, column c. Bytes
//   with be[c] low keep their old value.
// Read port (rclk domain): on a rising edge of rclk, rdata is loaded with
//   column ra: byte r of rdata is the pixel at row r, column ra. One cycle of
//   latency; rdata holds its value between edges.
//
// The two ports have independent clocks. A read of a location written in the
// same period of the other clock returns either value; the surrounding
// double-buffer control never lets that happen because one bank is only
// written while the other is read.
//
// The row-write / column-read behaviour, the byte enables and the two clocks
// follow the source; the storage as a flip-flop array (every row must be read
// at once for a column), the read latency and the lack of reset are this
// design's choices. The contents after power-up are undefined.
module vm_bank #(
  parameter int unsigned ADDR_W = 3,                 // log2(rows) = log2(columns)
  parameter int unsigned PIX_W  = 8,                 // bits per pixel
  localparam int unsigned ROWS  = 1 << ADDR_W,
  localparam int unsigned ROW_W = PIX_W * ROWS
) (
  input  logic              wclk,
  input  logic              we,
  input  logic [ROWS-1:0]   be,
  input  logic [ADDR_W-1:0] wa,
  input  logic [ROW_W-1:0]  wdata,
  input  logic              rclk,
  input  logic [ADDR_W-1:0] ra,
  output logic [ROW_W-1:0]  rdata
);

  logic [PIX_W-1:0] mem [ROWS][ROWS];   // mem[row][column]

  always_ff @(posedge wclk) begin
    if (we) begin
      for (int c = 0; c < ROWS; c++) begin
        if (be[c]) mem[wa][c] <= wdata[c*PIX_W +: PIX_W];
      end
    end
  end

  always_ff @(posedge rclk) begin
    for (int r = 0; r < ROWS; r++) begin
      rdata[r*PIX_W +: PIX_W] <= mem[r][ra];
    end
  end

endmodule
