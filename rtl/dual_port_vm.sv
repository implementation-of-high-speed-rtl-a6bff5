// dual_port_vm: double-buffered pixel-block RAM between a host bus and a
// DCT/quantization stage.
//
// Two banks (VM1, VM2, each a vm_bank of 8x8 pixels) form a ping-pong
// buffer. While the host fills one bank row by row over the 64-bit bus in
// the pci_clk domain, the DCT side reads the other bank column by column in
// the clk domain, so writing the next block and processing the current one
// overlap.
//
// rnw picks the roles: rnw = 1 writes VM1 and reads VM2, rnw = 0 writes VM2
// and reads VM1. The system toggles rnw once a bank has been filled, so the
// block just written becomes the one read.
//
// Write (pci_clk rising edge): when din_valid is high, the bytes of di whose
//   be bit is set go to row wa of the bank being written.
// Read (clk rising edge): d0 is loaded with column ra of the bank being read,
//   byte r = row r. One clk cycle of latency.
//
// rnw is used directly in both clock domains without synchronisers: it must
// only change while neither side is accessing the banks (between blocks);
// an assertion flags a change between two back-to-back writes.
// The port list (clk, pci_clk, di, din_valid, be, wa, rnw, ra, d0), the
// 64-bit bus, 8 byte enables and 3-bit addresses follow the source's pin
// diagram; the rnw polarity mapping to VM1/VM2 and the read latency are this
// design's choices.
module dual_port_vm #(
  parameter int unsigned ADDR_W = 3,
  parameter int unsigned PIX_W  = 8,
  localparam int unsigned ROWS  = 1 << ADDR_W,
  localparam int unsigned ROW_W = PIX_W * ROWS
) (
  input  logic              clk,        // read (DCT) clock
  input  logic              pci_clk,    // write (host bus) clock
  input  logic [ROW_W-1:0]  di,
  input  logic              din_valid,
  input  logic [ROWS-1:0]   be,
  input  logic [ADDR_W-1:0] wa,
  input  logic              rnw,        // 1: write VM1 / read VM2, 0: the reverse
  input  logic [ADDR_W-1:0] ra,
  output logic [ROW_W-1:0]  d0
);

  logic [ROW_W-1:0] vm1_q, vm2_q;
  logic             rd_vm2;             // bank whose column is in d0

  vm_bank #(.ADDR_W(ADDR_W), .PIX_W(PIX_W)) u_vm1 (
    .wclk (pci_clk), .we (din_valid &  rnw), .be, .wa, .wdata (di),
    .rclk (clk),     .ra, .rdata (vm1_q)
  );

  vm_bank #(.ADDR_W(ADDR_W), .PIX_W(PIX_W)) u_vm2 (
    .wclk (pci_clk), .we (din_valid & ~rnw), .be, .wa, .wdata (di),
    .rclk (clk),     .ra, .rdata (vm2_q)
  );

  // Both banks present a column on every clk edge; remember which one was
  // the read bank at that edge.
  always_ff @(posedge clk) rd_vm2 <= rnw;

  assign d0 = rd_vm2 ? vm2_q : vm1_q;

  // Banks swap only between blocks: rnw may not change between two
  // back-to-back writes.
  a_rnw_stable_in_burst: assert property (
    @(posedge pci_clk) din_valid && $past(din_valid) |-> $stable(rnw)
  ) else $error("rnw changed during a write burst");

endmodule
