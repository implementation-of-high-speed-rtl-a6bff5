// video_mem_top: the memory structures of the DCT/quantization front end.
//
// Three independent memories stand side by side, each with its own ports:
//   * dual_port_vm    - double-buffered 8x8 pixel-block RAM, written row-wise
//                       by the host bus (pci_clk), read column-wise (clk);
//   * dual_addr_nvm   - 8 x 64-bit constant table with two read addresses
//                       (DCT basis rows by default);
//   * single_addr_nvm - 64 x 8-bit table of reciprocal quantization
//                       parameters, one address.
// All read sides run on clk, the DCT/quantization clock; only the pixel
// write port runs on pci_clk. The host that drives the write port and the
// DCT/quantization processor that consumes the outputs are outside this
// module, so their signals are the ports. Every output is registered, one
// clk cycle after its address. Grouping the three memories in one top is
// this design's choice; the source describes them as separate structures.
module video_mem_top
  import video_mem_pkg::*;
(
  input  logic        clk,
  input  logic        pci_clk,
  // pixel block double buffer
  input  logic [63:0] di,
  input  logic        din_valid,
  input  logic [7:0]  be,
  input  logic [2:0]  wa,
  input  logic        rnw,
  input  logic [2:0]  ra,
  output logic [63:0] d0,
  // dual-address constant table
  input  logic [2:0]  a1,
  input  logic [2:0]  a2,
  output logic [63:0] dout1,
  output logic [63:0] dout2,
  // reciprocal quantization table
  input  logic [5:0]  qa,
  output logic [7:0]  qd
);

  dual_port_vm u_vm (
    .clk, .pci_clk, .di, .din_valid, .be, .wa, .rnw, .ra, .d0
  );

  dual_addr_nvm u_dnvm (
    .clk, .a1, .a2, .dout1, .dout2
  );

  single_addr_nvm u_snvm (
    .clk, .a (qa), .d (qd)
  );

endmodule
