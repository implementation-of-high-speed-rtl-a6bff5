// dual_addr_nvm: read-only table with two independent read ports.
//
// An 8-word x 64-bit constant table (one block of 8*64 bits) is read through
// two addresses at once: on each rising clk edge dout1 is loaded with word
// a1 and dout2 with word a2, so a datapath can fetch two table rows per
// cycle. One clk cycle of latency; no reset, outputs are undefined until the
// first edge.
//
// The organisation (3-bit addresses, 8 words of 64 bits, two outputs, a
// clocked pipelined read) follows the source. Its contents are not given
// there; by default the table holds the 8x8 DCT-II basis matrix, one basis
// row per word, signed 8-bit coefficients, byte n = coefficient n (see
// video_mem_pkg::dct_rom_init). Override INIT for other constants.
module dual_addr_nvm
  import video_mem_pkg::*;
#(
  parameter int unsigned ADDR_W = 3,
  parameter int unsigned DATA_W = 64,
  parameter logic [DATA_W-1:0] INIT [1 << ADDR_W] = dct_rom_init()
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] a1,
  input  logic [ADDR_W-1:0] a2,
  output logic [DATA_W-1:0] dout1,
  output logic [DATA_W-1:0] dout2
);

  always_ff @(posedge clk) begin
    dout1 <= INIT[a1];
    dout2 <= INIT[a2];
  end

endmodule
