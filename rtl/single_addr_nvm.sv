// single_addr_nvm: read-only table of reciprocal quantization parameters.
//
// Quantization divides each DCT coefficient by its quantization parameter.
// Storing 1/Q instead lets the quantizer multiply. This table holds one
// reciprocal per coefficient position of an 8x8 block (64 entries), read one
// byte at a time: on each rising clk edge d is loaded with entry a. One clk
// cycle of latency; no reset.
//
// The single address, byte-wide output, 6-bit address and the storing of
// reciprocals follow the source. The values are this design's choice:
// R[i] = round(1024 / Q[i]) with Q the MPEG default intra quantizer matrix
// in raster order (see video_mem_pkg::qrecip_rom_init), so the quantized
// value is (coef * R) >> 10. Override INIT for another matrix or scale.
module single_addr_nvm
  import video_mem_pkg::*;
#(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned DATA_W = 8,
  parameter logic [DATA_W-1:0] INIT [1 << ADDR_W] = qrecip_rom_init()
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] a,
  output logic [DATA_W-1:0] d
);

  always_ff @(posedge clk) d <= INIT[a];

endmodule
