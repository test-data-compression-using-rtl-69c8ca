// dict_mem: the decompressor's dictionary.
//
// DEPTH words of W bits. The tester writes the dictionary selected by the
// compressor before the compressed stream is sent (one word per cycle on
// we/waddr/wdata); during decompression the bitmask-dictionary decoder reads
// the entry named by a code word's index. The read is combinational, so the
// entry is available in the same cycle as the index and is XORed with the
// composed bitmask in parallel with no extra cycle.
// The document stores the dictionary with the compressed data; the depth and
// the load port are this design's choices. Contents are not reset.
module dict_mem
  import tdc_pkg::*;
#(
  parameter int W     = SLICE_W,
  parameter int DEPTH = DICT_DEPTH,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
