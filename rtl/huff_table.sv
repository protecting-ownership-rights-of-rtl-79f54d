// huff_table: the Huffman code table of the coder.
//
// One entry per 8-bit error symbol (0..255, two's complement, so 255 is -1):
// the code bits, right-aligned, and the code length. The table is built
// offline from the summed error statistics of a set of training images, and
// that is also where its watermark is placed (swapped probability entries,
// lengthened codes, edge labelling of the Huffman tree), so the hardware
// only stores it: it is loaded one entry per cycle through the write port
// before an image is coded. Lengths of 1 to MAX_CODE (20) bits are allowed.
//
// Interface: wr_en/wr_sym/wr_code is a plain synchronous write. The read is
// combinational (sym to code), which suits a small distributed RAM and
// lets the coder look up one symbol per cycle. The memory is not reset;
// every symbol that can occur must be loaded first.
module huff_table
  import lpc_pkg::*;
(
  input  logic       clk,
  input  logic       wr_en,
  input  pixel_t     wr_sym,
  input  huff_code_t wr_code,
  input  pixel_t     sym,
  output huff_code_t code
);

  huff_code_t mem [256];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_sym] <= wr_code;
  end

  assign code = mem[sym];

endmodule
