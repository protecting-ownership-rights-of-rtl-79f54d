// lpc_pkg: types and constants shared by the watermarked linear-predictive
// image coder.
//
// The coder works on 8-bit gray-scale pixels and predicts each pixel D from
// its neighbours A (above-left), C (above), E (above-right) and B (left):
//
//        A C E
//        B D
//
// Pixels on the image border use a simpler predictor, selected by pred_mode_e.
// Error symbols are the 8-bit two's-complement difference D - model, so the
// Huffman table is indexed by 0..255 (255 stands for -1).
package lpc_pkg;

  localparam int unsigned PIX_W    = 8;   // gray-scale pixel width
  localparam int unsigned MAX_CODE = 20;  // longest Huffman code, in bits
  localparam int unsigned LEN_W    = 5;   // width of a code-length field

  typedef logic [PIX_W-1:0] pixel_t;

  // Which predictor a lane applies to its pixel.
  typedef enum logic [1:0] {
    PM_FULL  = 2'd0,  // model = (A + B + C + E) / 4
    PM_LEFT  = 2'd1,  // first row: model = B (pixel to the left)
    PM_ABOVE = 2'd2,  // first and last column: model = C (pixel above)
    PM_RAW   = 2'd3   // upper-left pixel: sent as a raw 8-bit literal
  } pred_mode_e;

  // One Huffman code word: right-aligned code bits and their count.
  typedef struct packed {
    logic [LEN_W-1:0]    len;
    logic [MAX_CODE-1:0] code;
  } huff_code_t;

endpackage
