// huff_bit_packer: turns a sequence of variable-length codes into a
// continuous bitstream delivered as 32-bit words.
//
// Codes enter right-aligned with their length (1..MAX_CODE bits) and are
// sent most significant bit first. The packer holds the not yet emitted
// bits in the low cnt bits of a 64-bit accumulator; whenever a code brings
// the count to 32 or more, the oldest 32 bits leave as one word in the same
// cycle and the rest stay. flush sends the remaining bits, if any, as a
// last word padded with zeros at the bottom, and out_bits says how many of
// its bits are real (32 for a full word).
//
// Interface: in_valid with in_code pushes one code per cycle; out_valid is a
// one-cycle pulse with out_word (registered). There is no backpressure: the
// receiver takes every word. A flush in the cycle of a push sends the pushed
// bits too, as long as that push does not complete a word; the coder never
// pushes and flushes together, and an assertion checks the rule. The
// assertion's synchronous use of rst_n is the only sync use of that net.
// The word width and packing order are this design's choice; the source
// only says the coded image is the first pixel followed by the codes.
module huff_bit_packer
  import lpc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  huff_code_t  in_code,
  input  logic        flush,
  output logic        out_valid,
  output logic [31:0] out_word,
  output logic        out_last,
  output logic [5:0]  out_bits
);

  logic [63:0] acc, acc_new;
  logic [6:0]  cnt, cnt_new;

  always_comb begin
    acc_new = acc;
    cnt_new = cnt;
    if (in_valid && in_code.len != '0) begin
      acc_new = (acc << in_code.len) | 64'(in_code.code);
      cnt_new = cnt + 7'(in_code.len);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
      out_last  <= 1'b0;
      out_bits  <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      acc       <= acc_new;
      cnt       <= cnt_new;
      if (cnt_new >= 7'd32) begin
        out_valid <= 1'b1;
        out_word  <= 32'(acc_new >> (cnt_new - 7'd32));
        out_bits  <= 6'd32;
        cnt       <= cnt_new - 7'd32;
      end else if (flush) begin
        out_valid <= 1'b1;
        out_last  <= 1'b1;
        out_word  <= 32'(acc_new << (7'd32 - cnt_new));
        out_bits  <= cnt_new[5:0];
        acc       <= '0;
        cnt       <= '0;
      end
    end
  end

  // The coder must not flush in the cycle of a push that fills a word.
  a_no_flush_on_full: assert property (@(posedge clk) disable iff (!rst_n)
    !(flush && cnt_new >= 7'd32));

endmodule
