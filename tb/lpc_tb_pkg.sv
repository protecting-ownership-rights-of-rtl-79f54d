// lpc_tb_pkg: reference models shared by the coder's testbenches.
//
// Written from the coder's specification, not from its RTL:
//   ref_term   - a pair term, (p+q)>>2 (add-then-shift) or p>>2 + q>>2
//   ref_model  - the four-neighbour prediction with per-lane forms
//   make_table - a complete prefix-free Huffman table for the 256 error
//                symbols. Symbols are ranked with the ten most frequent
//                training-set errors of the reference statistics first
//                (0, -1, 1, -2, 4, 5, 2, -6, -3, -5), then by magnitude.
//                Ranks 0-9 get 5 bits, 10-25 6 bits, 26-41 7 bits, 42-57
//                8 bits, the rest 10 bits (Kraft sum 0.943), and codes are
//                assigned canonically: each code is the previous one plus
//                one, shifted left when the length grows.
//   watermark_table - embeds 9-bit signature fields {rank, bit} in such a
//                table: bit 1 swaps the symbols at ranks rank-1 and rank+1,
//                bit 0 those at ranks rank and rank+1; when the two swapped
//                codes have the same length, the code at rank is lengthened
//                by one bit equal to the signature bit. Rank 0 and fields
//                touching ranks already used are skipped. A lengthened code
//                keeps the table prefix-free.
package lpc_tb_pkg;

  function automatic int ref_term(int p, int q, bit add_then_shift);
    return add_then_shift ? (p + q) >> 2 : (p >> 2) + (q >> 2);
  endfunction

  function automatic int ref_model(int a, int b, int c, int e, bit xf_ab, bit xf_ce);
    return ref_term(a, b, xf_ab) + ref_term(c, e, xf_ce);
  endfunction

  function automatic int rank_len(int r);
    if (r < 10) return 5;
    if (r < 26) return 6;
    if (r < 42) return 7;
    if (r < 58) return 8;
    return 10;
  endfunction

  // Symbols in rank order (most probable first).
  function automatic void rank_order(output int order[256]);
    bit used[256];
    int n;
    int first[10] = '{0, 255, 1, 254, 4, 5, 2, 250, 253, 251};
    n = 0;
    foreach (used[i]) used[i] = 1'b0;
    foreach (first[i]) begin
      order[n] = first[i];
      used[first[i]] = 1'b1;
      n++;
    end
    for (int m = 0; m <= 128; m++) begin
      int cand[2];
      cand[0] = m & 255;
      cand[1] = (-m) & 255;
      foreach (cand[k]) if (!used[cand[k]]) begin
        order[n] = cand[k];
        used[cand[k]] = 1'b1;
        n++;
      end
    end
  endfunction

  // Adds the signature fields sig[i] = {rank[7:0], bit} to a table;
  // returns how many were embedded and, per field, whether it was.
  function automatic int watermark_table(ref int code_t[256], ref int len_t[256],
                                         input int sig[], ref bit done_o[]);
    int order[256];
    bit touched[256];
    int n = 0;
    rank_order(order);
    foreach (touched[i]) touched[i] = 1'b0;
    done_o = new[sig.size()];
    foreach (sig[i]) begin
      int loc, b, r0, r1, s0, s1, tc, tl;
      loc = sig[i] >> 1;
      b = sig[i] & 1;
      done_o[i] = 1'b0;
      if (loc == 0 || loc == 255) continue;
      r0 = b ? loc - 1 : loc;
      r1 = loc + 1;
      if (touched[r0] || touched[r1] || touched[loc]) continue;
      touched[r0] = 1'b1; touched[r1] = 1'b1; touched[loc] = 1'b1;
      s0 = order[r0];
      s1 = order[r1];
      if (len_t[s0] == len_t[s1]) begin
        // Same length: the swap alone changes nothing measurable, so the
        // code at rank loc is lengthened by the signature bit.
        int sl = order[loc];
        code_t[sl] = (code_t[sl] << 1) | b;
        len_t[sl]++;
      end
      tc = code_t[s0]; tl = len_t[s0];
      code_t[s0] = code_t[s1]; len_t[s0] = len_t[s1];
      code_t[s1] = tc; len_t[s1] = tl;
      order[r0] = s1;
      order[r1] = s0;
      done_o[i] = 1'b1;
      n++;
    end
    return n;
  endfunction

  // code_o[s] and len_o[s] for symbol s = error mod 256.
  function automatic void make_table(output int code_o[256], output int len_o[256]);
    int order[256];
    int code, prev_len;
    rank_order(order);
    code = 0;
    prev_len = rank_len(0);
    for (int r = 0; r < 256; r++) begin
      int l = rank_len(r);
      if (l > prev_len) code = code << (l - prev_len);
      prev_len = l;
      code_o[order[r]] = code;
      len_o[order[r]] = l;
      code++;
    end
  endfunction

endpackage
