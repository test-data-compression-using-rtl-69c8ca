// tb_codec_pkg: reference encoders for the decompressor testbenches.
//
// The testbenches build compressed streams with these functions and check that
// the hardware gives back the data they started from. The encoders follow the
// code formats described in the RTL headers but are written independently of
// the RTL:
//   prl_encode   - greedy 2^n PRL encoder over L-bit segments: an external run
//                  when the next segment equals the reference or its inverse
//                  (longest power-of-two run allowed by K), else the shortest
//                  internal code word that reproduces the segment, else an
//                  exception.
//   bm_*         - build one bitmask-dictionary code word and the slice it
//                  stands for.
package tb_codec_pkg;

  typedef bit bitq_t[$];

  // statistics of one prl_encode call
  typedef struct {
    int ext_pos;    // external runs, S=0
    int ext_neg;    // external runs, S=1
    int ext_long;   // external runs of more than one segment
    int int_pos;    // internal code words, S=0
    int int_neg;    // internal code words, S=1
    int exc;        // exceptions
    int segs;       // segments encoded
  } prl_stats_t;

  function automatic void push_field(ref bit q[$], input longint unsigned v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[i]);
  endfunction

  // value of bits [n-1:0] of a queue starting at index i, first bit most significant
  function automatic longint unsigned bits_value(ref bit q[$], input int i, input int n);
    longint unsigned v = 0;
    for (int k = 0; k < n; k++) v = (v << 1) | longint'(q[i + k]);
    return v;
  endfunction

  // segment made of 2^m copies of the top L>>m bits of `pat_seg`,
  // every second copy inverted when s=1
  function automatic longint unsigned prl_internal_expand(longint unsigned p, int m, bit s, int L);
    int P = L >> m;
    longint unsigned pm = (longint'(1) << P) - 1;
    longint unsigned r = 0;
    for (int c = 0; c < (1 << m); c++) begin
      longint unsigned cp = ((c % 2 == 1) && s) ? (~p & pm) : (p & pm);
      r = (r << P) | cp;
    end
    return r;
  endfunction

  function automatic void prl_encode(input longint unsigned segs[$], input int L, input int K,
                                     ref bit out[$], ref prl_stats_t st);
    longint unsigned lm   = (L == 64) ? '1 : ((longint'(1) << L) - 1);
    longint unsigned refs = 0;
    int log_l = $clog2(L);
    int max_e = (1 << (K - 1)) - 1;
    int i = 0;
    st = '{default: 0};
    st.segs = segs.size();
    while (i < segs.size()) begin
      longint unsigned cur = segs[i];
      if (cur == refs || cur == (~refs & lm)) begin
        bit s = (cur != refs);
        int run = 0, e = 0;
        while (i + run < segs.size() && segs[i + run] == cur && run < (1 << max_e)) run++;
        while ((1 << (e + 1)) <= run) e++;
        push_field(out, s, 1);
        push_field(out, e, K);
        if (s) st.ext_neg++; else st.ext_pos++;
        if (e > 0) st.ext_long++;
        refs = cur;
        i += (1 << e);
      end else begin
        bit done = 0;
        for (int m = log_l; m >= 1 && !done; m--) begin
          int P = L >> m;
          longint unsigned p = cur >> (L - P);
          for (int s = 0; s < 2 && !done; s++) begin
            if (prl_internal_expand(p, m, bit'(s), L) == cur) begin
              push_field(out, s, 1);
              push_field(out, -m, K);
              push_field(out, p, P);
              if (s) st.int_neg++; else st.int_pos++;
              done = 1;
            end
          end
        end
        if (!done) begin
          push_field(out, 0, 1);
          push_field(out, longint'(1) << (K - 1), K);
          push_field(out, cur, L);
          st.exc++;
        end
        refs = cur;
        i++;
      end
    end
  endfunction

  // cut a bit stream into L-bit segments, the last padded with zeros
  function automatic void to_segments(ref bit q[$], input int L, ref longint unsigned segs[$]);
    int n = (q.size() + L - 1) / L;
    for (int s = 0; s < n; s++) begin
      longint unsigned v = 0;
      for (int k = 0; k < L; k++) begin
        int idx = s * L + k;
        v = (v << 1) | longint'((idx < q.size()) ? q[idx] : 1'b0);
      end
      segs.push_back(v);
    end
  endfunction

  // one mask applied to a W-bit word: type 0 sliding (SMW bits at bit loc),
  // type 1 fixed (FMW bits at field loc)
  function automatic longint unsigned bm_mask_word(bit mtype, int loc, longint unsigned pat,
                                                   int W, int SMW, int FMW);
    longint unsigned r = 0;
    int width = mtype ? FMW : SMW;
    int base  = mtype ? loc * FMW : loc;
    for (int b = 0; b < width; b++)
      if (pat[b] && (base + b) < W) r[base + b] = 1'b1;
    return r;
  endfunction

endpackage
