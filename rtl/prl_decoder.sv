// prl_decoder: first decompression stage, a 2^n pattern run-length decoder.
//
// The tester stream is a sequence of code words, each read MSB first, one bit
// per accepted cycle:
//   S (1 bit)  E (K bits, two's complement)  payload
// E >= 0 (external 2^n PRL): no payload. The code word stands for 2^E
//        consecutive segments, each equal to the reference segment (S=0) or to
//        its bitwise inverse (S=1). After an inverse run the inverse becomes
//        the reference.
// E <  0 (internal 2^n PRL), E > -2^(K-1): the payload is a pattern p of
//        L/2^|E| bits. The segment is 2^|E| copies of p, first copy in the most
//        significant position; with S=1 every second copy is inverted (the
//        sub-segments are inversely compatible). The segment becomes the reference.
// E == -2^(K-1) (exception): the payload is the raw L-bit segment, which
//        becomes the reference. S is read and ignored.
// The reference starts at all zeros after reset or clear. With K wider than
// needed, internal exponents below -log2(L) are treated as -log2(L).
//
// The document gives the three code-word kinds, S, a K-bit exponent, the
// reference-update rules and the 8-bit segment. K=3, the exception code, the
// alternating inversion inside an internal segment and the zero initial
// reference are this design's choices.
//
// Interface: in_bit/in_valid/in_ready and seg/seg_valid/seg_ready are
// valid/ready handshakes; clear is a synchronous restart.
// Timing: one code-word bit per cycle; the segment is presented in the cycle
// after the last bit of its code word, and an external run presents one
// segment per cycle. Input is not accepted while segments are presented.
module prl_decoder
  import tdc_pkg::*;
#(
  parameter int L = PRL_SEG_LEN,  // segment length, a power of two
  parameter int K = PRL_EXP_W     // exponent width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_bit,
  input  logic         in_valid,
  output logic         in_ready,
  output logic [L-1:0] seg,
  output logic         seg_valid,
  input  logic         seg_ready,
  output prl_kind_e    seg_kind     // kind of the code word being presented
);

  localparam int LOG_L = $clog2(L);
  // counts payload bits (up to L) or run segments (up to 2^(2^(K-1)-1))
  localparam int RUN_MAX = 1 << ((1 << (K - 1)) - 1);
  localparam int CW   = $clog2((RUN_MAX > L ? RUN_MAX : L) + 1);

  prl_state_e           state;
  logic                 s_q;
  logic [K-1:0]         e_q;
  logic [L-1:0]         pay_q;    // payload shift register
  logic [L-1:0]         ref_q;    // reference segment
  logic [CW-1:0]     cnt_q;
  logic [L-1:0]         internal_seg;

  logic [K-1:0]         e_next;
  logic                 accept;
  logic                 emit;
  prl_kind_e            kind_next, kind_q;

  assign e_next   = {e_q[K-2:0], in_bit};
  assign in_ready = (state != PRL_ST_EMIT);
  assign accept   = in_valid && in_ready;
  assign emit     = seg_valid && seg_ready;

  // |E| of an internal code word, limited to log2(L)
  function automatic logic [K-1:0] mag_of(input logic [K-1:0] e);
    logic [K-1:0] neg;
    neg = -e;
    return (neg > K'(LOG_L)) ? K'(LOG_L) : neg;
  endfunction

  // Internal segment for every possible |E| = m: 2^m copies of the L>>m-bit
  // pattern held in pay_q's low bits, copy 0 in the most significant place,
  // odd copies inverted when S=1.
  logic [L-1:0] expand [1:LOG_L];
  for (genvar m = 1; m <= LOG_L; m++) begin : g_mag
    for (genvar j = 0; j < L; j++) begin : g_bit
      localparam int PLOG = LOG_L - m;
      localparam int SUB  = (L - 1 - j) >> PLOG;
      localparam int POS  = j % (1 << PLOG);
      assign expand[m][j] = pay_q[POS] ^ (s_q & SUB[0]);
    end
  end

  logic [K-1:0] mag_q;
  assign mag_q = mag_of(e_q);

  always_comb begin
    internal_seg = expand[LOG_L];
    for (int m = 1; m <= LOG_L; m++)
      if (mag_q == K'(m)) internal_seg = expand[m];
  end

  // kind of the code word whose exponent is completing
  always_comb begin
    if (!e_next[K-1])                            kind_next = PRL_EXTERNAL;
    else if (e_next == {1'b1, {(K-1){1'b0}}})    kind_next = PRL_EXCEPTION;
    else                                         kind_next = PRL_INTERNAL;
  end

  always_comb begin
    unique case (kind_q)
      PRL_EXTERNAL:  seg = ref_q ^ {L{s_q}};
      PRL_INTERNAL:  seg = internal_seg;
      default:       seg = pay_q;
    endcase
  end
  assign seg_valid = (state == PRL_ST_EMIT);
  assign seg_kind  = kind_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= PRL_ST_SIGN;
      s_q    <= 1'b0;
      e_q    <= '0;
      pay_q  <= '0;
      ref_q  <= '0;
      cnt_q  <= '0;
      kind_q <= PRL_EXTERNAL;
    end else if (clear) begin
      state  <= PRL_ST_SIGN;
      s_q    <= 1'b0;
      e_q    <= '0;
      pay_q  <= '0;
      ref_q  <= '0;
      cnt_q  <= '0;
      kind_q <= PRL_EXTERNAL;
    end else begin
      unique case (state)
        PRL_ST_SIGN: if (accept) begin
          s_q   <= in_bit;
          cnt_q <= CW'(K);
          state <= PRL_ST_EXP;
        end
        PRL_ST_EXP: if (accept) begin
          e_q   <= e_next;
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == CW'(1)) begin
            kind_q <= kind_next;
            unique case (kind_next)
              PRL_EXTERNAL: begin
                cnt_q <= CW'(1) << e_next;
                state <= PRL_ST_EMIT;
              end
              PRL_INTERNAL: begin
                cnt_q <= CW'(L) >> mag_of(e_next);
                state <= PRL_ST_PAYLOAD;
              end
              default: begin
                cnt_q <= CW'(L);
                state <= PRL_ST_PAYLOAD;
              end
            endcase
          end
        end
        PRL_ST_PAYLOAD: if (accept) begin
          pay_q <= {pay_q[L-2:0], in_bit};
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == CW'(1)) state <= PRL_ST_EMIT;
        end
        PRL_ST_EMIT: if (emit) begin
          if (kind_q == PRL_EXTERNAL) begin
            cnt_q <= cnt_q - 1'b1;
            if (cnt_q == CW'(1)) begin
              ref_q <= seg;          // unchanged for S=0, the inverse for S=1
              state <= PRL_ST_SIGN;
            end
          end else begin
            ref_q <= seg;
            state <= PRL_ST_SIGN;
          end
        end
        default: state <= PRL_ST_SIGN;
      endcase
    end
  end

  // L must be a power of two and K wide enough to hold the internal exponents.
  initial begin
    assert (L == (1 << LOG_L) && L >= 2) else $error("L must be a power of two");
    assert ((1 << (K - 1)) > LOG_L) else $error("K too small for L");
  end

  // A segment, once offered, is held until it is taken.
  a_seg_stable: assert property (@(posedge clk) disable iff (!rst_n || clear)
    seg_valid && !seg_ready |=> seg_valid && $stable(seg));

endmodule
