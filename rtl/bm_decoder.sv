// bm_decoder: second decompression stage, the bitmask-dictionary decoder.
//
// Reads code words from a serial bit stream, most significant bit of every
// field first, and produces one W-bit slice per code word:
//   1  <W raw bits>                          uncompressed slice
//   01 <index>                               direct match: dictionary[index]
//   00 <n-1> {<type> <location> <pattern>}xn <index>
//                                            masked match: dictionary[index]
//                                            XOR the OR of the n masks
// n is 1 or 2 (a 1-bit count field). A sliding mask (type 0) has a log2(W)-bit
// location and an SMW-bit pattern, a fixed mask (type 1) a log2(W/FMW)-bit
// location and an FMW-bit pattern (see mask_compose). Each mask is folded into
// the accumulated bitmask as soon as its pattern has arrived, so when the
// index is complete only the dictionary read and one XOR remain.
//
// The document gives the decision bits p and q, the order of the fields, the
// dictionary read and the XOR with the composed bitmask. The mask count field
// width, the two mask sizes and the index width (16 entries) are this design's
// choices.
//
// Interface: in_bit/in_valid/in_ready, slice/slice_valid/slice_ready are
// valid/ready handshakes; dict_raddr/dict_rdata is a combinational dictionary
// read port; slice_kind tells how the presented slice was coded.
// Timing: one code-word bit per cycle; the slice is presented in the cycle
// after the last bit, and no input is taken while it waits to be accepted.
module bm_decoder
  import tdc_pkg::*;
#(
  parameter int W     = SLICE_W,
  parameter int DEPTH = DICT_DEPTH,
  parameter int SMW   = SMASK_W,
  parameter int FMW   = FMASK_W,
  localparam int IDX_W = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_bit,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [IDX_W-1:0] dict_raddr,
  input  logic [W-1:0]     dict_rdata,
  output logic [W-1:0]     slice,
  output logic             slice_valid,
  input  logic             slice_ready,
  output bm_kind_e         slice_kind
);

  localparam int LOC_W  = $clog2(W);
  localparam int FLOC_W = $clog2(W / FMW);
  localparam int PAT_W  = (SMW > FMW) ? SMW : FMW;
  localparam int CW     = $clog2(W + 1);

  bm_state_e        state;
  logic [CW-1:0]    cnt_q;        // bits left in the current field
  logic [W-1:0]     sr_q;         // field shift register
  mask_type_e       mtype_q;
  logic [LOC_W-1:0] mloc_q;
  logic             more_mask_q;  // a second mask follows the current one
  logic [W-1:0]     mask_q;       // accumulated bitmask
  logic [IDX_W-1:0] idx_q;
  bm_kind_e         kind_q;

  logic [W-1:0]     sr_next;
  logic [W-1:0]     one_mask;
  logic             accept;

  assign in_ready = (state != BM_ST_OUT);
  assign accept   = in_valid && in_ready;
  assign sr_next  = {sr_q[W-2:0], in_bit};

  mask_compose #(.W(W), .SMW(SMW), .FMW(FMW)) u_mask (
    .mtype (mtype_q),
    .loc   (mloc_q),
    .pat   (sr_next[PAT_W-1:0]),
    .mask  (one_mask)
  );

  assign dict_raddr  = idx_q;
  assign slice       = (kind_q == BM_RAW) ? sr_q : (dict_rdata ^ mask_q);
  assign slice_valid = (state == BM_ST_OUT);
  assign slice_kind  = kind_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= BM_ST_P;
      cnt_q       <= '0;
      sr_q        <= '0;
      mtype_q     <= MASK_SLIDING;
      mloc_q      <= '0;
      more_mask_q <= 1'b0;
      mask_q      <= '0;
      idx_q       <= '0;
      kind_q      <= BM_RAW;
    end else if (clear) begin
      state       <= BM_ST_P;
      cnt_q       <= '0;
      sr_q        <= '0;
      mtype_q     <= MASK_SLIDING;
      mloc_q      <= '0;
      more_mask_q <= 1'b0;
      mask_q      <= '0;
      idx_q       <= '0;
      kind_q      <= BM_RAW;
    end else begin
      unique case (state)
        BM_ST_P: if (accept) begin
          mask_q <= '0;
          if (in_bit) begin
            kind_q <= BM_RAW;
            cnt_q  <= CW'(W);
            state  <= BM_ST_RAW;
          end else begin
            state  <= BM_ST_Q;
          end
        end
        BM_ST_Q: if (accept) begin
          cnt_q <= CW'(IDX_W);
          if (in_bit) begin
            kind_q <= BM_DIRECT;
            state  <= BM_ST_INDEX;
          end else begin
            kind_q <= BM_MASKED;
            state  <= BM_ST_NMASK;
          end
        end
        BM_ST_NMASK: if (accept) begin
          more_mask_q <= in_bit;
          state       <= BM_ST_MTYPE;
        end
        BM_ST_MTYPE: if (accept) begin
          mtype_q <= mask_type_e'(in_bit);
          cnt_q   <= in_bit ? CW'(FLOC_W) : CW'(LOC_W);
          state   <= BM_ST_MLOC;
        end
        BM_ST_MLOC: if (accept) begin
          sr_q  <= sr_next;
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == CW'(1)) begin
            mloc_q <= sr_next[LOC_W-1:0];
            cnt_q  <= (mtype_q == MASK_FIXED) ? CW'(FMW) : CW'(SMW);
            state  <= BM_ST_MPAT;
          end
        end
        BM_ST_MPAT: if (accept) begin
          sr_q  <= sr_next;
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == CW'(1)) begin
            mask_q <= mask_q | one_mask;
            if (more_mask_q) begin
              more_mask_q <= 1'b0;
              state       <= BM_ST_MTYPE;
            end else begin
              cnt_q <= CW'(IDX_W);
              state <= BM_ST_INDEX;
            end
          end
        end
        BM_ST_INDEX: if (accept) begin
          sr_q  <= sr_next;
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == CW'(1)) begin
            idx_q <= sr_next[IDX_W-1:0];
            state <= BM_ST_OUT;
          end
        end
        BM_ST_RAW: if (accept) begin
          sr_q  <= sr_next;
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == CW'(1)) state <= BM_ST_OUT;
        end
        BM_ST_OUT: if (slice_ready) begin
          state <= BM_ST_P;
        end
        default: state <= BM_ST_P;
      endcase
    end
  end

  a_slice_stable: assert property (@(posedge clk) disable iff (!rst_n || clear)
    slice_valid && !slice_ready |=> slice_valid && $stable(slice));

endmodule
