// tdc_decompressor: on-chip decompressor for scan test data compressed with a
// bitmask-dictionary code followed by a 2^n pattern run-length code.
//
// Data path, one compressed bit per cycle from the tester:
//   ate_bit -> prl_decoder (8-bit segments) -> seg_serializer (bit stream)
//           -> bm_decoder + dict_mem (W-bit slices) -> cgu -> scan_in[W-1:0]
// The tester first loads the dictionary through dict_we/dict_waddr/dict_wdata,
// sets chain_len (slices per vector) and num_vectors, and pulses start; the
// decoders are cleared and the stream may then be sent on ate_bit/ate_valid,
// paced by ate_ready. Each decoded slice appears on scan_in with scan_shift
// high; after every chain_len slices scan_capture is high for one cycle; done
// rises after the last vector. Compressed bits left over after the last slice
// (padding of the last segment) are ignored.
//
// The two stages, their order and the dictionary/bitmask XOR follow the
// document; the serial tester interface, the load port and the start/done
// handshake are this design's choices. Stages stall one another through
// valid/ready, so backpressure from a capture cycle or a PRL run reaches the
// tester as ate_ready low.
module tdc_decompressor
  import tdc_pkg::*;
#(
  parameter int L     = PRL_SEG_LEN,
  parameter int K     = PRL_EXP_W,
  parameter int W     = SLICE_W,
  parameter int DEPTH = DICT_DEPTH,
  parameter int SMW   = SMASK_W,
  parameter int FMW   = FMASK_W,
  parameter int CW    = CNT_W,
  localparam int IDX_W = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration and control
  input  logic             start,
  input  logic [CW-1:0]    chain_len,
  input  logic [CW-1:0]    num_vectors,
  output logic             busy,
  output logic             done,
  // dictionary load
  input  logic             dict_we,
  input  logic [IDX_W-1:0] dict_waddr,
  input  logic [W-1:0]     dict_wdata,
  // compressed stream from the tester
  input  logic             ate_bit,
  input  logic             ate_valid,
  output logic             ate_ready,
  // scan chains of the circuit under test
  output logic [W-1:0]     scan_in,
  output logic             scan_shift,
  output logic             scan_capture
);

  logic             clear;

  logic [L-1:0]     seg;
  logic             seg_valid, seg_ready;
  prl_kind_e        seg_kind;

  logic             bm_bit, bm_valid, bm_ready;

  logic [IDX_W-1:0] dict_raddr;
  logic [W-1:0]     dict_rdata;

  logic [W-1:0]     slice;
  logic             slice_valid, slice_ready;
  bm_kind_e         slice_kind;

  prl_decoder #(.L(L), .K(K)) u_prl (
    .clk, .rst_n, .clear,
    .in_bit   (ate_bit),
    .in_valid (ate_valid),
    .in_ready (ate_ready),
    .seg, .seg_valid, .seg_ready, .seg_kind
  );

  seg_serializer #(.L(L)) u_ser (
    .clk, .rst_n, .clear,
    .seg, .seg_valid, .seg_ready,
    .bit_out   (bm_bit),
    .bit_valid (bm_valid),
    .bit_ready (bm_ready)
  );

  dict_mem #(.W(W), .DEPTH(DEPTH)) u_dict (
    .clk,
    .we    (dict_we),
    .waddr (dict_waddr),
    .wdata (dict_wdata),
    .raddr (dict_raddr),
    .rdata (dict_rdata)
  );

  bm_decoder #(.W(W), .DEPTH(DEPTH), .SMW(SMW), .FMW(FMW)) u_bm (
    .clk, .rst_n, .clear,
    .in_bit   (bm_bit),
    .in_valid (bm_valid),
    .in_ready (bm_ready),
    .dict_raddr, .dict_rdata,
    .slice, .slice_valid, .slice_ready, .slice_kind
  );

  cgu #(.W(W), .CW(CW)) u_cgu (
    .clk, .rst_n, .start, .chain_len, .num_vectors,
    .slice, .slice_valid, .slice_ready,
    .scan_in, .scan_shift, .scan_capture,
    .decomp_clear (clear),
    .busy, .done
  );

endmodule
