// mask_compose: bitmask generation of the bitmask-dictionary decoder.
//
// Turns one mask of a code word (type, location, pattern) into a W-bit word
// that is zero except where the mask applies; the decoder ORs the words of all
// masks of a code word into the final bitmask and XORs that with the
// dictionary entry.
//   sliding mask (type 0): an SMW-bit pattern whose least significant bit lands
//     on bit `loc` (log2(W)-bit location, any position); pattern bits that would
//     fall above bit W-1 are dropped.
//   fixed mask (type 1): an FMW-bit pattern on one of W/FMW aligned fields; the
//     location is the field number (log2(W/FMW) bits, taken from the low bits
//     of `loc`).
// The document names the two kinds (fixed at fixed locations, sliding anywhere)
// and the fields of a masked code word; the 2-bit sliding and 4-bit fixed
// sizes and the bit numbering are this design's choices.
// Purely combinational.
module mask_compose
  import tdc_pkg::*;
#(
  parameter int W   = SLICE_W,
  parameter int SMW = SMASK_W,
  parameter int FMW = FMASK_W,
  localparam int LOC_W = $clog2(W),
  localparam int PAT_W = (SMW > FMW) ? SMW : FMW
) (
  input  mask_type_e       mtype,
  input  logic [LOC_W-1:0] loc,
  input  logic [PAT_W-1:0] pat,
  output logic [W-1:0]     mask
);

  localparam int FLOC_W = $clog2(W / FMW);

  logic [W-1:0] slide_w, fixed_w;

  always_comb begin
    slide_w = W'(pat[SMW-1:0]) << loc;
    fixed_w = W'(pat[FMW-1:0]) << (int'(loc[FLOC_W-1:0]) * FMW);
    mask    = (mtype == MASK_FIXED) ? fixed_w : slide_w;
  end

  initial assert (W % FMW == 0 && W / FMW >= 2) else $error("W must hold a whole number of fixed masks");

endmodule
