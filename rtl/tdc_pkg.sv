// tdc_pkg: constants and types shared by the two-stage test data decompressor.
//
// The decompressor undoes a two-stage compression of scan test data. The tester
// sends a serial bit stream coded with 2^n pattern run-length (PRL) code words;
// the first stage rebuilds 8-bit segments from them. Those segments, read as a
// serial stream again, are bitmask-dictionary code words; the second stage
// rebuilds m-bit scan slices from them (a dictionary entry XOR a composed
// bitmask, or a slice sent uncompressed). A control and generation unit shifts
// the slices into the m scan chains.
//
// The 8-bit PRL segment follows the document. The 16-bit slice (one dictionary
// word) is the wider of the two dictionary widths the document reports. The
// 3-bit exponent, the 16-entry dictionary and the two mask kinds (2-bit sliding,
// 4-bit fixed) are this design's own choices; the document does not give them.
package tdc_pkg;

  // 2^n PRL stage
  localparam int PRL_SEG_LEN   = 8;   // L, segment length (power of two)
  localparam int PRL_EXP_W     = 3;   // K, bits of the signed exponent E

  // bitmask-dictionary stage
  localparam int SLICE_W       = 16;  // m, scan chains = bits per slice = dictionary word
  localparam int DICT_DEPTH    = 16;  // dictionary entries
  localparam int SMASK_W       = 2;   // sliding mask pattern width
  localparam int FMASK_W       = 4;   // fixed mask pattern width
  localparam int CNT_W         = 16;  // width of the chain-length and vector counters

  // mask type field of a bitmask code word
  typedef enum logic {
    MASK_SLIDING = 1'b0,  // may start at any bit position
    MASK_FIXED   = 1'b1   // only at multiples of its own width
  } mask_type_e;

  // kind of a 2^n PRL code word, decided by its exponent
  typedef enum logic [1:0] {
    PRL_EXTERNAL  = 2'd0,  // n >= 0: 2^n segments equal to (or the inverse of) the reference
    PRL_INTERNAL  = 2'd1,  // n < 0 : one segment made of 2^|n| copies of a pattern
    PRL_EXCEPTION = 2'd2   // the most negative exponent: one raw segment follows
  } prl_kind_e;

  typedef enum logic [1:0] {
    PRL_ST_SIGN,     // read S
    PRL_ST_EXP,      // read the K exponent bits
    PRL_ST_PAYLOAD,  // read the pattern or the raw segment
    PRL_ST_EMIT      // hand out the decoded segment(s)
  } prl_state_e;

  typedef enum logic [3:0] {
    BM_ST_P,      // first bit: 1 = uncompressed slice follows
    BM_ST_Q,      // second bit: 1 = direct dictionary match
    BM_ST_NMASK,  // number of masks - 1
    BM_ST_MTYPE,  // mask type
    BM_ST_MLOC,   // mask location
    BM_ST_MPAT,   // mask pattern
    BM_ST_INDEX,  // dictionary index
    BM_ST_RAW,    // uncompressed slice bits
    BM_ST_OUT     // present the slice
  } bm_state_e;

  // kind of a bitmask-dictionary code word
  typedef enum logic [1:0] {
    BM_RAW    = 2'd0,  // uncompressed slice
    BM_DIRECT = 2'd1,  // dictionary entry as it is
    BM_MASKED = 2'd2   // dictionary entry XOR bitmask
  } bm_kind_e;

  typedef enum logic [1:0] {
    CGU_IDLE,
    CGU_SHIFT,
    CGU_CAPTURE,
    CGU_DONE
  } cgu_state_e;

endpackage
