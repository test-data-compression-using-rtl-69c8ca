// cgu: control and generation unit of the decompressor.
//
// Applies the decoded slices to the circuit under test. Each slice holds one
// bit for each of the m = W scan chains; a test vector is chain_len slices
// (the scan-chain length), and the test set is num_vectors vectors. In the
// SHIFT state every accepted slice drives scan_in with scan_shift high. After
// chain_len slices the unit spends one cycle in CAPTURE (scan_capture high,
// no slice taken, which stalls the decoders), then starts the next vector.
// After num_vectors vectors it raises done and waits for the next start.
// start also pulses decomp_clear for one cycle so the decoders begin with an
// empty state and a zero PRL reference.
//
// The document names the unit and gives its role (transmission control and
// test pattern generation) and the slicing of vectors into m chains of length
// L; the single capture cycle and the start/done protocol are this design's
// choices. chain_len and num_vectors must be at least 1 and are sampled
// continuously, so they must be held for the whole run.
module cgu
  import tdc_pkg::*;
#(
  parameter int W  = SLICE_W,
  parameter int CW = CNT_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] chain_len,
  input  logic [CW-1:0] num_vectors,
  input  logic [W-1:0]  slice,
  input  logic          slice_valid,
  output logic          slice_ready,
  output logic [W-1:0]  scan_in,
  output logic          scan_shift,
  output logic          scan_capture,
  output logic          decomp_clear,
  output logic          busy,
  output logic          done
);

  cgu_state_e    state;
  logic [CW-1:0] shift_cnt_q;
  logic [CW-1:0] vec_cnt_q;

  assign slice_ready  = (state == CGU_SHIFT);
  assign scan_shift   = slice_valid && slice_ready;
  assign scan_in      = scan_shift ? slice : '0;
  assign scan_capture = (state == CGU_CAPTURE);
  assign decomp_clear = start && (state == CGU_IDLE || state == CGU_DONE);
  assign busy         = (state == CGU_SHIFT || state == CGU_CAPTURE);
  assign done         = (state == CGU_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= CGU_IDLE;
      shift_cnt_q <= '0;
      vec_cnt_q   <= '0;
    end else begin
      unique case (state)
        CGU_IDLE, CGU_DONE: if (start) begin
          shift_cnt_q <= '0;
          vec_cnt_q   <= '0;
          state       <= CGU_SHIFT;
        end
        CGU_SHIFT: if (scan_shift) begin
          if (shift_cnt_q == chain_len - 1'b1) begin
            shift_cnt_q <= '0;
            state       <= CGU_CAPTURE;
          end else begin
            shift_cnt_q <= shift_cnt_q + 1'b1;
          end
        end
        CGU_CAPTURE: begin
          if (vec_cnt_q == num_vectors - 1'b1) begin
            state <= CGU_DONE;
          end else begin
            vec_cnt_q <= vec_cnt_q + 1'b1;
            state     <= CGU_SHIFT;
          end
        end
        default: state <= CGU_IDLE;
      endcase
    end
  end

  a_cfg_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (chain_len != '0 && num_vectors != '0));

endmodule
