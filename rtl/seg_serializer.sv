// seg_serializer: hands the segments rebuilt by the 2^n PRL stage to the
// bitmask-dictionary stage as a serial bit stream, most significant bit first.
//
// The second stage reads variable-length code words bit by bit, so segment
// boundaries mean nothing to it; this block only turns L-bit words back into
// the bit stream they were cut from. The document says the PRL output is sent
// on to the bitmask-dictionary stage; the serial form is this design's choice.
//
// Interface: seg/seg_valid/seg_ready in, bit_out/bit_valid/bit_ready out,
// clear restarts. Timing: a new segment is taken in the cycle its predecessor's
// last bit leaves, so a full supply gives one bit every cycle without bubbles.
module seg_serializer
  import tdc_pkg::*;
#(
  parameter int L = PRL_SEG_LEN
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [L-1:0] seg,
  input  logic         seg_valid,
  output logic         seg_ready,
  output logic         bit_out,
  output logic         bit_valid,
  input  logic         bit_ready
);

  localparam int CW = $clog2(L + 1);

  logic [L-1:0]  sr_q;
  logic [CW-1:0] left_q;   // bits still to send

  assign bit_valid = (left_q != '0);
  assign bit_out   = sr_q[L-1];
  assign seg_ready = (left_q == '0) || (left_q == CW'(1) && bit_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q   <= '0;
      left_q <= '0;
    end else if (clear) begin
      sr_q   <= '0;
      left_q <= '0;
    end else if (seg_valid && seg_ready) begin
      sr_q   <= seg;
      left_q <= CW'(L);
    end else if (bit_valid && bit_ready) begin
      sr_q   <= {sr_q[L-2:0], 1'b0};
      left_q <= left_q - 1'b1;
    end
  end

endmodule
