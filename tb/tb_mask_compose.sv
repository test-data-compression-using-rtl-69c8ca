// tb_mask_compose: exhaustive check of the bitmask generator (W=16, 2-bit
// sliding and 4-bit fixed masks) against a bit-by-bit model: every type,
// every location and every pattern.
module tb_mask_compose;
  import tdc_pkg::*;
  import tb_codec_pkg::*;

  localparam int W = 16, SMW = 2, FMW = 4;

  mask_type_e  mtype;
  logic [3:0]  loc;
  logic [3:0]  pat;
  logic [W-1:0] mask;

  int checks = 0, failures = 0;

  mask_compose #(.W(W), .SMW(SMW), .FMW(FMW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2; t++)
      for (int l = 0; l < 16; l++)
        for (int p = 0; p < 16; p++) begin
          longint unsigned expv;
          int lf;
          mtype = mask_type_e'(t);
          loc   = 4'(l);
          pat   = 4'(p);
          #1;
          // a fixed mask's location is a field number; only its low bits count
          lf   = t ? (l % (W / FMW)) : l;
          expv = bm_mask_word(bit'(t), lf, longint'(t ? p : (p % (1 << SMW))), W, SMW, FMW);
          checks++;
          if (mask !== W'(expv)) begin
            failures++;
            $display("type %0d loc %0d pat %h: got %h expected %h", t, l, p, mask, W'(expv));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
