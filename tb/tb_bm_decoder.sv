// tb_bm_decoder: self-checking test of the bitmask-dictionary decoder
// (W=16, 16 entries, 2-bit sliding and 4-bit fixed masks).
//
// A random dictionary is held in the testbench and served on the read port.
// 500 slices are drawn with random code-word kinds (uncompressed, direct
// match, one or two masks of either type); for each the testbench builds the
// code word and works out the slice on its own. Pass 1 runs at full rate and
// checks the cycle count (one cycle per code-word bit plus one per slice);
// pass 2 adds random input gaps and output backpressure.
module tb_bm_decoder;
  import tdc_pkg::*;
  import tb_codec_pkg::*;

  localparam int W = 16, DEPTH = 16, SMW = 2, FMW = 4;
  localparam int N = 500;

  logic         clk = 0, rst_n = 0, clear = 0;
  logic         in_bit = 0, in_valid = 0, in_ready;
  logic [3:0]   dict_raddr;
  logic [W-1:0] dict_rdata;
  logic [W-1:0] slice;
  logic         slice_valid, slice_ready = 0;
  bm_kind_e     slice_kind;

  int checks = 0, failures = 0;

  bm_decoder #(.W(W), .DEPTH(DEPTH), .SMW(SMW), .FMW(FMW)) dut (.*);

  logic [W-1:0] dict[DEPTH];
  assign dict_rdata = dict[dict_raddr];

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] exp_slice[$];
  bm_kind_e     exp_kind[$];
  bit           stream[$];
  int           got, stall_pct, gap_pct;
  int           n_raw, n_direct, n_one, n_two, n_slide, n_fixed;
  bit           feeding_done;

  task automatic make_stream();
    exp_slice.delete(); exp_kind.delete(); stream.delete();
    for (int i = 0; i < N; i++) begin
      int r = $urandom_range(0, 3);
      if (r == 0) begin
        logic [W-1:0] v = W'($urandom);
        push_field(stream, 1, 1);
        push_field(stream, v, W);
        exp_slice.push_back(v); exp_kind.push_back(BM_RAW); n_raw++;
      end else if (r == 1) begin
        int idx = $urandom_range(0, DEPTH - 1);
        push_field(stream, 2'b01, 2);
        push_field(stream, idx, 4);
        exp_slice.push_back(dict[idx]); exp_kind.push_back(BM_DIRECT); n_direct++;
      end else begin
        int idx = $urandom_range(0, DEPTH - 1);
        int nm = r - 1;                       // 1 or 2 masks
        longint unsigned m = 0;
        push_field(stream, 2'b00, 2);
        push_field(stream, nm - 1, 1);
        for (int k = 0; k < nm; k++) begin
          bit t = $urandom_range(0, 1);
          int loc = t ? $urandom_range(0, W / FMW - 1) : $urandom_range(0, W - 1);
          longint unsigned pat = t ? $urandom_range(0, 15) : $urandom_range(0, 3);
          push_field(stream, t, 1);
          push_field(stream, loc, t ? 2 : 4);
          push_field(stream, pat, t ? FMW : SMW);
          m |= bm_mask_word(t, loc, pat, W, SMW, FMW);
          if (t) n_fixed++; else n_slide++;
        end
        push_field(stream, idx, 4);
        exp_slice.push_back(dict[idx] ^ W'(m)); exp_kind.push_back(BM_MASKED);
        if (nm == 1) n_one++; else n_two++;
      end
    end
  endtask

  task automatic feed();
    int i = 0;
    while (i < stream.size()) begin
      bit hs;
      @(negedge clk);
      in_valid = ($urandom_range(0, 99) >= gap_pct);
      in_bit   = stream[i];
      #1 hs = in_valid && in_ready;
      @(posedge clk);
      if (hs) i++;
    end
    @(negedge clk);
    in_valid = 0;
    feeding_done = 1;
  endtask

  always @(posedge clk) begin
    if (rst_n && slice_valid && slice_ready) begin
      checks++;
      if (got >= exp_slice.size() || slice !== exp_slice[got] || slice_kind != exp_kind[got]) begin
        failures++;
        $display("slice %0d: got %h/%0d expected %h/%0d", got, slice, slice_kind,
                 exp_slice[got], exp_kind[got]);
      end
      got <= got + 1;
    end
  end
  always @(negedge clk) slice_ready = ($urandom_range(0, 99) >= stall_pct);

  task automatic run_pass(int gaps, int stalls, bit check_cycles);
    longint t0, cycles;
    foreach (dict[k]) dict[k] = W'($urandom);
    make_stream();
    gap_pct = gaps; stall_pct = stalls;
    got = 0; feeding_done = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    t0 = $time / 10;
    fork
      feed();
    join_none
    while (got < N) @(posedge clk);
    cycles = $time / 10 - t0;
    if (check_cycles) begin
      checks++;
      // +1: the count of taken slices is seen one edge after the last one
      if (cycles != stream.size() + N + 1) begin
        failures++;
        $display("cycles %0d expected %0d", cycles, stream.size() + N + 1);
      end
    end
    $display("pass: %0d slices from %0d bits in %0d cycles", N, stream.size(), cycles);
    wait (feeding_done);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    stall_pct = 0;
    run_pass(0, 0, 1);
    run_pass(30, 30, 0);
    $display("raw %0d direct %0d one-mask %0d two-mask %0d sliding %0d fixed %0d",
             n_raw, n_direct, n_one, n_two, n_slide, n_fixed);
    checks++;
    if (n_raw == 0 || n_direct == 0 || n_one == 0 || n_two == 0 || n_slide == 0 || n_fixed == 0) begin
      failures++;
      $display("a code-word kind never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
