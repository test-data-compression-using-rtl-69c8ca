// tb_tdc_decompressor: end-to-end test of the decompressor at its default
// parameters (8-bit PRL segments, K=3, 16 scan chains, 16-entry dictionary).
//
// Five test sets are run one after the other, sized like the benchmark test
// sets s5378, s9234, s13207, s15850 and s35932 (scan cells x vectors:
// 214x97, 247x105, 700x233, 611x94, 1763x12). The cells are spread over the
// 16 chains, so a vector is ceil(cells/16) slices. The slice contents are
// synthetic: for every slice the testbench draws how it is coded
// (dictionary hit, hit with one or two masks, or uncompressed: all zeros, all
// ones, a repeating pattern or random bits) and builds the slice to match.
// The slices are bitmask-dictionary coded, cut into 8-bit segments and 2^n
// PRL coded with the reference encoders; the tester side loads the dictionary,
// starts the unit and sends the stream, and the scan side checks every slice,
// every capture position, and done.
//
// Mechanisms that must each occur at least once: every bitmask code-word kind
// and mask type, every PRL code-word kind (external S=0/S=1, runs longer than
// one segment, internal S=0/S=1, exception), capture cycles,
// backpressure to the tester, and a restart of the unit.
// The first run is fed at full rate and its cycle count is bounded: at least
// one cycle per compressed bit, at most one more per segment, slice and
// capture.
module tb_tdc_decompressor;
  import tdc_pkg::*;
  import tb_codec_pkg::*;

  localparam int L = PRL_SEG_LEN, K = PRL_EXP_W, W = SLICE_W, DEPTH = DICT_DEPTH;
  localparam int SMW = SMASK_W, FMW = FMASK_W, CW = CNT_W;
  localparam int NSETS = 5;
  localparam string SET_NAME [NSETS] = '{"s5378", "s9234", "s13207", "s15850", "s35932"};
  localparam int    SET_CELLS[NSETS] = '{214, 247, 700, 611, 1763};
  localparam int    SET_VECS [NSETS] = '{97, 105, 233, 94, 12};

  logic          clk = 0, rst_n = 0;
  logic          start = 0;
  logic [CW-1:0] chain_len = '0, num_vectors = '0;
  logic          busy, done;
  logic          dict_we = 0;
  logic [3:0]    dict_waddr = '0;
  logic [W-1:0]  dict_wdata = '0;
  logic          ate_bit = 0, ate_valid = 0, ate_ready;
  logic [W-1:0]  scan_in;
  logic          scan_shift, scan_capture;

  int checks = 0, failures = 0;

  tdc_decompressor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0]    dict[DEPTH];
  logic [W-1:0]    exp_slice[$];
  bit              bm_stream[$];
  longint unsigned segs[$];
  bit              ate_stream[$];
  prl_stats_t      st;

  // mechanism counters
  int n_raw, n_direct, n_one, n_two, n_slide, n_fixed;
  int n_ext_pos, n_ext_neg, n_ext_long, n_int_pos, n_int_neg, n_exc;
  int captures_total, n_ate_stall, n_runs;

  // scan-side scoreboard
  int  got, since_capture, captures;
  bit  capture_due;
  int  gap_pct;

  always @(posedge clk) if (rst_n) begin
    if (scan_capture) begin
      checks++;
      if (!capture_due) begin failures++; $display("unexpected capture after slice %0d", got); end
      captures++;
      captures_total++;
      
    end else if (capture_due) begin
      checks++; failures++;
      $display("missing capture after slice %0d", got);
    end
    capture_due = 0;
    if (ate_valid && !ate_ready) n_ate_stall++;
    if (scan_shift) begin
      checks++;
      if (got >= exp_slice.size() || scan_in !== exp_slice[got]) begin
        failures++;
        if (failures < 20)
          $display("slice %0d: scan_in %h expected %h", got, scan_in,
                   (got < exp_slice.size()) ? exp_slice[got] : '0);
      end
      got++;
      since_capture++;
      if (since_capture == int'(chain_len)) begin
        capture_due = 1;
        since_capture = 0;
      end
    end
  end

  // draws one slice and appends its bitmask-dictionary code word
  task automatic add_slice();
    int r = $urandom_range(0, 99);
    logic [W-1:0] v;
    if (r < 40) begin
      int idx = $urandom_range(0, DEPTH - 1);
      push_field(bm_stream, 2'b01, 2);
      push_field(bm_stream, idx, $clog2(DEPTH));
      v = dict[idx]; n_direct++;
    end else if (r < 65) begin
      int idx = $urandom_range(0, DEPTH - 1);
      int nm = $urandom_range(1, 2);
      longint unsigned m = 0;
      push_field(bm_stream, 2'b00, 2);
      push_field(bm_stream, nm - 1, 1);
      for (int k = 0; k < nm; k++) begin
        bit t = $urandom_range(0, 1);
        int loc = t ? $urandom_range(0, W / FMW - 1) : $urandom_range(0, W - 1);
        longint unsigned pat = t ? $urandom_range(0, (1 << FMW) - 1) : $urandom_range(0, (1 << SMW) - 1);
        push_field(bm_stream, t, 1);
        push_field(bm_stream, loc, t ? $clog2(W / FMW) : $clog2(W));
        push_field(bm_stream, pat, t ? FMW : SMW);
        m |= bm_mask_word(t, loc, pat, W, SMW, FMW);
        if (t) n_fixed++; else n_slide++;
      end
      push_field(bm_stream, idx, $clog2(DEPTH));
      v = dict[idx] ^ W'(m);
      if (nm == 1) n_one++; else n_two++;
    end else begin
      case ($urandom_range(0, 4))
        0, 1:    v = '0;
        2:       v = '1;
        3:       v = {(W / 4){4'($urandom)}};
        default: v = W'($urandom);
      endcase
      push_field(bm_stream, 1, 1);
      push_field(bm_stream, v, W);
      n_raw++;
    end
    exp_slice.push_back(v);
  endtask

  task automatic run_set(int s, bit full_rate);
    int cl = (SET_CELLS[s] + W - 1) / W;
    int nv = SET_VECS[s];
    int nslices = cl * nv;
    int sent;
    longint t0, cycles;
    // dictionary: all zeros, all ones and random words
    for (int a = 0; a < DEPTH; a++)
      dict[a] = (a == 0) ? '0 : (a == 1) ? '1 : W'($urandom);
    exp_slice.delete(); bm_stream.delete(); segs.delete(); ate_stream.delete();
    for (int i = 0; i < nslices; i++) add_slice();
    to_segments(bm_stream, L, segs);
    prl_encode(segs, L, K, ate_stream, st);
    n_ext_pos += st.ext_pos; n_ext_neg += st.ext_neg; n_ext_long += st.ext_long;
    n_int_pos += st.int_pos; n_int_neg += st.int_neg; n_exc += st.exc;

    // tester: load the dictionary, configure, start
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      dict_we = 1; dict_waddr = 4'(a); dict_wdata = dict[a];
    end
    @(negedge clk);
    dict_we = 0;
    chain_len = CW'(cl); num_vectors = CW'(nv);
    got = 0; since_capture = 0; captures = 0; capture_due = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    n_runs++;
    t0 = $time;
    gap_pct = full_rate ? 0 : 10;
    sent = 0;
    while (!done) begin
      bit hs;
      ate_valid = (sent < ate_stream.size()) && ($urandom_range(0, 99) >= gap_pct);
      ate_bit   = (sent < ate_stream.size()) ? ate_stream[sent] : 1'b0;
      #1 hs = ate_valid && ate_ready;
      @(negedge clk);
      if (hs) sent++;
    end
    ate_valid = 0;
    cycles = ($time - t0) / 10;
    checks += 2;
    if (got != nslices) begin failures++; $display("%s: %0d slices expected %0d", SET_NAME[s], got, nslices); end
    if (captures != nv) begin failures++; $display("%s: %0d captures expected %0d", SET_NAME[s], captures, nv); end
    if (full_rate) begin
      checks++;
      if (cycles < sent || cycles > ate_stream.size() + segs.size() + nslices + nv + 16) begin
        failures++;
        $display("%s: %0d cycles outside [%0d, %0d]", SET_NAME[s], cycles, sent,
                 ate_stream.size() + segs.size() + nslices + nv + 16);
      end
    end
    $display("%s: %0d chains x %0d slices x %0d vectors = %0d bits (%0d test data bits); %0d bits after bitmask-dictionary, %0d after 2^n PRL; %0d cycles",
             SET_NAME[s], W, cl, nv, nslices * W, SET_CELLS[s] * nv, bm_stream.size(), ate_stream.size(), cycles);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSETS; s++) run_set(s, s == 0);
    $display("bitmask code words: raw %0d direct %0d one-mask %0d two-mask %0d sliding %0d fixed %0d",
             n_raw, n_direct, n_one, n_two, n_slide, n_fixed);
    $display("PRL code words: ext S=0 %0d ext S=1 %0d long runs %0d int S=0 %0d int S=1 %0d exception %0d",
             n_ext_pos, n_ext_neg, n_ext_long, n_int_pos, n_int_neg, n_exc);
    $display("capture cycles %0d, tester stall cycles %0d, runs %0d", captures_total, n_ate_stall, n_runs);
    checks++;
    if (n_raw == 0 || n_direct == 0 || n_one == 0 || n_two == 0 || n_slide == 0 || n_fixed == 0 ||
        n_ext_pos == 0 || n_ext_neg == 0 || n_ext_long == 0 || n_int_pos == 0 || n_int_neg == 0 ||
        n_exc == 0 || captures_total == 0 || n_ate_stall == 0 || n_runs < 2) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
