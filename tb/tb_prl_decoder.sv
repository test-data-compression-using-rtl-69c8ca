// tb_prl_decoder: self-checking test of the 2^n PRL decoder (L=8, K=3).
//
// Builds a segment sequence rich in the structures the code exploits (repeats
// of the reference, inverted repeats, internal patterns with and without
// inversion, random segments), encodes it with the reference encoder and
// checks that the decoder returns the same segments in order. Pass 1 runs at
// full rate and checks the cycle count: one cycle per code-word bit plus one
// per segment. Pass 2 repeats with random gaps on the input and random
// backpressure on the output. Every code-word kind must appear.
module tb_prl_decoder;
  import tdc_pkg::*;
  import tb_codec_pkg::*;

  localparam int L = 8;
  localparam int K = 3;
  localparam int N = 600;

  logic         clk = 0, rst_n = 0, clear = 0;
  logic         in_bit = 0, in_valid = 0, in_ready;
  logic [L-1:0] seg;
  logic         seg_valid, seg_ready = 0;
  prl_kind_e    seg_kind;

  int checks = 0, failures = 0;

  prl_decoder #(.L(L), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned segs[$];
  bit              stream[$];
  prl_stats_t      st;
  int              got;
  int              kind_seen[3];
  int              gap_pct, stall_pct;
  bit              feeding_done;

  task automatic make_segments();
    longint unsigned last = 0;
    segs.delete();
    for (int i = 0; i < N; i++) begin
      int r = $urandom_range(0, 9);
      longint unsigned v;
      case (r)
        0, 1, 2: v = last;
        3:       v = ~last & 8'hFF;
        4, 5:    begin
                   int m = $urandom_range(1, 3);
                   v = prl_internal_expand($urandom, m, $urandom_range(0, 1), L);
                 end
        default: v = $urandom & 8'hFF;
      endcase
      segs.push_back(v);
      last = v;
    end
  endtask

  // feed the stream; gap_pct percent of cycles have no valid bit
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
    if (rst_n && seg_valid && seg_ready) begin
      checks++;
      if (got >= segs.size() || seg != L'(segs[got])) begin
        failures++;
        $display("segment %0d: got %h expected %h", got, seg, (got < segs.size()) ? segs[got] : 0);
      end
      kind_seen[int'(seg_kind)]++;
      got <= got + 1;
    end
  end
  always @(negedge clk) seg_ready = ($urandom_range(0, 99) >= stall_pct);

  task automatic run_pass(int gaps, int stalls, bit check_cycles);
    longint t0, cycles;
    make_segments();
    stream.delete();
    prl_encode(segs, L, K, stream, st);
    gap_pct = gaps; stall_pct = stalls;
    got = 0; feeding_done = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    t0 = $time / 10;
    fork
      feed();
    join_none
    while (got < segs.size()) @(posedge clk);
    cycles = $time / 10 - t0;
    checks++;
    if (got != segs.size()) failures++;
    if (check_cycles) begin
      checks++;
      // +1: the count of taken segments is seen one edge after the last one
      if (cycles != stream.size() + segs.size() + 1) begin
        failures++;
        $display("cycles %0d expected %0d", cycles, stream.size() + segs.size() + 1);
      end
    end
    $display("pass: %0d segments, %0d bits, %0d cycles; ext+ %0d ext- %0d int+ %0d int- %0d exc %0d",
             segs.size(), stream.size(), cycles, st.ext_pos, st.ext_neg, st.int_pos, st.int_neg, st.exc);
    checks += 5;
    if (st.ext_pos == 0 || st.ext_neg == 0 || st.int_pos == 0 || st.int_neg == 0 || st.exc == 0 || st.ext_long == 0) begin
      failures++;
      $display("a code-word kind never occurred");
    end
    wait (feeding_done);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    stall_pct = 0;
    @(posedge clk);
    run_pass(0, 0, 1);
    run_pass(30, 30, 0);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (kind_seen[k] == 0) begin failures++; $display("kind %0d never decoded", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
