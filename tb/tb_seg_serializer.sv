// tb_seg_serializer: self-checking test of the segment-to-bit serializer.
//
// Pass 1 offers 200 random segments back to back with the bit consumer always
// ready and checks every bit (MSB first) and that 8 bits per segment leave
// with no bubble: 200*8 bits in 200*8 consecutive cycles. Pass 2 adds random gaps on
// both sides and checks the bits again, then checks that clear empties it.
module tb_seg_serializer;
  import tdc_pkg::*;

  localparam int L = 8;
  localparam int N = 200;

  logic         clk = 0, rst_n = 0, clear = 0;
  logic [L-1:0] seg = '0;
  logic         seg_valid = 0, seg_ready;
  logic         bit_out, bit_valid, bit_ready = 0;

  int checks = 0, failures = 0;

  seg_serializer #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [L-1:0] segs[N];
  int nbits;
  int gap_pct;
  longint t_first, t_last;

  always @(posedge clk) begin
    if (rst_n && bit_valid && bit_ready) begin
      logic expb;
      expb = segs[nbits / L][L - 1 - (nbits % L)];
      checks++;
      if (nbits >= N * L || bit_out !== expb) begin
        failures++;
        $display("bit %0d: got %b expected %b", nbits, bit_out, expb);
      end
      if (nbits == 0) t_first = $time;
      t_last = $time;
      nbits++;
    end
  end

  task automatic run_pass(int gaps, bit check_cycles);
    int i;
    foreach (segs[k]) segs[k] = L'($urandom);
    nbits = 0;
    gap_pct = gaps;
    @(negedge clk);
    i = 0;
    fork
      begin
      while (i < N) begin
        bit hs;
        @(negedge clk);
        seg_valid = ($urandom_range(0, 99) >= gap_pct);
        seg       = segs[i];
        #1 hs = seg_valid && seg_ready;
        @(posedge clk);
        if (hs) i++;
      end
      @(negedge clk);
      seg_valid = 0;
      end
      while (nbits < N * L) begin
        @(negedge clk);
        bit_ready = ($urandom_range(0, 99) >= gap_pct);
        @(posedge clk);
      end
    join
    @(negedge clk);
    seg_valid = 0;
    if (check_cycles) begin
      checks++;
      // first to last bit: one bit per cycle, no bubble between segments
      if ((t_last - t_first) / 10 + 1 != N * L) begin
        failures++;
        $display("bit cycles %0d expected %0d", (t_last - t_first) / 10 + 1, N * L);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run_pass(0, 1);
    run_pass(35, 0);
    // clear drops a half-sent segment
    seg = 8'hA5; seg_valid = 1; bit_ready = 0;
    @(negedge clk);
    seg_valid = 0; clear = 1;
    @(negedge clk);
    clear = 0;
    @(negedge clk);
    checks++;
    if (bit_valid) begin failures++; $display("clear did not empty the serializer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
