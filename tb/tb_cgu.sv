// tb_cgu: self-checking test of the control and generation unit.
//
// Runs twice (chain_len 5 x 3 vectors, then 1 x 4) with a random slice
// supply. Checks that every accepted slice appears on scan_in with scan_shift,
// that scan_capture is high for exactly one cycle immediately after every
// chain_len-th shift and never otherwise, that no slice is taken during
// capture, that decomp_clear pulses on start and that done follows the last
// capture.
module tb_cgu;
  import tdc_pkg::*;

  localparam int W = 16, CW = 16;

  logic          clk = 0, rst_n = 0, start = 0;
  logic [CW-1:0] chain_len = '0, num_vectors = '0;
  logic [W-1:0]  slice = '0;
  logic          slice_valid = 0, slice_ready;
  logic [W-1:0]  scan_in;
  logic          scan_shift, scan_capture, decomp_clear, busy, done;

  int checks = 0, failures = 0;

  cgu #(.W(W), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  shifts, captures, since_capture;
  bit  prev_shift_ends_vector;
  logic [W-1:0] next_val;

  // scoreboard: scan_in must carry the slices in the order offered
  always @(posedge clk) if (rst_n) begin
    if (scan_capture) begin
      checks++;
      if (!prev_shift_ends_vector || slice_ready) begin
        failures++;
        $display("capture at a wrong time");
      end
      captures++;
    end else if (prev_shift_ends_vector) begin
      checks++; failures++;
      $display("missing capture after shift %0d", shifts);
    end
    prev_shift_ends_vector = 0;
    if (scan_shift) begin
      checks++;
      if (scan_in !== slice || scan_in !== next_val) begin
        failures++;
        $display("shift %0d: scan_in %h expected %h", shifts, scan_in, next_val);
      end
      shifts++;
      since_capture++;
      if (since_capture == int'(chain_len)) begin
        prev_shift_ends_vector = 1;
        since_capture = 0;
      end
    end
  end

  task automatic run(int cl, int nv);
    int clears = 0;
    shifts = 0; captures = 0; since_capture = 0;
    @(negedge clk);
    chain_len = CW'(cl); num_vectors = CW'(nv);
    start = 1;
    #1 clears = decomp_clear;
    @(negedge clk);
    start = 0;
    checks++;
    if (clears != 1 || !busy) begin failures++; $display("start did not clear/begin"); end
    while (!done) begin
      bit hs;
      slice_valid = ($urandom_range(0, 99) < 70);
      if (slice_valid) slice = next_val;
      #1 hs = slice_valid && slice_ready;
      @(negedge clk);
      if (hs) next_val = W'($urandom);
    end
    slice_valid = 0;
    checks += 2;
    if (shifts != cl * nv) begin failures++; $display("shifts %0d expected %0d", shifts, cl * nv); end
    if (captures != nv) begin failures++; $display("captures %0d expected %0d", captures, nv); end
    repeat (3) @(negedge clk);
    checks++;
    if (!done || busy || slice_ready) begin failures++; $display("not idle after done"); end
  endtask

  initial begin
    next_val = W'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(5, 3);
    run(1, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
