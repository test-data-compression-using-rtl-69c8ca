// tb_dict_mem: self-checking test of the dictionary: writes every entry,
// reads all back (combinational read), rewrites a few entries and checks that
// only those changed and that a write is visible from the next cycle.
module tb_dict_mem;
  import tdc_pkg::*;

  localparam int W = 16, DEPTH = 16;

  logic         clk = 0, we = 0;
  logic [3:0]   waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model[DEPTH];

  int checks = 0, failures = 0;

  dict_mem #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int a, logic [W-1:0] d);
    @(negedge clk);
    we = 1; waddr = 4'(a); wdata = d;
    @(negedge clk);
    we = 0;
    model[a] = d;
  endtask

  task automatic check_all();
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 4'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("entry %0d: got %h expected %h", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    @(posedge clk);
    for (int a = 0; a < DEPTH; a++) write(a, W'($urandom));
    check_all();
    for (int k = 0; k < 5; k++) write($urandom_range(0, DEPTH - 1), W'($urandom));
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
