// tb_rams_8x1k: self-checking test of the 1K x 8 program RAM.
//
// Loads all 1024 words (as a program loader would), reads them back with a
// check that each word appears one clock after its address, then runs random
// reads and writes against a reference copy of the memory.
module tb_rams_8x1k;
  localparam int DEPTH = 1024;

  logic       clk = 0, we;
  logic [9:0] addr;
  logic [7:0] din, dout;
  logic [7:0] model [DEPTH];
  logic [7:0] exp_dout;
  int checks = 0, failures = 0;

  rams_8x1k dut (.clk, .we, .addr, .din, .dout);

  always #5 clk = ~clk;

  task automatic cycle(input logic w, input logic [9:0] a, input logic [7:0] d);
    @(negedge clk);
    we = w; addr = a; din = d;
    @(posedge clk);
    exp_dout = model[a];
    if (w) model[a] = d;
    #1;
    checks++;
    if (dout !== exp_dout) begin
      failures++;
      $display("FAIL t=%0t we=%b addr=%h: dout=%h want %h", $time, w, a, dout, exp_dout);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = '0; din = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; addr = 10'(i); din = 8'(i ^ (i >> 3) ^ 8'h5A);
      @(posedge clk); model[i] = 8'(i ^ (i >> 3) ^ 8'h5A);
    end
    for (int i = 0; i < DEPTH; i++) cycle(1'b0, 10'(i), 8'h00);
    for (int i = 0; i < 5000; i++) cycle(1'($urandom), 10'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
