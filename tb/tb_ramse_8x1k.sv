// tb_ramse_8x1k: self-checking test of the 1K x 8 RAM with enable.
//
// Keeps a reference copy of the memory in the testbench. Phases:
//  1. fill all 1024 words with en high, then read each back; the word must
//     appear on dout right after the one clock edge that samples the address;
//  2. write every word with en low and we high, which must change nothing;
//  3. random mix of enabled/disabled reads and writes, checking dout after
//     every edge (it must hold its value on edges with en low).
module tb_ramse_8x1k;
  localparam int DEPTH = 1024;

  logic       clk = 0, en, we;
  logic [9:0] addr;
  logic [7:0] din, dout;
  logic [7:0] model [DEPTH];
  logic [7:0] exp_dout;
  int checks = 0, failures = 0;
  int blocked_writes = 0;

  ramse_8x1k dut (.clk, .en, .we, .addr, .din, .dout);

  always #5 clk = ~clk;

  // one bus cycle: drive at the falling edge, compare after the rising edge
  task automatic cycle(input logic e, input logic w, input logic [9:0] a, input logic [7:0] d);
    @(negedge clk);
    en = e; we = w; addr = a; din = d;
    @(posedge clk);
    if (e) begin
      exp_dout = model[a];
      if (w) model[a] = d;
    end else if (w) blocked_writes++;
    #1;
    checks++;
    if (dout !== exp_dout) begin
      failures++;
      $display("FAIL t=%0t en=%b we=%b addr=%h: dout=%h want %h", $time, e, w, a, dout, exp_dout);
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
    en = 0; we = 0; addr = '0; din = '0;
    // phase 1: fill, then read back; an enabled write first returns the old word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 10'(i); din = 8'(i * 7 + 3);
      @(posedge clk); model[i] = 8'(i * 7 + 3);
    end
    @(negedge clk); en = 1; we = 0; addr = '0;
    @(posedge clk); exp_dout = model[0];
    for (int i = 0; i < DEPTH; i++) cycle(1'b1, 1'b0, 10'(i), 8'h00);
    // phase 2: write enable alone must not write
    for (int i = 0; i < DEPTH; i++) cycle(1'b0, 1'b1, 10'(i), ~model[i]);
    for (int i = 0; i < DEPTH; i++) cycle(1'b1, 1'b0, 10'(i), 8'h00);
    // phase 3: random traffic
    for (int i = 0; i < 5000; i++)
      cycle(1'($urandom), 1'($urandom), 10'($urandom), 8'($urandom));
    checks++;
    if (blocked_writes == 0) begin failures++; $display("FAIL no write with en low was tried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
