// tb_address_decoder: self-checking test of the 16-bit address decoder.
//
// Drives the boundary addresses of every block (start, end, just outside),
// then 4000 random addresses. The expected selects come from plain range
// comparisons on the full address, independent of the decoder's bit slicing:
// LCD 0x0000-0x03FF, MEM1 0x8000-0x83FF, MEM2 0x8400-0x87FF, MEM3 0x8800-0x8BFF.
module tb_address_decoder;
  import mem_map_pkg::*;

  logic [ADDR_W-1:0] addr;
  logic cs_lcd, cs_mem1, cs_mem2, cs_mem3;
  int checks = 0, failures = 0;
  int hits[4] = '{0, 0, 0, 0};

  address_decoder dut (.addr, .cs_lcd, .cs_mem1, .cs_mem2, .cs_mem3);

  function automatic logic [3:0] expected(input int unsigned a);
    expected[3] = (a <= 32'h03FF);
    expected[2] = (a >= 32'h8000) && (a <= 32'h83FF);
    expected[1] = (a >= 32'h8400) && (a <= 32'h87FF);
    expected[0] = (a >= 32'h8800) && (a <= 32'h8BFF);
  endfunction

  task automatic apply(input logic [15:0] a);
    logic [3:0] e;
    addr = a;
    #50;
    e = expected(32'(a));
    checks++;
    if ({cs_lcd, cs_mem1, cs_mem2, cs_mem3} !== e) begin
      failures++;
      $display("FAIL addr=%h: lcd/mem1/mem2/mem3=%b%b%b%b want %b",
               a, cs_lcd, cs_mem1, cs_mem2, cs_mem3, e);
    end
    if (cs_lcd)  hits[0]++;
    if (cs_mem1) hits[1]++;
    if (cs_mem2) hits[2]++;
    if (cs_mem3) hits[3]++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [15:0] edges[] = '{16'hFFFF, 16'h0000, 16'h03FF, 16'h0400, 16'h7FFF,
                                    16'h8000, 16'h83FF, 16'h8400, 16'h87FF, 16'h8800,
                                    16'h8BFF, 16'h8C00, 16'h1234, 16'hC000};
    foreach (edges[i]) apply(edges[i]);
    for (int i = 0; i < 4000; i++) begin
      // bias half of the addresses into 0x8000-0x8FFF, around the RAM blocks
      if (i % 2 == 0) apply(16'($urandom));
      else            apply(16'h8000 | 16'($urandom_range(0, 16'h0FFF)));
    end
    foreach (hits[i]) begin
      checks++;
      if (hits[i] == 0) begin failures++; $display("FAIL select %0d never raised", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
