// tb_data_bus_mux: self-checking test of the read-data multiplexer.
//
// Replays the select-one-at-a-time sequence with source bytes 00/11/22/33
// (expected output 00 00 11 00 22 00 33 00), then drives random data and
// random select patterns, including several selects at once, and compares
// with the priority order MEM1 > MEM2 > MEM3 > LCD.
module tb_data_bus_mux;
  import mem_map_pkg::*;

  logic              cs_lcd, cs_mem1, cs_mem2, cs_mem3;
  logic [DATA_W-1:0] lcd_do, mem1_do, mem2_do, mem3_do, dout;
  int checks = 0, failures = 0;

  data_bus_mux dut (.cs_lcd, .lcd_do, .cs_mem1, .mem1_do, .cs_mem2, .mem2_do,
                    .cs_mem3, .mem3_do, .dout);

  task automatic expect_out(input logic [7:0] want, input string what);
    #50;
    checks++;
    if (dout !== want) begin
      failures++;
      $display("FAIL %s: dout=%h want %h", what, dout, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] want;
    cs_lcd = 0; lcd_do = 8'h00;
    cs_mem1 = 0; mem1_do = 8'h11;
    cs_mem2 = 0; mem2_do = 8'h22;
    cs_mem3 = 0; mem3_do = 8'h33;
    expect_out(8'h00, "none");
    cs_lcd = 1;  expect_out(8'h00, "lcd");  cs_lcd = 0;  expect_out(8'h00, "none");
    cs_mem1 = 1; expect_out(8'h11, "mem1"); cs_mem1 = 0; expect_out(8'h00, "none");
    cs_mem2 = 1; expect_out(8'h22, "mem2"); cs_mem2 = 0; expect_out(8'h00, "none");
    cs_mem3 = 1; expect_out(8'h33, "mem3"); cs_mem3 = 0; expect_out(8'h00, "none");
    for (int i = 0; i < 2000; i++) begin
      {cs_lcd, cs_mem1, cs_mem2, cs_mem3} = 4'($urandom);
      lcd_do = 8'($urandom); mem1_do = 8'($urandom);
      mem2_do = 8'($urandom); mem3_do = 8'($urandom);
      case (1'b1)
        cs_mem1: want = mem1_do;
        cs_mem2: want = mem2_do;
        cs_mem3: want = mem3_do;
        default: want = lcd_do;
      endcase
      expect_out(want, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
