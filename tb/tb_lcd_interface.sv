// tb_lcd_interface: self-checking test of the LCD sheet glue.
//
// Drives random CPU data, address bits, chip select, write and BUSY, and
// checks that the controller core receives the data byte unchanged, address
// bits 3..0 as character address, bit 4 as line, a strobe only for a selected
// write, and that the read byte is BUSY in bit 0 with zeros above.
module tb_lcd_interface;
  import mem_map_pkg::*;

  logic [7:0] di, dout, core_data;
  logic [4:0] a;
  logic       cs, wr, core_line, core_strobe, core_busy;
  logic [3:0] core_addr;
  int checks = 0, failures = 0, strobes = 0;

  lcd_interface dut (.di, .a, .cs, .wr, .dout, .core_data, .core_addr,
                     .core_line, .core_strobe, .core_busy);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      di = 8'($urandom); a = 5'($urandom); cs = 1'($urandom);
      wr = 1'($urandom); core_busy = 1'($urandom);
      #10;
      checks++;
      if (core_data !== di || core_addr !== a[3:0] || core_line !== a[4] ||
          core_strobe !== (cs && wr) || dout !== {7'b0, core_busy}) begin
        failures++;
        $display("FAIL di=%h a=%b cs=%b wr=%b busy=%b -> data=%h addr=%h line=%b strobe=%b dout=%h",
                 di, a, cs, wr, core_busy, core_data, core_addr, core_line, core_strobe, dout);
      end
      if (core_strobe) strobes++;
    end
    checks++;
    if (strobes == 0) begin failures++; $display("FAIL no strobe seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
