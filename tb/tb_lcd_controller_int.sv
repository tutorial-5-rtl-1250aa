// tb_lcd_controller_int: self-checking test of the LCD controller glue.
//
// First replays the bus sequence of a typical access (BUSY read, write, BUSY
// read again with the flag now set, deselect) and then sweeps all eight
// combinations of cs, wr and busy. Expected values: strobe is high exactly
// when cs and wr are both high; the read byte is 0000000 followed by busy.
module tb_lcd_controller_int;
  import mem_map_pkg::*;

  logic              cs, wr, busy, strobe;
  logic [DATA_W-1:0] dout;
  int checks = 0, failures = 0;

  lcd_controller_int dut (.cs, .wr, .busy, .strobe, .dout);

  task automatic check(input string what);
    logic              exp_strobe;
    logic [DATA_W-1:0] exp_dout;
    exp_strobe = (cs == 1'b1) && (wr == 1'b1);
    exp_dout   = busy ? 8'h01 : 8'h00;
    checks++;
    if (strobe !== exp_strobe || dout !== exp_dout) begin
      failures++;
      $display("FAIL %s: cs=%b wr=%b busy=%b -> strobe=%b dout=%h (want %b %h)",
               what, cs, wr, busy, strobe, dout, exp_strobe, exp_dout);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // access sequence, times in ns
    cs = 0; wr = 0; busy = 0; #100; check("idle");
    cs = 1; #150; check("busy read");
    #300; check("busy read end");
    wr = 1; #1; check("write strobe on");
    if (strobe !== 1'b1) begin failures++; $display("FAIL strobe not raised"); end
    #199; check("write strobe held");
    wr = 0; busy = 1; #1; check("strobe off, busy set");
    if (dout !== 8'h01) begin failures++; $display("FAIL busy not on bit 0"); end
    #349; check("busy read again");
    cs = 0; #1; check("deselected");
    wr = 1; #1; check("write while deselected");
    if (strobe !== 1'b0) begin failures++; $display("FAIL strobe without cs"); end
    // sweep all combinations
    for (int i = 0; i < 8; i++) begin
      {cs, wr, busy} = 3'(i);
      #10; check("sweep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
