// tb_memory_interface_top: end-to-end test of the memory interface.
//
// The testbench plays the CPU (bus-functional read and write tasks on the
// data-memory and program-memory buses) and a small model of the LCD
// controller core that raises BUSY for a few clocks after each strobe.
// It runs, at the default sizes:
//  - the memory test program: write an odd-length (255-value) repeating
//    pattern across all 3K of MEM1..MEM3, read it all back and compare;
//  - writes and reads to unmapped addresses (0x0400, 0x8C00, 0xFFFF ...),
//    which must leave every RAM unchanged and read back the LCD byte;
//  - LCD accesses: character writes that must strobe the controller core
//    with the right data, character address and line, and BUSY polls that
//    must see the flag in bit 0 both set and clear;
//  - a program-memory load and fetch on the program bus.
// Each mechanism is counted; one that never happened counts as a failure.
// A data read takes one clock (address held over one rising edge), a write
// one clock; both are checked cycle by cycle.
module tb_memory_interface_top;
  import mem_map_pkg::*;

  logic              clk = 0, rst;
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] mem_data_o, mem_data_i;
  logic              mem_wr, mem_rd;
  logic [9:0]        rom_addr;
  logic [DATA_W-1:0] rom_data_o, rom_data_i;
  logic              rom_wr;
  logic [DATA_W-1:0] lcd_core_data;
  logic [3:0]        lcd_core_addr;
  logic              lcd_core_line, lcd_core_strobe, lcd_core_busy;
  chip_sel_t         cs;

  memory_interface_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] ref_mem [3][1024];   // reference copy of MEM1..MEM3
  logic [7:0] ref_rom [1024];

  // mechanism counters
  int n_wr[3], n_rd[3];
  int n_unmapped_wr = 0, n_unmapped_rd = 0;
  int n_lcd_strobe = 0, n_busy_hi = 0, n_busy_lo = 0;
  int n_rom_wr = 0, n_rom_rd = 0;

  // LCD controller core model: latches on the strobe, busy for 4 clocks
  logic [7:0] lcd_last_data;
  logic [3:0] lcd_last_addr;
  logic       lcd_last_line;
  int         busy_cnt = 0;
  assign lcd_core_busy = (busy_cnt != 0);
  always @(posedge clk) begin
    if (lcd_core_strobe) begin
      lcd_last_data <= lcd_core_data;
      lcd_last_addr <= lcd_core_addr;
      lcd_last_line <= lcd_core_line;
      busy_cnt      <= 4;
      n_lcd_strobe++;
    end else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  // which RAM owns an address, -1 for none (worked out from ranges)
  function automatic int ram_of(input logic [15:0] a);
    if (a >= 16'h8000 && a <= 16'h83FF) return 0;
    if (a >= 16'h8400 && a <= 16'h87FF) return 1;
    if (a >= 16'h8800 && a <= 16'h8BFF) return 2;
    return -1;
  endfunction

  task automatic bus_write(input logic [15:0] a, input logic [7:0] d);
    int r;
    @(negedge clk);
    mem_addr = a; mem_data_o = d; mem_wr = 1; mem_rd = 0;
    #1;
    checks++;
    if (lcd_core_strobe !== (a <= 16'h03FF)) fail($sformatf("strobe=%b for write to %h", lcd_core_strobe, a));
    @(posedge clk);
    r = ram_of(a);
    if (r >= 0) begin ref_mem[r][a[9:0]] = d; n_wr[r]++; end
    else if (a > 16'h03FF) n_unmapped_wr++;
    @(negedge clk);
    mem_wr = 0;
  endtask

  task automatic bus_read(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk);
    mem_addr = a; mem_wr = 0; mem_rd = 1;
    @(posedge clk);
    #1;
    d = mem_data_i;
    @(negedge clk);
    mem_rd = 0;
  endtask

  task automatic check_read(input logic [15:0] a);
    logic [7:0] got, want;
    int r;
    r = ram_of(a);
    bus_read(a, got);
    if (r >= 0) begin want = ref_mem[r][a[9:0]]; n_rd[r]++; end
    else begin
      want = {7'b0, lcd_core_busy};  // no RAM selected: the LCD byte
      if (a > 16'h03FF) n_unmapped_rd++;
    end
    checks++;
    if (got !== want) fail($sformatf("read %h = %h, want %h", a, got, want));
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] got;
    int k;
    static logic [15:0] unmapped[] = '{16'h0400, 16'h7FFF, 16'h8C00, 16'h8FFF, 16'hC000, 16'hFFFF};
    foreach (n_wr[i]) begin n_wr[i] = 0; n_rd[i] = 0; end
    rst = 1; mem_addr = 16'hFFFF; mem_data_o = 0; mem_wr = 0; mem_rd = 0;
    rom_addr = 0; rom_data_o = 0; rom_wr = 0;
    repeat (3) @(posedge clk);
    rst = 0;

    // --- memory test program: odd-length pattern over 0x8000-0x8BFF ---
    k = 0;
    for (int a = 32'h8000; a <= 32'h8BFF; a++) begin
      bus_write(16'(a), 8'(k % 255));
      k++;
    end
    k = 0;
    for (int a = 32'h8000; a <= 32'h8BFF; a++) begin
      bus_read(16'(a), got);
      checks++;
      if (got !== 8'(k % 255)) fail($sformatf("pattern read %h = %h, want %h", a, got, 8'(k % 255)));
      n_rd[ram_of(16'(a))]++;
      k++;
    end

    // --- one-clock read latency: the new word is there right after one edge ---
    @(negedge clk); mem_addr = 16'h8401; mem_rd = 1;
    @(posedge clk); #1;
    checks++;
    if (mem_data_i !== ref_mem[1][1]) fail("read data not valid one clock after the address");

    // --- unmapped writes must not touch any RAM ---
    foreach (unmapped[i]) bus_write(unmapped[i], 8'hA5 ^ 8'(i));
    for (int a = 32'h8000; a <= 32'h8BFF; a += 32'h0100) check_read(16'(a));
    foreach (unmapped[i]) check_read(unmapped[i]);
    for (int a = 32'h8000; a <= 32'h8BFF; a++) check_read(16'(a));

    // --- LCD: write characters, poll BUSY ---
    for (int c = 0; c < 8; c++) begin
      logic [15:0] la;
      la = 16'(c * 5 % 32);
      bus_write(la, 8'h41 + 8'(c));
      checks++;
      if (lcd_last_data !== 8'h41 + 8'(c) || lcd_last_addr !== la[3:0] || lcd_last_line !== la[4])
        fail($sformatf("LCD core got %h/%h/%b", lcd_last_data, lcd_last_addr, lcd_last_line));
      // poll until not busy; the first poll sees BUSY set
      for (int p = 0; p < 10; p++) begin
        bus_read(16'h0000, got);
        checks++;
        if (got !== {7'b0, lcd_core_busy}) fail($sformatf("BUSY poll got %h", got));
        if (got[0]) n_busy_hi++;
        else begin n_busy_lo++; break; end
      end
    end
    // memory writes must not disturb the LCD
    k = n_lcd_strobe;
    bus_write(16'h8800, 8'h5C);
    check_read(16'h8800);
    checks++;
    if (n_lcd_strobe != k) fail("memory write strobed the LCD");

    // --- random traffic across the whole address space ---
    for (int i = 0; i < 4000; i++) begin
      logic [15:0] a;
      a = ($urandom_range(0, 3) != 0) ? (16'h8000 | 16'($urandom_range(0, 16'h0FFF))) : 16'($urandom);
      if (a <= 16'h03FF) a = a | 16'h0400;  // keep the LCD model out of this phase
      if ($urandom_range(0, 1) != 0) bus_write(a, 8'($urandom));
      else check_read(a);
    end

    // --- program memory: load then fetch ---
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); rom_wr = 1; rom_addr = 10'(i); rom_data_o = 8'(i * 13 + 1);
      @(posedge clk); ref_rom[i] = 8'(i * 13 + 1); n_rom_wr++;
    end
    @(negedge clk); rom_wr = 0;
    for (int i = 1023; i >= 0; i--) begin
      @(negedge clk); rom_addr = 10'(i);
      @(posedge clk); #1;
      checks++; n_rom_rd++;
      if (rom_data_i !== ref_rom[i]) fail($sformatf("program word %0d = %h", i, rom_data_i));
    end

    // --- every mechanism must have happened ---
    foreach (n_wr[i]) begin
      checks += 2;
      if (n_wr[i] == 0) fail($sformatf("MEM%0d never written", i + 1));
      if (n_rd[i] == 0) fail($sformatf("MEM%0d never read", i + 1));
    end
    checks += 7;
    if (n_unmapped_wr == 0) fail("no unmapped write");
    if (n_unmapped_rd == 0) fail("no unmapped read");
    if (n_lcd_strobe == 0)  fail("no LCD strobe");
    if (n_busy_hi == 0)     fail("BUSY never seen set");
    if (n_busy_lo == 0)     fail("BUSY never seen clear");
    if (n_rom_wr == 0)      fail("program memory never written");
    if (n_rom_rd == 0)      fail("program memory never read");
    $display("writes MEM1/2/3 %0d/%0d/%0d reads %0d/%0d/%0d unmapped wr/rd %0d/%0d",
             n_wr[0], n_wr[1], n_wr[2], n_rd[0], n_rd[1], n_rd[2], n_unmapped_wr, n_unmapped_rd);
    $display("LCD strobes %0d busy set/clear %0d/%0d program wr/rd %0d/%0d",
             n_lcd_strobe, n_busy_hi, n_busy_lo, n_rom_wr, n_rom_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
