// memory_interface_top: memory interface of a small 8051-class CPU system.
//
// The CPU's data-memory bus (16-bit address, 8-bit data, separate read and
// write data, a write strobe) serves four devices, each in a 1K block:
//   0x0000-0x03FF  LCD interface (write: to the LCD controller; read: BUSY in bit 0)
//   0x8000-0x83FF  MEM1, 1K x 8 RAM
//   0x8400-0x87FF  MEM2, 1K x 8 RAM
//   0x8800-0x8BFF  MEM3, 1K x 8 RAM
// The address decoder turns the six high address bits into one chip select
// per device. Each data RAM takes the low ten address bits, the write data and
// the CPU write signal, and its chip select as enable, so only the selected RAM
// can be written. The data-bus multiplexer, steered by the same selects,
// returns the selected RAM's read word to the CPU, or the LCD byte when no RAM
// is selected. A separate 1K x 8 program RAM sits on the CPU's program bus.
//
// The CPU core, the LCD controller core, the reset generator and the pads are
// outside this RTL: the CPU's bus signals and the LCD controller core's
// signals are the ports of this module.
//
// Timing: all RAMs read synchronously. For a data read the CPU holds the
// address for one rising clock edge; mem_data_i is valid after that edge while
// the address is still held (the multiplexer selects from the current address).
// A write takes effect on the rising edge where mem_wr is high. LCD reads and
// writes are combinational. The structure follows the tutorial design; the
// synchronous read timing is this implementation's choice.
module memory_interface_top
  import mem_map_pkg::*;
(
  input  logic              clk,
  input  logic              rst,            // system reset (kept for the CPU side; RAMs have none)
  // CPU data-memory bus
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic [DATA_W-1:0] mem_data_o,     // CPU write data
  output logic [DATA_W-1:0] mem_data_i,     // CPU read data
  input  logic              mem_wr,
  input  logic              mem_rd,         // not needed by any device: reads have no side effect
  // CPU program-memory bus
  input  logic [9:0]        rom_addr,
  input  logic [DATA_W-1:0] rom_data_o,
  output logic [DATA_W-1:0] rom_data_i,
  input  logic              rom_wr,
  // LCD controller core
  output logic [DATA_W-1:0] lcd_core_data,
  output logic [3:0]        lcd_core_addr,
  output logic              lcd_core_line,
  output logic              lcd_core_strobe,
  input  logic              lcd_core_busy,
  // chip selects, brought out for observation
  output chip_sel_t         cs
);

  logic [DATA_W-1:0] lcd_do, mem1_do, mem2_do, mem3_do;

  address_decoder u_address_decoder (
    .addr    (mem_addr),
    .cs_lcd  (cs.lcd),
    .cs_mem1 (cs.mem1),
    .cs_mem2 (cs.mem2),
    .cs_mem3 (cs.mem3)
  );

  lcd_interface u_lcd_interface (
    .di          (mem_data_o),
    .a           (mem_addr[4:0]),
    .cs          (cs.lcd),
    .wr          (mem_wr),
    .dout        (lcd_do),
    .core_data   (lcd_core_data),
    .core_addr   (lcd_core_addr),
    .core_line   (lcd_core_line),
    .core_strobe (lcd_core_strobe),
    .core_busy   (lcd_core_busy)
  );

  ramse_8x1k u_mem1 (
    .clk  (clk),
    .en   (cs.mem1),
    .we   (mem_wr),
    .addr (mem_addr[BLOCK_BITS-1:0]),
    .din  (mem_data_o),
    .dout (mem1_do)
  );

  ramse_8x1k u_mem2 (
    .clk  (clk),
    .en   (cs.mem2),
    .we   (mem_wr),
    .addr (mem_addr[BLOCK_BITS-1:0]),
    .din  (mem_data_o),
    .dout (mem2_do)
  );

  ramse_8x1k u_mem3 (
    .clk  (clk),
    .en   (cs.mem3),
    .we   (mem_wr),
    .addr (mem_addr[BLOCK_BITS-1:0]),
    .din  (mem_data_o),
    .dout (mem3_do)
  );

  data_bus_mux u_data_bus_mux (
    .cs_lcd  (cs.lcd),
    .lcd_do  (lcd_do),
    .cs_mem1 (cs.mem1),
    .mem1_do (mem1_do),
    .cs_mem2 (cs.mem2),
    .mem2_do (mem2_do),
    .cs_mem3 (cs.mem3),
    .mem3_do (mem3_do),
    .dout    (mem_data_i)
  );

  rams_8x1k u_program_mem (
    .clk  (clk),
    .we   (rom_wr),
    .addr (rom_addr),
    .din  (rom_data_o),
    .dout (rom_data_i)
  );

  // The decoder never selects two devices at once.
  a_one_select : assert property (@(posedge clk) disable iff (rst) $onehot0(cs))
    else $error("more than one chip select active at address %h", mem_addr);

  logic unused_rd;
  assign unused_rd = mem_rd;

endmodule
