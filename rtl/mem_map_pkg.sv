// mem_map_pkg: address map and bus widths shared by the memory interface.
//
// The CPU has a 16-bit data-memory address bus and an 8-bit data bus. Four
// devices share it, each owning one 1K block (ten low address bits inside the
// block, six high bits select the block):
//   LCD interface 0x0000-0x03FF, MEM1 0x8000-0x83FF, MEM2 0x8400-0x87FF,
//   MEM3 0x8800-0x8BFF.
// Every other address selects nothing. The map and the widths follow the
// tutorial design; putting them in one package is this implementation's choice.
package mem_map_pkg;

  localparam int unsigned ADDR_W     = 16;  // CPU data-memory address width
  localparam int unsigned DATA_W     = 8;   // CPU data bus width
  localparam int unsigned BLOCK_BITS = 10;  // 1K block: low address bits

  localparam logic [ADDR_W-1:0] LCD_BASE  = 16'h0000;
  localparam logic [ADDR_W-1:0] MEM1_BASE = 16'h8000;
  localparam logic [ADDR_W-1:0] MEM2_BASE = 16'h8400;
  localparam logic [ADDR_W-1:0] MEM3_BASE = 16'h8800;

  // Chip selects, active high, one per device.
  typedef struct packed {
    logic lcd;
    logic mem1;
    logic mem2;
    logic mem3;
  } chip_sel_t;

endpackage
