// address_decoder: chip selects for the four devices on the CPU data bus.
//
// The six high bits of the 16-bit address name a 1K block. Block 0x0000 selects
// the LCD interface; blocks 0x8000, 0x8400 and 0x8800 select MEM1, MEM2 and
// MEM3. At most one select is high; an address outside the four blocks
// (for example 0x0400 or 0x8C00) selects nothing.
//
// Interface: addr[15:0] in; cs_lcd, cs_mem1, cs_mem2, cs_mem3 out, active high.
// Purely combinational. The map and the block size follow the tutorial design;
// the parameters, which let the same decoder serve another map, are this
// implementation's.
module address_decoder
  import mem_map_pkg::*;
#(
  parameter int unsigned       AW    = ADDR_W,      // address width
  parameter int unsigned       BB    = BLOCK_BITS,  // bits inside one block
  parameter logic [ADDR_W-1:0] LCD_A  = LCD_BASE,
  parameter logic [ADDR_W-1:0] MEM1_A = MEM1_BASE,
  parameter logic [ADDR_W-1:0] MEM2_A = MEM2_BASE,
  parameter logic [ADDR_W-1:0] MEM3_A = MEM3_BASE
) (
  input  logic [AW-1:0] addr,
  output logic          cs_lcd,
  output logic          cs_mem1,
  output logic          cs_mem2,
  output logic          cs_mem3
);

  logic [AW-BB-1:0] blk;

  always_comb begin
    blk     = addr[AW-1:BB];
    cs_lcd  = (blk == LCD_A[AW-1:BB]);
    cs_mem1 = (blk == MEM1_A[AW-1:BB]);
    cs_mem2 = (blk == MEM2_A[AW-1:BB]);
    cs_mem3 = (blk == MEM3_A[AW-1:BB]);
  end

endmodule
