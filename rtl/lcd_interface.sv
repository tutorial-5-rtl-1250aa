// lcd_interface: the LCD sheet of the design, without the LCD controller core.
//
// The sheet connects the CPU data bus to a 16x2 character-LCD controller core.
// The core takes a data byte, a 4-bit character address and a line select,
// latches them on a write strobe and reports BUSY while it is working. This
// module holds the CPU-side glue (lcd_controller_int): the strobe is the CPU
// write gated by the LCD chip select, and the read byte carries BUSY in bit 0.
// The CPU address bits 3..0 become the character address and bit 4 the line;
// the CPU write data goes to the core unchanged.
//
// The controller core itself, which drives the LCD pins, is not part of this
// RTL: its inputs leave this module as core_* outputs and its BUSY flag comes
// in as core_busy. The wiring follows the tutorial design; the port names are
// this implementation's.
//
// Interface: di[7:0], a[4:0], cs, wr, core_busy in; dout[7:0], core_data[7:0],
// core_addr[3:0], core_line, core_strobe out. Purely combinational.
module lcd_interface
  import mem_map_pkg::*;
(
  input  logic [DATA_W-1:0] di,           // CPU write data
  input  logic [4:0]        a,            // CPU address bits 4..0
  input  logic              cs,           // LCD chip select
  input  logic              wr,           // CPU data-memory write
  output logic [DATA_W-1:0] dout,         // read data (BUSY in bit 0)
  output logic [DATA_W-1:0] core_data,    // to controller core DATA
  output logic [3:0]        core_addr,    // to controller core ADDR
  output logic              core_line,    // to controller core LINE
  output logic              core_strobe,  // to controller core STROBE
  input  logic              core_busy     // from controller core BUSY
);

  lcd_controller_int u_lcd_controller_int (
    .cs     (cs),
    .wr     (wr),
    .busy   (core_busy),
    .strobe (core_strobe),
    .dout   (dout)
  );

  always_comb begin
    core_data = di;
    core_addr = a[3:0];
    core_line = a[4];
  end

endmodule
