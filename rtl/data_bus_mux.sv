// data_bus_mux: returns one device's read data to the CPU.
//
// Four devices drive read data but the CPU has one data input, so a
// multiplexer steered by the chip selects picks the source: MEM1 when its
// select is high, else MEM2, else MEM3, else the LCD interface. The LCD byte
// is the default, so its own select is not needed to steer the choice; it is
// kept as a port to match the other inputs. The priority order and the LCD
// default follow the tutorial design; with the address decoder in front, at
// most one select is high and the order never matters.
//
// Interface: (cs, data) pairs for LCD, MEM1, MEM2, MEM3 in; dout[7:0] out.
// Purely combinational.
module data_bus_mux
  import mem_map_pkg::*;
(
  input  logic              cs_lcd,     // unused for steering: LCD is the default
  input  logic [DATA_W-1:0] lcd_do,
  input  logic              cs_mem1,
  input  logic [DATA_W-1:0] mem1_do,
  input  logic              cs_mem2,
  input  logic [DATA_W-1:0] mem2_do,
  input  logic              cs_mem3,
  input  logic [DATA_W-1:0] mem3_do,
  output logic [DATA_W-1:0] dout
);

  always_comb begin
    if (cs_mem1)      dout = mem1_do;
    else if (cs_mem2) dout = mem2_do;
    else if (cs_mem3) dout = mem3_do;
    else              dout = lcd_do;
  end

  // The LCD select does not steer the choice.
  logic unused_cs_lcd;
  assign unused_cs_lcd = cs_lcd;

endmodule
