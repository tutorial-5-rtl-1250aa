// lcd_controller_int: CPU-side glue of the LCD controller.
//
// The LCD controller core takes a write strobe and reports a BUSY flag. This
// block passes the CPU write signal wr on as strobe only while the LCD chip
// select cs is high, so that the core sees writes to its own 1K block only.
// On the read side it places BUSY on data bit 0 and zeros on bits 7..1; the
// flag is driven all the time, so no read signal is used and the data-bus
// multiplexer picks this byte when the CPU reads the LCD block.
//
// Interface: cs, wr, busy in; strobe, dout[7:0] out. Purely combinational:
// no clock, zero latency. This follows the tutorial design exactly; only the
// port names are this implementation's.
module lcd_controller_int
  import mem_map_pkg::*;
(
  input  logic              cs,      // LCD chip select from the address decoder
  input  logic              wr,      // CPU data-memory write
  input  logic              busy,    // BUSY flag of the LCD controller core
  output logic              strobe,  // write strobe to the LCD controller core
  output logic [DATA_W-1:0] dout     // read data towards the data-bus multiplexer
);

  always_comb begin
    strobe = cs & wr;
    dout   = '0;
    dout[0] = busy;
  end

endmodule
