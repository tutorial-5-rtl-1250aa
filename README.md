# Memory interface for a small 8051-class CPU system

An 8-bit microcontroller core has one external data-memory bus: a 16-bit
address, separate 8-bit write and read data, and a write strobe. This design
hangs four devices off that bus — a character-LCD controller and three 1 KB
RAMs — and solves the two problems that come with sharing it:

* **who listens**: an address decoder gives each device its own 1 KB window and
  a chip select, and a device acts on a write only while it is selected;
* **who talks**: every device has its own read-data output, but the CPU has one
  data input, so a multiplexer steered by the same chip selects picks the byte
  that goes back.

A fifth memory, the 1 KB program RAM, sits on the CPU's separate program bus.

```
            mem_addr[15:10]            mem_addr[9:0]        mem_data_o, mem_wr
                  |                          |                     |
          +---------------+     cs.mem1  +--------+                |
          |address_decoder|------------->|  MEM1  |<---------------+
          |               |     cs.mem2  +--------+                |
          |               |------------->|  MEM2  |<---------------+
          |               |     cs.mem3  +--------+                |
          |               |------------->|  MEM3  |<---------------+
          |               |     cs.lcd   +-------------+           |
          |               |------------->|lcd_interface|<----------+
          +---------------+              +-------------+
                  | all four selects         |  4 read bytes
                  v                          v
                 +----------------------------+
                 |        data_bus_mux        |----> mem_data_i
                 +----------------------------+
```

## Address map

| Window          | Device         | Chip select |
|-----------------|----------------|-------------|
| 0x0000 – 0x03FF | LCD interface  | `cs.lcd`    |
| 0x8000 – 0x83FF | MEM1, 1K x 8   | `cs.mem1`   |
| 0x8400 – 0x87FF | MEM2, 1K x 8   | `cs.mem2`   |
| 0x8800 – 0x8BFF | MEM3, 1K x 8   | `cs.mem3`   |
| anything else   | nothing        | none        |

Every window is 1K, so the decoder compares only the six high address bits
(`addr[15:10]`) with the window's base; the ten low bits go straight to the
RAM address inputs. Because the comparison is exact, the windows do not
repeat: 0x0400 or 0x8C00 selects nothing. The bases and the window size are
parameters of `address_decoder` (defaults as in the table) and constants in
`mem_map_pkg`.

At most one select is high at a time. `memory_interface_top` asserts this
(`$onehot0`) on every clock.

## Write path

The CPU's write data and write strobe go to all four devices at once. The chip
select decides which one acts:

* **RAMs.** Each `ramse_8x1k` takes its chip select on the enable input `en`.
  Its write-enable `we` is the shared CPU write, so a RAM is written only on a
  rising clock edge where both `en` and `we` are high. The enable is active
  high. A write to an unmapped address therefore changes nothing, even though
  every RAM sees the same low ten address bits.
* **LCD.** `lcd_controller_int` forms the controller core's `strobe` as
  `cs & wr`. This is combinational: the strobe is high for as long as the CPU
  holds the write to the LCD window. The core receives the write byte as its
  data, address bits 3..0 as the character position and bit 4 as the line
  (top or bottom row of a 16x2 display).

## Read path

`data_bus_mux` returns MEM1's byte if MEM1 is selected, else MEM2's, else
MEM3's, else the LCD byte. The LCD byte is the default, not a selected input.
So a read from an unmapped address also returns the LCD byte. Its own select
input is there only for symmetry. With the decoder in front, the priority order
never matters.

The LCD byte is `{7'b0, busy}`: the controller core's BUSY flag in bit 0,
driven all the time. No read strobe is involved. This is why `mem_rd` reaches
the top but no device uses it: reading any device has no side effects.

### Read timing

The RAMs read synchronously. On a rising edge with `en` high, `ramse_8x1k`
loads the addressed word into its output register. If the same edge writes
that word, the register gets the old value. Between enabled edges the output
holds. The multiplexer is steered by the *current* address. So a CPU read
works like this:

1. present the address before a rising edge;
2. keep it through that edge;
3. take `mem_data_i` after the edge, while the address is still held.

The data is valid one clock after the address. LCD reads are combinational and
need no edge. The top-level testbench checks both cases at this timing. If a
CPU core samples its read data in the same cycle it drives the address, it
needs a wait state or an asynchronous-read RAM in place of `ramse_8x1k`.

## What is outside this RTL

The RTL covers the glue and the memories. The parts below are library
components whose insides are not specified here. Their signals are the ports
of `memory_interface_top`:

| Part                                      | Ports of the top                                      |
|-------------------------------------------|-------------------------------------------------------|
| 8051-compatible CPU core, data bus        | `mem_addr`, `mem_data_o`, `mem_data_i`, `mem_wr`, `mem_rd` |
| same CPU core, program bus                | `rom_addr`, `rom_data_o`, `rom_data_i`, `rom_wr`      |
| 16x2 LCD controller core                  | `lcd_core_data/addr/line/strobe` out, `lcd_core_busy` in |
| bidirectional LCD data pad buffer, LCD pins | not present (belong to the LCD controller core)     |
| power-up reset delay and reset button     | `rst` in                                              |

The chip selects are also brought out on `cs` (a packed `chip_sel_t` struct)
so they can be observed. `rst` is used only to hold off the one-select
assertion. No block here has state that needs a reset.

## Choices made in this implementation

The address map, the chip-select gating of the RAM write, the LCD strobe and
BUSY byte, and the multiplexer's priority with its LCD default are all part
of the design itself. The following were not specified and were chosen here:

* synchronous, read-before-write RAMs, with `en` also gating the read
  register (see *Read timing*);
* RAM contents are undefined at power-up, as in a real RAM. Software, or a
  testbench, writes before it reads;
* the program RAM `rams_8x1k` is the same memory without an enable. Its
  contents are loaded through its write port;
* the LCD controller core is assumed to latch data, character address and line
  on the strobe and to raise BUSY while it works. The testbench models it that
  way.

## Files

| File                          | Contents |
|-------------------------------|----------|
| `rtl/mem_map_pkg.sv`          | bus widths, window bases, `chip_sel_t` |
| `rtl/address_decoder.sv`      | 16-bit address to four chip selects |
| `rtl/lcd_controller_int.sv`   | LCD strobe gating and BUSY read byte |
| `rtl/lcd_interface.sv`        | the LCD sheet: the glue plus the split of the bus onto the controller core's inputs |
| `rtl/ramse_8x1k.sv`           | 1K x 8 RAM with enable (MEM1..MEM3) |
| `rtl/rams_8x1k.sv`            | 1K x 8 RAM without enable (program memory) |
| `rtl/data_bus_mux.sv`         | read-data multiplexer |
| `rtl/memory_interface_top.sv` | everything wired together |
| `tb/tb_<module>.sv`           | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It also
has a watchdog that ends a hung run with a failure. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mem_map_pkg.sv tb/tb_memory_interface_top.sv --top-module tb_memory_interface_top
./obj_dir/Vtb_memory_interface_top
```

For any other module, put its testbench in place of `tb_memory_interface_top`.
`-Irtl` lets Verilator find the modules by file name.

`tb_memory_interface_top` runs the whole design at its default sizes and acts
as the CPU. It runs:

* a memory test program: writes a repeating 255-value sequence over all 3 KB of
  MEM1..MEM3, then reads it back and compares. Because 255 is odd, two
  words a power of two apart never expect the same value, so a stuck or
  shorted address bit shows up as a mismatch;
* writes and reads at unmapped addresses, with a check that no RAM changed;
* LCD character writes checked against a small model of the controller core,
  and BUSY polling that sees the flag both set and clear;
* 4000 random accesses across the whole address space;
* loading and fetching the program RAM.

It counts each of these and fails if one never happened. The unit testbenches
sweep their module exhaustively (LCD glue) or with boundary and random stimulus
(decoder, multiplexer, RAMs), and compare against reference models written
independently of the RTL.
