// rams_8x1k: 1K x 8 single-port synchronous RAM without an enable.
//
// This is the program memory on the CPU's program (ROM) bus. On every rising
// clock edge it writes din to addr when we is high, and loads the word at addr
// (the old one, if the same edge writes it) into dout. Read data is therefore
// valid one clock after the address.
//
// Interface: clk, we, addr[9:0], din[7:0] in; dout[7:0] out.
// The size and the absence of an enable follow the tutorial design; the
// synchronous read and the undefined contents after power-up are this
// implementation's choices. The program it holds is loaded through the write
// port before the CPU runs.
module rams_8x1k #(
  parameter int unsigned DEPTH = 1024,  // words
  parameter int unsigned WIDTH = 8,     // bits per word
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    dout <= mem[addr];
  end

endmodule
