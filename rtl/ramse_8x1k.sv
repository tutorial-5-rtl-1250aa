// ramse_8x1k: 1K x 8 single-port synchronous RAM with an enable input.
//
// Used for the three data memories MEM1..MEM3. A write happens on the rising
// clock edge when both en and we are high: with en low, we has no effect. en is
// active high. The read is synchronous too: on a rising edge with en high the
// word at addr (the old one, if the same edge writes it) is loaded into dout,
// which then holds until the next enabled edge. So a read needs the address
// and en for one clock edge, and the data is valid right after that edge.
//
// Interface: clk, en, we, addr[9:0], din[7:0] in; dout[7:0] out.
// The size, the enable and its gating of the write follow the tutorial design.
// The synchronous read, en also gating the read register, and the contents
// after power-up (undefined, as in a real RAM: write before reading) are this implementation's choices.
module ramse_8x1k #(
  parameter int unsigned DEPTH = 1024,  // words
  parameter int unsigned WIDTH = 8,     // bits per word
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,    // enable, active high; gates read and write
  input  logic             we,    // write enable, effective only with en
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= din;
      dout <= mem[addr];
    end
  end

endmodule
