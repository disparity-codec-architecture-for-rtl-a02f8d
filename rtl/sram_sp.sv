// sram_sp: single-port synchronous SRAM, one access per clock.
//
// Stands for the board's 512 Kbyte map data buffer (default size) and, with
// a smaller DEPTH, for other byte stores. A write stores wdata at addr; a
// read returns mem[addr] on rdata one clock after en is sampled. The
// contents are zeroed at start-up in simulation only through the initial
// block so that a read of an unwritten word is defined.
//
// The 512 Kbyte size follows the original board; the byte width, the
// one-clock read latency and the single port are this design's choices.
module sram_sp #(
  parameter int DEPTH = 524288,
  parameter int W     = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
