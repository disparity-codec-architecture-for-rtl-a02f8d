// mem_arbiter: fixed-priority arbiter in front of one single-port SRAM.
//
// Port 0 always wins: in the encoder it is the memory-to-output machine,
// which must read on time to keep the programmed delay; in the decoder it is
// the packet receiver, whose ATM input cannot be stalled. Port 1 (the
// compressor side, or the decompression reader) is granted only in cycles
// where port 0 does not request. The grant is combinational, so a granted
// access reaches the SRAM in the same cycle; read data appear on rdata one
// cycle later and are shared by both ports. The priority order is the
// design's; the arbitration scheme (combinational fixed priority) is this
// design's own choice.
module mem_arbiter #(
  parameter int AW = 19,
  parameter int W  = 8
) (
  input  logic          req0,
  input  logic          we0,
  input  logic [AW-1:0] addr0,
  input  logic [W-1:0]  wdata0,
  output logic          gnt0,
  input  logic          req1,
  input  logic          we1,
  input  logic [AW-1:0] addr1,
  input  logic [W-1:0]  wdata1,
  output logic          gnt1,
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [W-1:0]  mem_wdata
);
  always_comb begin
    gnt0 = req0;
    gnt1 = req1 && !req0;
    mem_en    = req0 || req1;
    mem_we    = req0 ? we0    : we1;
    mem_addr  = req0 ? addr0  : addr1;
    mem_wdata = req0 ? wdata0 : wdata1;
  end
endmodule
