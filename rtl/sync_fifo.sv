// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used as the input FIFO between the disparity filter and the compression
// module, and as the output FIFO in front of the CCIR transmitter. The head
// entry is visible on dout whenever empty is low; pop removes it. A push
// while full is ignored (the writer checks full). count gives the fill level.
// Depth is 2**AW entries; the document gives no FIFO depth, so it is a
// parameter chosen by the instantiating unit.
module sync_fifo #(
  parameter int W  = 9,
  parameter int AW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [W-1:0]  din,
  input  logic          pop,
  output logic [W-1:0]  dout,
  output logic          empty,
  output logic          full,
  output logic [AW:0]   count
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wptr, rptr;

  assign count = wptr - rptr;
  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(2**AW));
  assign dout  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push && !full) wptr <= wptr + 1'b1;
      if (pop && !empty) rptr <= rptr + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("sync_fifo: pop while empty");
endmodule
