// ddrm: disparity data reception module of the encoder unit.
//
// Chains the CCIR receiver (timing reference search, active-byte and
// disparity-line selection, frame sync), the disparity data filter with its
// byte packetizer, and the input FIFO. Out of it come the packed disparity
// map, one byte per eight disparity pixels with the last byte of each map
// marked, and the one-cycle frame sync that goes straight to the data framer.
// The FIFO output is first-word-fall-through: fifo_valid with fifo_data and
// fifo_last, taken by fifo_ready. The CCIR input cannot be stalled, so a byte
// that finds the FIFO full is dropped and counted in drop_count.
//
// The partition (receiver, filter, packetizer, FIFO) follows the design;
// the FIFO depth (2**IN_FIFO_AW bytes) is this design's choice.
module ddrm #(
  parameter int         ACTIVE_BYTES = 1440,
  parameter logic [7:0] MR_VALUE     = 8'hEB,
  parameter int         IN_FIFO_AW   = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  ccir_din,
  output logic        sync,
  output logic        fifo_valid,
  output logic [7:0]  fifo_data,
  output logic        fifo_last,
  input  logic        fifo_ready,
  output logic [15:0] drop_count
);
  logic       act_valid, act_disp, field, vblank;
  logic [7:0] act_data;
  logic       pk_valid, pk_last;
  logic [7:0] pk_data;
  logic       empty, full;
  logic [IN_FIFO_AW:0] count;

  ccir_rx #(.ACTIVE_BYTES(ACTIVE_BYTES)) u_rx (
    .clk, .rst_n, .din(ccir_din),
    .act_valid, .act_data, .act_disp, .sync, .field, .vblank
  );

  disparity_filter #(.MR_VALUE(MR_VALUE)) u_filter (
    .clk, .rst_n, .act_valid, .act_data, .act_disp, .sync,
    .out_valid(pk_valid), .out_data(pk_data), .out_last(pk_last)
  );

  sync_fifo #(.W(9), .AW(IN_FIFO_AW)) u_in_fifo (
    .clk, .rst_n,
    .push(pk_valid), .din({pk_last, pk_data}),
    .pop(fifo_ready && !empty), .dout({fifo_last, fifo_data}),
    .empty, .full, .count
  );

  assign fifo_valid = !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drop_count <= '0;
    else if (pk_valid && full) drop_count <= drop_count + 1'b1;
  end
endmodule
