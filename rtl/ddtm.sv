// ddtm: disparity data transmission module of the decoder unit.
//
// The output FIFO (2**OUT_FIFO_AW entries of {last, byte}) collects the
// decoded map bytes from the decompression module; a counter of the complete
// maps it holds (bytes marked last pushed minus popped) tells the CCIR
// transmitter at each frame start whether a new map can be shown. The
// transmitter (ccir_tx) turns the map back into the CCIR 601/656 stream and
// repeats the previous map when no new one is complete. FIFO depth default:
// 32768, room for one whole map of 25920 bytes; the document gives no depth.
module ddtm #(
  parameter int         LINE_BYTES      = 1720,
  parameter int         ACTIVE_BYTES    = 1440,
  parameter int         LINES_PER_FRAME = 625,
  parameter int         F2_START        = 313,
  parameter int         F1_ACT_START    = 23,
  parameter int         F1_ACT_END      = 310,
  parameter int         F2_ACT_START    = 336,
  parameter int         F2_ACT_END      = 623,
  parameter int         MAP_BYTES       = 25920,
  parameter logic [7:0] ML_VALUE        = 8'h10,
  parameter logic [7:0] MR_VALUE        = 8'hEB,
  parameter int         OUT_FIFO_AW     = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_push,
  input  logic [7:0]  in_data,
  input  logic        in_last,
  output logic        in_full,
  output logic [7:0]  ccir_dout,
  output logic        frame_start,
  output logic        new_map,
  output logic [15:0] n_new,
  output logic [15:0] n_repeat
);
  logic        empty, pop, head_last;
  logic [7:0]  head;
  logic [7:0]  maps;
  logic [OUT_FIFO_AW:0] count;

  sync_fifo #(.W(9), .AW(OUT_FIFO_AW)) u_out_fifo (
    .clk, .rst_n,
    .push(in_push), .din({in_last, in_data}),
    .pop(pop && !empty), .dout({head_last, head}),
    .empty, .full(in_full), .count
  );

  ccir_tx #(
    .LINE_BYTES(LINE_BYTES), .ACTIVE_BYTES(ACTIVE_BYTES),
    .LINES_PER_FRAME(LINES_PER_FRAME), .F2_START(F2_START),
    .F1_ACT_START(F1_ACT_START), .F1_ACT_END(F1_ACT_END),
    .F2_ACT_START(F2_ACT_START), .F2_ACT_END(F2_ACT_END),
    .MAP_BYTES(MAP_BYTES), .ML_VALUE(ML_VALUE), .MR_VALUE(MR_VALUE)
  ) u_tx (
    .clk, .rst_n,
    .map_avail(maps != 0), .fifo_dout(head), .fifo_pop(pop),
    .dout(ccir_dout), .frame_start, .new_map
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      maps     <= '0;
      n_new    <= '0;
      n_repeat <= '0;
    end else begin
      maps <= maps + 8'(in_push && in_last && !in_full) - 8'(pop && !empty && head_last);
      if (frame_start) begin
        if (new_map) n_new    <= n_new + 1'b1;
        else         n_repeat <= n_repeat + 1'b1;
      end
    end
  end
endmodule
