// disparity_codec: top level, the disparity encoder unit and the disparity
// decoder unit side by side.
//
// The encoder takes the 27 MHz CCIR 601/656 stream that carries the
// disparity maps (25 maps/s, one bit per disparity byte on every fourth
// line) and sends one fixed-size ATM block per map period over a constant
// bit-rate channel, compressing each map losslessly with an external LZ-78
// engine and applying controlled data loss when a map does not fit its
// slot. The decoder takes those blocks back, reassembles, decompresses with
// its own external engine, and rebuilds the CCIR stream after a programmed
// delay, repeating the last map in place of a lost one. On the board the two
// are separate units joined by the ATM network; here they share the clock
// and reset and each has its own ports (enc_* and dec_*), so that a link, a
// channel model or a loop-back can be put between them outside.
//
// The per-call settings a host processor would program are ports:
// enc_delay and dec_delay (clock cycles) and enc_block_bytes (ATM block
// size in bytes, header and padding included). The LZ engines connect
// through the enc_lz_* and dec_lzd_* valid/ready byte streams, with a last
// flag on the final byte of each map in both directions.
module disparity_codec
  import codec_pkg::*;
#(
  parameter int         LINE_BYTES      = 1720,
  parameter int         ACTIVE_BYTES    = 1440,
  parameter int         LINES_PER_FRAME = 625,
  parameter int         F2_START        = 313,
  parameter int         F1_ACT_START    = 23,
  parameter int         F1_ACT_END      = 310,
  parameter int         F2_ACT_START    = 336,
  parameter int         F2_ACT_END      = 623,
  parameter logic [7:0] ML_VALUE        = 8'h10,
  parameter logic [7:0] MR_VALUE        = 8'hEB,
  parameter int         IN_FIFO_AW      = 10,
  parameter int         BUF_AW          = 19,
  parameter int         OUT_FIFO_AW     = 15,
  parameter int         TIMER_AW        = 5,
  // one disparity line in four, eight disparity bytes per map byte
  localparam int        MAP_BYTES = ((F1_ACT_END - F1_ACT_START + 4) / 4 +
                                     (F2_ACT_END - F2_ACT_START + 4) / 4) *
                                    ACTIVE_BYTES / 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // ---- encoder unit ----
  input  logic [31:0] enc_delay,
  input  logic [15:0] enc_block_bytes,
  input  logic [7:0]  enc_ccir_din,
  output logic        enc_lz_in_valid,
  output logic [7:0]  enc_lz_in_data,
  output logic        enc_lz_in_last,
  input  logic        enc_lz_in_ready,
  input  logic        enc_lz_out_valid,
  input  logic [7:0]  enc_lz_out_data,
  input  logic        enc_lz_out_last,
  output logic        enc_lz_out_ready,
  output logic        enc_atm_valid,
  output logic [7:0]  enc_atm_data,
  output logic        enc_atm_sob,
  output logic        enc_sync,
  output logic [15:0] enc_n_whole,
  output logic [15:0] enc_n_frag,
  output logic [15:0] enc_n_drop,
  output logic [15:0] enc_n_empty,
  output logic [15:0] enc_n_raw,
  output logic [15:0] enc_n_stall,
  output logic [15:0] enc_in_drop_count,
  // ---- decoder unit ----
  input  logic [31:0] dec_delay,
  input  logic        dec_atm_valid,
  input  logic [7:0]  dec_atm_data,
  input  logic        dec_atm_sob,
  output logic        dec_lzd_in_valid,
  output logic [7:0]  dec_lzd_in_data,
  output logic        dec_lzd_in_last,
  input  logic        dec_lzd_in_ready,
  input  logic        dec_lzd_out_valid,
  input  logic [7:0]  dec_lzd_out_data,
  input  logic        dec_lzd_out_last,
  output logic        dec_lzd_out_ready,
  output logic [7:0]  dec_ccir_dout,
  output logic        dec_frame_start,
  output logic        dec_slot_sync,
  output logic [15:0] dec_n_corrected,
  output logic [15:0] dec_n_hdr_bad,
  output logic [15:0] dec_n_whole,
  output logic [15:0] dec_n_reasm,
  output logic [15:0] dec_n_discard,
  output logic [15:0] dec_n_empty,
  output logic [15:0] dec_n_decomp,
  output logic [15:0] dec_n_bypass,
  output logic [15:0] dec_n_new,
  output logic [15:0] dec_n_repeat
);
  disparity_encoder #(
    .ACTIVE_BYTES(ACTIVE_BYTES), .MAP_BYTES(MAP_BYTES), .MR_VALUE(MR_VALUE),
    .IN_FIFO_AW(IN_FIFO_AW), .BUF_AW(BUF_AW), .TIMER_AW(TIMER_AW)
  ) u_enc (
    .clk, .rst_n, .delay(enc_delay), .block_bytes(enc_block_bytes),
    .ccir_din(enc_ccir_din),
    .lz_in_valid(enc_lz_in_valid), .lz_in_data(enc_lz_in_data),
    .lz_in_last(enc_lz_in_last), .lz_in_ready(enc_lz_in_ready),
    .lz_out_valid(enc_lz_out_valid), .lz_out_data(enc_lz_out_data),
    .lz_out_last(enc_lz_out_last), .lz_out_ready(enc_lz_out_ready),
    .atm_valid(enc_atm_valid), .atm_data(enc_atm_data), .atm_sob(enc_atm_sob),
    .sync(enc_sync), .n_whole(enc_n_whole), .n_frag(enc_n_frag),
    .n_drop(enc_n_drop), .n_empty(enc_n_empty), .n_raw(enc_n_raw),
    .n_stall(enc_n_stall), .in_drop_count(enc_in_drop_count)
  );

  disparity_decoder #(
    .LINE_BYTES(LINE_BYTES), .ACTIVE_BYTES(ACTIVE_BYTES),
    .LINES_PER_FRAME(LINES_PER_FRAME), .F2_START(F2_START),
    .F1_ACT_START(F1_ACT_START), .F1_ACT_END(F1_ACT_END),
    .F2_ACT_START(F2_ACT_START), .F2_ACT_END(F2_ACT_END),
    .MAP_BYTES(MAP_BYTES), .ML_VALUE(ML_VALUE), .MR_VALUE(MR_VALUE),
    .BUF_AW(BUF_AW), .OUT_FIFO_AW(OUT_FIFO_AW), .TIMER_AW(TIMER_AW)
  ) u_dec (
    .clk, .rst_n, .delay(dec_delay),
    .atm_valid(dec_atm_valid), .atm_data(dec_atm_data), .atm_sob(dec_atm_sob),
    .lzd_in_valid(dec_lzd_in_valid), .lzd_in_data(dec_lzd_in_data),
    .lzd_in_last(dec_lzd_in_last), .lzd_in_ready(dec_lzd_in_ready),
    .lzd_out_valid(dec_lzd_out_valid), .lzd_out_data(dec_lzd_out_data),
    .lzd_out_last(dec_lzd_out_last), .lzd_out_ready(dec_lzd_out_ready),
    .ccir_dout(dec_ccir_dout), .frame_start(dec_frame_start),
    .slot_sync(dec_slot_sync), .n_corrected(dec_n_corrected),
    .n_hdr_bad(dec_n_hdr_bad), .n_whole(dec_n_whole), .n_reasm(dec_n_reasm),
    .n_discard(dec_n_discard), .n_empty(dec_n_empty), .n_decomp(dec_n_decomp),
    .n_bypass(dec_n_bypass), .n_new(dec_n_new), .n_repeat(dec_n_repeat)
  );
endmodule
