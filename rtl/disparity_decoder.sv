// disparity_decoder: the decoder unit.
//
// ATM blocks in, the CCIR 601/656 disparity stream out. Inside:
//   data deframer        dec_rx decodes and corrects each block header (its
//                        hdr_valid is the slot sync) and writes the payload
//                        into the circular map buffer (sram_sp) through
//                        mem_arbiter; dec_cdl reassembles fragmented maps.
//   delay control        delay_queue holds each complete map for the
//                        programmed delay (clock cycles, from the end of its
//                        last slot) before it is decoded.
//   decompression module reads the map and sends it through the external
//                        LZ engine (lzd_in_*/lzd_out_*) or around it.
//   ddtm                 output FIFO and CCIR transmitter, which repeats the
//                        previous map when no new one is ready.
// One 27 MHz clock; ATM bytes arrive at most every second clock.
//
// The partitioning into deframer, decompression module and transmission
// module, the header-driven reassembly and the repetition of the last map
// follow the original design. Releasing maps through a delay queue timed
// from their last block, and letting the CCIR transmitter run freely rather
// than from the header sync, are this design's choices.
module disparity_decoder
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
  parameter int         MAP_BYTES       = 25920,
  parameter logic [7:0] ML_VALUE        = 8'h10,
  parameter logic [7:0] MR_VALUE        = 8'hEB,
  parameter int         BUF_AW          = 19,
  parameter int         OUT_FIFO_AW     = 15,
  parameter int         TIMER_AW        = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] delay,
  // ATM demultiplexer
  input  logic        atm_valid,
  input  logic [7:0]  atm_data,
  input  logic        atm_sob,
  // external LZ-78 decompression engine
  output logic        lzd_in_valid,
  output logic [7:0]  lzd_in_data,
  output logic        lzd_in_last,
  input  logic        lzd_in_ready,
  input  logic        lzd_out_valid,
  input  logic [7:0]  lzd_out_data,
  input  logic        lzd_out_last,
  output logic        lzd_out_ready,
  // CCIR output
  output logic [7:0]  ccir_dout,
  output logic        frame_start,
  // status
  output logic        slot_sync,
  output logic [15:0] n_corrected,
  output logic [15:0] n_hdr_bad,
  output logic [15:0] n_whole,
  output logic [15:0] n_reasm,
  output logic [15:0] n_discard,
  output logic [15:0] n_empty,
  output logic [15:0] n_decomp,
  output logic [15:0] n_bypass,
  output logic [15:0] n_new,
  output logic [15:0] n_repeat
);
  localparam int DW = BUF_AW + 17;

  logic              req0, gnt0, req1, gnt1;
  logic [BUF_AW-1:0] addr0, addr1;
  logic [7:0]        wdata0;
  logic              mem_en, mem_we;
  logic [BUF_AW-1:0] mem_addr;
  logic [7:0]        mem_wdata, mem_rdata;

  logic              slot_done;
  blk_type_t         slot_type;
  logic [15:0]       slot_size;
  logic [BUF_AW-1:0] slot_addr;

  logic              m_valid, m_comp, in_ub;
  logic [BUF_AW-1:0] m_addr;
  logic [15:0]       m_size;

  logic              r_valid, r_ready, r_comp, dq_ovf;
  logic [BUF_AW-1:0] r_addr;
  logic [15:0]       r_size;

  logic              o_push, o_last, o_full, new_map;
  logic [7:0]        o_data;

  dec_rx #(.AW(BUF_AW)) u_rx (
    .clk, .rst_n, .atm_valid, .atm_data, .atm_sob,
    .mem_req(req0), .mem_addr(addr0), .mem_wdata(wdata0),
    .hdr_valid(slot_sync), .slot_done, .slot_type, .slot_size, .slot_addr,
    .n_corrected, .n_hdr_bad
  );

  mem_arbiter #(.AW(BUF_AW), .W(8)) u_arb (
    .req0, .we0(1'b1), .addr0, .wdata0, .gnt0,
    .req1, .we1(1'b0), .addr1, .wdata1(8'h00), .gnt1,
    .mem_en, .mem_we, .mem_addr, .mem_wdata
  );

  sram_sp #(.DEPTH(2**BUF_AW), .W(8)) u_buf (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  dec_cdl #(.AW(BUF_AW)) u_cdl (
    .clk, .rst_n, .slot_done, .slot_type, .slot_size, .slot_addr,
    .map_valid(m_valid), .map_addr(m_addr), .map_size(m_size), .map_compressed(m_comp),
    .in_ub, .n_whole, .n_reasm, .n_discard, .n_empty
  );

  delay_queue #(.DATA_W(DW), .AW(TIMER_AW)) u_delay (
    .clk, .rst_n, .delay,
    .in_valid(m_valid), .in_data({m_addr, m_size, m_comp}),
    .out_valid(r_valid), .out_data({r_addr, r_size, r_comp}), .out_ready(r_ready),
    .overflow(dq_ovf)
  );

  decompression_module #(.AW(BUF_AW)) u_dm (
    .clk, .rst_n,
    .map_valid(r_valid), .map_addr(r_addr), .map_size(r_size), .map_compressed(r_comp),
    .map_ready(r_ready),
    .mem_req(req1), .mem_addr(addr1), .mem_gnt(gnt1), .mem_rdata,
    .lz_in_valid(lzd_in_valid), .lz_in_data(lzd_in_data), .lz_in_last(lzd_in_last),
    .lz_in_ready(lzd_in_ready),
    .lz_out_valid(lzd_out_valid), .lz_out_data(lzd_out_data), .lz_out_last(lzd_out_last),
    .lz_out_ready(lzd_out_ready),
    .out_push(o_push), .out_data(o_data), .out_last(o_last), .out_full(o_full),
    .n_decomp, .n_bypass
  );

  ddtm #(
    .LINE_BYTES(LINE_BYTES), .ACTIVE_BYTES(ACTIVE_BYTES),
    .LINES_PER_FRAME(LINES_PER_FRAME), .F2_START(F2_START),
    .F1_ACT_START(F1_ACT_START), .F1_ACT_END(F1_ACT_END),
    .F2_ACT_START(F2_ACT_START), .F2_ACT_END(F2_ACT_END),
    .MAP_BYTES(MAP_BYTES), .ML_VALUE(ML_VALUE), .MR_VALUE(MR_VALUE),
    .OUT_FIFO_AW(OUT_FIFO_AW)
  ) u_ddtm (
    .clk, .rst_n,
    .in_push(o_push), .in_data(o_data), .in_last(o_last), .in_full(o_full),
    .ccir_dout, .frame_start, .new_map, .n_new, .n_repeat
  );
endmodule
