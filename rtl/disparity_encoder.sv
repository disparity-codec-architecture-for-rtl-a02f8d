// disparity_encoder: the encoder unit.
//
// CCIR 601/656 disparity stream in, fixed-size ATM blocks out, one block per
// 40 ms map period. Inside:
//   ddrm                -> packed disparity maps (1 bit per disparity byte)
//                          and the end-of-frame sync
//   compression_module  -> LZ engine (external, lz_in_*/lz_out_*), with an
//                          uncompressed copy sent when compression fails
//   data framer         -> enc_c2m writes maps into the circular map buffer
//                          (sram_sp, 2**BUF_AW bytes) through mem_arbiter;
//                          delay_queue times each map's slot from its sync;
//                          enc_cdl picks whole / fragmented / dropped;
//                          enc_m2o forms and sends the block.
// The per-call settings of the unit are ports: delay (clock cycles from
// the end-of-frame sync of a map to the start of its block) and block_bytes
// (the ATM block size, header and padding included, fixed at call set-up).
// One 27 MHz clock drives everything; the ATM side sends one byte every
// second clock (13.5 MHz).
//
// The partitioning (reception module, compression module, data framer with
// C2M, CDL and M2O), the circular buffer with M2O given priority, and timing
// each block from its frame's end-of-frame sync follow the original design.
// Replacing the host processor by hardware state machines and bringing its
// settings out as ports are this design's choices.
module disparity_encoder
  import codec_pkg::*;
#(
  parameter int         ACTIVE_BYTES = 1440,
  parameter int         MAP_BYTES    = 25920,
  parameter logic [7:0] MR_VALUE     = 8'hEB,
  parameter int         IN_FIFO_AW   = 10,
  parameter int         BUF_AW       = 19,
  parameter int         TIMER_AW     = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] delay,
  input  logic [15:0] block_bytes,
  input  logic [7:0]  ccir_din,
  // external LZ-78 compression engine
  output logic        lz_in_valid,
  output logic [7:0]  lz_in_data,
  output logic        lz_in_last,
  input  logic        lz_in_ready,
  input  logic        lz_out_valid,
  input  logic [7:0]  lz_out_data,
  input  logic        lz_out_last,
  output logic        lz_out_ready,
  // ATM multiplexer
  output logic        atm_valid,
  output logic [7:0]  atm_data,
  output logic        atm_sob,
  // status
  output logic        sync,
  output logic [15:0] n_whole,
  output logic [15:0] n_frag,
  output logic [15:0] n_drop,
  output logic [15:0] n_empty,
  output logic [15:0] n_raw,
  output logic [15:0] n_stall,
  output logic [15:0] in_drop_count
);
  // DDRM -> compression module
  logic       f_valid, f_last, f_ready;
  logic [7:0] f_data;
  // compression module -> C2M
  logic        c_valid, c_restart, c_ready;
  logic [7:0]  c_data;
  logic        commit_valid, commit_raw;
  logic [15:0] commit_size;
  // buffer
  logic              req0, gnt0, req1, we1, gnt1;
  logic [BUF_AW-1:0] addr0, addr1;
  logic [7:0]        wdata1;
  logic              mem_en, mem_we;
  logic [BUF_AW-1:0] mem_addr;
  logic [7:0]        mem_wdata, mem_rdata;
  // CDL
  logic              desc_valid, desc_raw, desc_ready;
  logic [BUF_AW-1:0] desc_addr;
  logic [15:0]       desc_size;
  logic              rel_valid;
  logic [BUF_AW-1:0] rel_ptr;
  logic [BUF_AW:0]   used;
  logic              slot_valid, slot_ready, tq_ovf;
  logic [0:0]        slot_data;
  logic              cmd_valid, m2o_busy, m2o_done, in_ub;
  blk_type_t         cmd_type;
  logic [BUF_AW-1:0] cmd_addr;
  logic [15:0]       cmd_len;

  ddrm #(.ACTIVE_BYTES(ACTIVE_BYTES), .MR_VALUE(MR_VALUE), .IN_FIFO_AW(IN_FIFO_AW)) u_ddrm (
    .clk, .rst_n, .ccir_din, .sync,
    .fifo_valid(f_valid), .fifo_data(f_data), .fifo_last(f_last), .fifo_ready(f_ready),
    .drop_count(in_drop_count)
  );

  compression_module #(.MAP_BYTES(MAP_BYTES)) u_cm (
    .clk, .rst_n,
    .in_valid(f_valid), .in_data(f_data), .in_last(f_last), .in_ready(f_ready),
    .lz_in_valid, .lz_in_data, .lz_in_last, .lz_in_ready,
    .lz_out_valid, .lz_out_data, .lz_out_last, .lz_out_ready,
    .out_valid(c_valid), .out_data(c_data), .out_restart(c_restart), .out_ready(c_ready),
    .commit_valid, .commit_size, .commit_raw
  );

  enc_c2m #(.AW(BUF_AW)) u_c2m (
    .clk, .rst_n,
    .in_valid(c_valid), .in_data(c_data), .in_restart(c_restart), .in_ready(c_ready),
    .commit_valid, .commit_size, .commit_raw,
    .mem_req(req1), .mem_we(we1), .mem_addr(addr1), .mem_wdata(wdata1), .mem_gnt(gnt1),
    .desc_valid, .desc_addr, .desc_size, .desc_raw, .desc_ready,
    .rel_valid, .rel_ptr, .used
  );

  mem_arbiter #(.AW(BUF_AW), .W(8)) u_arb (
    .req0, .we0(1'b0), .addr0, .wdata0(8'h00), .gnt0,
    .req1, .we1, .addr1, .wdata1, .gnt1,
    .mem_en, .mem_we, .mem_addr, .mem_wdata
  );

  sram_sp #(.DEPTH(2**BUF_AW), .W(8)) u_buf (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  delay_queue #(.DATA_W(1), .AW(TIMER_AW)) u_timer (
    .clk, .rst_n, .delay,
    .in_valid(sync), .in_data(1'b0),
    .out_valid(slot_valid), .out_data(slot_data), .out_ready(slot_ready),
    .overflow(tq_ovf)
  );

  enc_cdl #(.AW(BUF_AW)) u_cdl (
    .clk, .rst_n, .block_bytes,
    .slot_valid, .slot_ready,
    .desc_valid, .desc_addr, .desc_size, .desc_raw, .desc_ready,
    .cmd_valid, .cmd_type, .cmd_addr, .cmd_len, .m2o_busy, .m2o_done,
    .rel_valid, .rel_ptr,
    .in_ub, .n_whole, .n_frag, .n_drop, .n_empty
  );

  enc_m2o #(.AW(BUF_AW)) u_m2o (
    .clk, .rst_n, .block_bytes,
    .cmd_valid, .cmd_type, .cmd_addr, .cmd_len, .busy(m2o_busy), .done(m2o_done),
    .mem_req(req0), .mem_addr(addr0), .mem_gnt(gnt0), .mem_rdata,
    .atm_valid, .atm_data, .atm_sob
  );

  // maps sent uncompressed, and cycles the compressor side waited for the bus
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_raw   <= '0;
      n_stall <= '0;
    end else begin
      if (commit_valid && commit_raw) n_raw <= n_raw + 1'b1;
      if (req1 && !gnt1 && n_stall != 16'hFFFF) n_stall <= n_stall + 1'b1;
    end
  end
endmodule
