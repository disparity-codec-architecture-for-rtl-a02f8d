// codec_e2e_bench: end-to-end bench for disparity_codec, shared by the
// reduced-size testbench and the full-size one.
//
// A behavioural CCIR 601/656 source sends one disparity map per frame. Maps
// alternate between a highly compressible one (constant, compressed into one
// slot) and a random one (incompressible: sent uncompressed, split over two
// slots, which costs the next map). Byte 0 of map n is the tag n+1. The
// encoder's ATM output is looped into the decoder, with one header bit
// flipped on the way to exercise the header correction. Behavioural LZ78
// engines stand in for the compression ASICs.
//
// Checks: every frame the decoder sends out is parsed back into a map, which
// must equal the source map its tag names, with tags never going back
// (repeated maps are the previous one); every ATM block starts the
// programmed delay (+ a fixed pipeline offset of at most 8 clocks) after the
// end-of-frame sync of its map; the number of new maps shown equals the
// number of maps the decoder released, give or take the one still in flight
// when the run ends. Each mechanism (whole map,
// fragmentation, dropped map, empty slot, uncompressed fallback, bus stall,
// header correction, reassembly, bypass, decompression, map repetition)
// must occur at least once.
//
// The stimulus, the link error and the expected values are this bench's
// own; what is checked is the behaviour described for the design.
module codec_e2e_bench #(
  parameter bit FULL            = 1'b0,
  parameter int LINE_BYTES      = 80,
  parameter int ACTIVE_BYTES    = 64,
  parameter int LINES_PER_FRAME = 23,
  parameter int F2_START        = 12,
  parameter int F1_ACT_START    = 3,
  parameter int F1_ACT_END      = 10,
  parameter int F2_ACT_START    = 14,
  parameter int F2_ACT_END      = 21,
  parameter int BLOCK_BYTES     = 32,
  parameter int SMALL_BLOCK     = 12,
  parameter int NFRAMES         = 16,
  parameter int CPB             = 4
);
  localparam int MAP_BYTES = ((F1_ACT_END - F1_ACT_START + 4) / 4 +
                              (F2_ACT_END - F2_ACT_START + 4) / 4) * ACTIVE_BYTES / 8;
  localparam int FRAME_CYC = LINE_BYTES * LINES_PER_FRAME;
  localparam int ENC_DELAY = FRAME_CYC + 20;
  localparam logic [7:0] ML = 8'h10, MR = 8'hEB;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- DUT ----------------
  logic [31:0] enc_delay, dec_delay;
  logic [15:0] enc_block_bytes;
  logic [7:0]  ccir_in;
  logic        e_li_v, e_li_l, e_li_r, e_lo_v, e_lo_l, e_lo_r;
  logic [7:0]  e_li_d, e_lo_d;
  logic        d_li_v, d_li_l, d_li_r, d_lo_v, d_lo_l, d_lo_r;
  logic [7:0]  d_li_d, d_lo_d;
  logic        atm_v, atm_sob, enc_sync, link_v, link_sob;
  logic [7:0]  atm_d, link_d;
  logic [7:0]  ccir_out;
  logic        dec_frame_start, dec_slot_sync;
  logic [15:0] e_whole, e_frag, e_drop, e_empty, e_raw, e_stall, e_indrop;
  logic [15:0] d_corr, d_bad, d_whole, d_reasm, d_disc, d_empty, d_decomp, d_bypass, d_new, d_rep;

  `define CODEC_PORTS \
    .clk, .rst_n, \
    .enc_delay, .enc_block_bytes, .enc_ccir_din(ccir_in), \
    .enc_lz_in_valid(e_li_v), .enc_lz_in_data(e_li_d), .enc_lz_in_last(e_li_l), .enc_lz_in_ready(e_li_r), \
    .enc_lz_out_valid(e_lo_v), .enc_lz_out_data(e_lo_d), .enc_lz_out_last(e_lo_l), .enc_lz_out_ready(e_lo_r), \
    .enc_atm_valid(atm_v), .enc_atm_data(atm_d), .enc_atm_sob(atm_sob), .enc_sync, \
    .enc_n_whole(e_whole), .enc_n_frag(e_frag), .enc_n_drop(e_drop), .enc_n_empty(e_empty), \
    .enc_n_raw(e_raw), .enc_n_stall(e_stall), .enc_in_drop_count(e_indrop), \
    .dec_delay, .dec_atm_valid(link_v), .dec_atm_data(link_d), .dec_atm_sob(link_sob), \
    .dec_lzd_in_valid(d_li_v), .dec_lzd_in_data(d_li_d), .dec_lzd_in_last(d_li_l), .dec_lzd_in_ready(d_li_r), \
    .dec_lzd_out_valid(d_lo_v), .dec_lzd_out_data(d_lo_d), .dec_lzd_out_last(d_lo_l), .dec_lzd_out_ready(d_lo_r), \
    .dec_ccir_dout(ccir_out), .dec_frame_start, .dec_slot_sync, \
    .dec_n_corrected(d_corr), .dec_n_hdr_bad(d_bad), .dec_n_whole(d_whole), .dec_n_reasm(d_reasm), \
    .dec_n_discard(d_disc), .dec_n_empty(d_empty), .dec_n_decomp(d_decomp), .dec_n_bypass(d_bypass), \
    .dec_n_new(d_new), .dec_n_repeat(d_rep)

  if (FULL) begin : g_full
    disparity_codec dut (`CODEC_PORTS);
  end else begin : g_small
    disparity_codec #(
      .LINE_BYTES(LINE_BYTES), .ACTIVE_BYTES(ACTIVE_BYTES), .LINES_PER_FRAME(LINES_PER_FRAME),
      .F2_START(F2_START), .F1_ACT_START(F1_ACT_START), .F1_ACT_END(F1_ACT_END),
      .F2_ACT_START(F2_ACT_START), .F2_ACT_END(F2_ACT_END), .BUF_AW(12), .OUT_FIFO_AW(8)
    ) dut (`CODEC_PORTS);
  end

  lz78_enc_model #(.CYCLES_PER_BYTE(CPB)) u_lze (
    .clk, .rst_n, .in_valid(e_li_v), .in_data(e_li_d), .in_last(e_li_l), .in_ready(e_li_r),
    .out_valid(e_lo_v), .out_data(e_lo_d), .out_last(e_lo_l), .out_ready(e_lo_r));
  lz78_dec_model u_lzd (
    .clk, .rst_n, .in_valid(d_li_v), .in_data(d_li_d), .in_last(d_li_l), .in_ready(d_li_r),
    .out_valid(d_lo_v), .out_data(d_lo_d), .out_last(d_lo_l), .out_ready(d_lo_r));

  // ---------------- source maps ----------------
  logic [7:0] src [NFRAMES+2][MAP_BYTES];
  initial begin
    for (int n = 0; n < NFRAMES + 2; n++)
      for (int i = 0; i < MAP_BYTES; i++)
        src[n][i] = (i == 0) ? 8'(n + 1) : ((n % 3 == 1) ? 8'($urandom) : ((n % 3 == 0) ? 8'h00 : 8'hFF));
  end

  // ---------------- CCIR source ----------------
  int  s_line = 1, s_pos = 0, s_frame = 0, s_bit = 0;
  function automatic logic [7:0] xy(bit f, bit v, bit h);
    return {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h};
  endfunction
  always @(posedge clk) begin
    if (rst_n) begin
      bit f, v, d;
      int k, fl;
      f = s_line >= F2_START;
      v = !((s_line >= F1_ACT_START && s_line <= F1_ACT_END) ||
            (s_line >= F2_ACT_START && s_line <= F2_ACT_END));
      fl = f ? s_line - F2_ACT_START : s_line - F1_ACT_START;
      d = !v && (fl % 4 == 0);
      k = s_pos - (LINE_BYTES - ACTIVE_BYTES);
      if (s_pos == 0 || s_pos == LINE_BYTES - ACTIVE_BYTES - 4) ccir_in <= 8'hFF;
      else if (s_pos == 1 || s_pos == 2 || s_pos == LINE_BYTES - ACTIVE_BYTES - 3 ||
               s_pos == LINE_BYTES - ACTIVE_BYTES - 2) ccir_in <= 8'h00;
      else if (s_pos == 3) ccir_in <= xy(f, v, 1);
      else if (s_pos == LINE_BYTES - ACTIVE_BYTES - 1) ccir_in <= xy(f, v, 0);
      else if (k >= 0 && d) begin
        ccir_in <= src[s_frame][s_bit / 8][7 - s_bit % 8] ? MR : ML;
        s_bit++;
      end else ccir_in <= (s_pos % 2) ? 8'h10 : 8'h80;
      s_pos++;
      if (s_pos == LINE_BYTES) begin
        s_pos = 0; s_line++;
        if (s_line > LINES_PER_FRAME) begin
          s_line = 1; s_bit = 0;
          if (s_frame < NFRAMES + 1) s_frame++;
        end
      end
    end else ccir_in <= 8'h00;
  end

  // ---------------- link: loop-back with one header bit error ----------------
  int blk = 0, blk_byte = 0;
  always_comb begin
    link_v = atm_v; link_sob = atm_sob; link_d = atm_d;
    if (blk == 3 && blk_byte == 1 && atm_v) link_d = atm_d ^ 8'h04;
  end
  always @(posedge clk) if (atm_v) begin
    if (atm_sob) begin blk <= blk + 1; blk_byte <= 1; end
    else blk_byte <= blk_byte + 1;
  end

  // ---------------- encoder timing check ----------------
  longint cyc = 0;
  longint eof_t [$];
  int     offset = -1;
  bit     timing_on = 1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (enc_sync && rst_n) eof_t.push_back(cyc);
    if (atm_v && atm_sob && eof_t.size() > 0) begin
      longint d;
      d = cyc - eof_t.pop_front() - longint'(enc_delay);
      if (timing_on) begin
        if (offset < 0) offset = int'(d);
        check(d == offset && d >= 0 && d <= 8, $sformatf("block delay offset %0d", d));
      end
    end
  end

  // ---------------- decoded CCIR parser ----------------
  logic [7:0] p1, p2, p3;
  bit  pf = 0, pv = 1, pact = 0, pdisp = 0;
  int  pcnt = 0, pline = 0, pbit = 0, last_tag = 0, new_maps = 0, frames_seen = 0;
  logic [7:0] cap [MAP_BYTES];
  logic [7:0] prevmap [MAP_BYTES];
  always @(posedge clk) begin
    if (rst_n) begin
      p1 <= ccir_out; p2 <= p1; p3 <= p2;
      if (pact) begin
        if (pdisp) begin
          if (pbit / 8 < MAP_BYTES) cap[pbit / 8][7 - pbit % 8] = (ccir_out == MR);
          check(ccir_out == MR || ccir_out == ML, "disparity byte value");
          pbit++;
        end
        pcnt++;
        if (pcnt == ACTIVE_BYTES) pact = 0;
      end
      if (p3 == 8'hFF && p2 == 8'h00 && p1 == 8'h00 && ccir_out[7]) begin
        if (pf && !ccir_out[6]) begin
          // frame boundary: judge the captured map
          int tag;
          bit same;
          frames_seen++;
          tag = int'(cap[0]);
          check(pbit == MAP_BYTES * 8, "disparity bits per frame");
          if (tag != 0) begin
            check(tag >= last_tag && tag <= NFRAMES + 2, $sformatf("tag order %0d after %0d", tag, last_tag));
            if (tag >= 1 && tag <= NFRAMES + 2) begin
              same = 1;
              for (int i = 0; i < MAP_BYTES; i++) if (cap[i] != src[tag-1][i]) same = 0;
              check(same, $sformatf("decoded map %0d content", tag));
            end
            if (tag == last_tag) begin
              same = 1;
              for (int i = 0; i < MAP_BYTES; i++) if (cap[i] != prevmap[i]) same = 0;
              check(same, "repeated map equals previous");
            end else new_maps++;
            last_tag = tag;
          end
          for (int i = 0; i < MAP_BYTES; i++) prevmap[i] = cap[i];
          pbit = 0;
        end
        pf = ccir_out[6];
        pv = ccir_out[5];
        if (ccir_out[5]) pline = 0;
        if (!ccir_out[4] && !ccir_out[5]) begin
          pact = 1; pcnt = 0; pdisp = (pline % 4 == 0); pline++;
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    enc_delay = ENC_DELAY;
    dec_delay = 32'(FRAME_CYC / 4);
    enc_block_bytes = 16'(BLOCK_BYTES);
    repeat (5) @(posedge clk);
    rst_n = 1;
    // run until the source has sent frame 9, then shrink the slot for one map
    wait (s_frame == 9);
    @(posedge clk);
    enc_block_bytes = 16'(SMALL_BLOCK);
    wait (s_frame == 10);
    wait (s_frame == 11 && s_line == 2);
    enc_block_bytes = 16'(BLOCK_BYTES);
    // shorten the delay for one map so that its slot opens before it is ready
    wait (s_frame == 13 && s_line == 2);
    timing_on = 0;
    enc_delay = 3;
    wait (s_frame == 14 && s_line == 3);
    enc_delay = ENC_DELAY;
    wait (s_frame == NFRAMES + 1);
    repeat (2 * FRAME_CYC) @(posedge clk);
    // mechanism coverage
    $display("enc whole=%0d frag=%0d drop=%0d empty=%0d raw=%0d stall=%0d indrop=%0d",
             e_whole, e_frag, e_drop, e_empty, e_raw, e_stall, e_indrop);
    $display("dec corr=%0d bad=%0d whole=%0d reasm=%0d discard=%0d empty=%0d decomp=%0d bypass=%0d new=%0d repeat=%0d",
             d_corr, d_bad, d_whole, d_reasm, d_disc, d_empty, d_decomp, d_bypass, d_new, d_rep);
    $display("parsed frames=%0d new maps=%0d", frames_seen, new_maps);
    check(e_whole > 0, "mechanism: whole map");
    check(e_frag > 0, "mechanism: fragmentation");
    check(e_drop > 0, "mechanism: map drop");
    check(e_empty > 0, "mechanism: empty slot");
    check(e_raw > 0, "mechanism: uncompressed fallback");
    check(e_stall > 0, "mechanism: compressor stalled by M2O");
    check(e_indrop == 0, "no input FIFO overflow");
    check(d_corr > 0, "mechanism: header correction");
    check(d_bad == 0, "no uncorrectable header");
    check(d_reasm > 0, "mechanism: reassembly");
    check(d_bypass > 0, "mechanism: decompression bypass");
    check(d_decomp > 0, "mechanism: decompression");
    check(d_rep > 0, "mechanism: previous map repeated");
    check(d_empty > 0, "mechanism: empty block received");
    check(new_maps <= int'(d_whole) + int'(d_reasm) && new_maps + 1 >= int'(d_whole) + int'(d_reasm), "new maps shown = maps received");
    check(int'(d_whole) + int'(d_reasm) >= int'(e_whole) + int'(e_frag) - 2, "maps received vs sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat ((NFRAMES + 8) * FRAME_CYC) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
