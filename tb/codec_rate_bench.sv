// codec_rate_bench: bench shared by the channel-rate and delay workload
// testbenches. It runs the whole codec at its default (full) size at a list
// of channel rates, RATE_BB bytes per ATM block at 25 blocks/s, PER maps per
// rate, with programmable encoder and decoder delays.
//
// The source maps are runs of four byte values with a mean run length that
// varies from map to map (every sixth map is plain random bytes), so their
// LZ-78 sizes range from under 2,000 bytes to more than the raw 25,920.
// Before the run the bench compresses every map with its own reference coder.
// After the run it predicts, from each map's stored size (compressed, or raw
// when compression does not pay) and the block size in force at that map's
// slot, what controlled data loss must have done: send the map whole, send it
// in two fragments and drop the next map, or drop it. The maps the decoder
// showed as new must be exactly the predicted ones, in order and with exact
// content. Every ATM block must start the programmed encoder delay (plus a
// constant pipeline offset of at most 8 clocks) after the end of its frame.
// The pass rate per channel rate is printed; it only shows the mechanism at
// work, since the maps are synthetic, not recorded disparity sequences.
//
// The block size changes on line 200 of a source frame, clear of any block,
// so it applies from the next slot on; the size of each slot's block is
// recorded when the block starts.
//
// At the end (or when the watchdog fires) the bench sets done; the wrapping
// testbench then prints the result line and stops the simulation.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module codec_rate_bench #(
  parameter int NSEG = 4,
  parameter int RATE_BB [4] = '{4400, 7000, 10350, 14500},  // first NSEG used
  parameter int PER = 6,
  parameter longint ENC_DELAY = 1075020,
  parameter longint DEC_DELAY = 268750
);
  import tb_util_pkg::*;
  localparam int LB = 1720, AB = 1440, LPF = 625, F2S = 313, F1A = 23, F1E = 310, F2A = 336, F2E = 623;
  localparam int MB = 25920, FRAME_CYC = LB * LPF, NF = NSEG * PER + 2;
  localparam int WAIT_FR = int'((ENC_DELAY + DEC_DELAY) / FRAME_CYC) + 3;
  localparam logic [7:0] ML = 8'h10, MR = 8'hEB;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  int checks = 0, failures = 0;
  bit done = 0;   // set at the end of the run or by the watchdog
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", s, $time); end endtask

  logic [31:0] enc_delay, dec_delay; logic [15:0] enc_block_bytes; logic [7:0] ccir_in, ccir_out;
  logic e_li_v, e_li_l, e_li_r, e_lo_v, e_lo_l, e_lo_r, d_li_v, d_li_l, d_li_r, d_lo_v, d_lo_l, d_lo_r;
  logic [7:0] e_li_d, e_lo_d, d_li_d, d_lo_d, atm_d;
  logic atm_v, atm_sob, enc_sync, dec_frame_start, dec_slot_sync;
  logic [15:0] e_whole, e_frag, e_drop, e_empty, e_raw, e_stall, e_indrop;
  logic [15:0] d_corr, d_bad, d_whole, d_reasm, d_disc, d_empty, d_decomp, d_bypass, d_new, d_rep;
  disparity_codec dut (
    .clk, .rst_n, .enc_delay, .enc_block_bytes, .enc_ccir_din(ccir_in),
    .enc_lz_in_valid(e_li_v), .enc_lz_in_data(e_li_d), .enc_lz_in_last(e_li_l), .enc_lz_in_ready(e_li_r),
    .enc_lz_out_valid(e_lo_v), .enc_lz_out_data(e_lo_d), .enc_lz_out_last(e_lo_l), .enc_lz_out_ready(e_lo_r),
    .enc_atm_valid(atm_v), .enc_atm_data(atm_d), .enc_atm_sob(atm_sob), .enc_sync,
    .enc_n_whole(e_whole), .enc_n_frag(e_frag), .enc_n_drop(e_drop), .enc_n_empty(e_empty),
    .enc_n_raw(e_raw), .enc_n_stall(e_stall), .enc_in_drop_count(e_indrop),
    .dec_delay, .dec_atm_valid(atm_v), .dec_atm_data(atm_d), .dec_atm_sob(atm_sob),
    .dec_lzd_in_valid(d_li_v), .dec_lzd_in_data(d_li_d), .dec_lzd_in_last(d_li_l), .dec_lzd_in_ready(d_li_r),
    .dec_lzd_out_valid(d_lo_v), .dec_lzd_out_data(d_lo_d), .dec_lzd_out_last(d_lo_l), .dec_lzd_out_ready(d_lo_r),
    .dec_ccir_dout(ccir_out), .dec_frame_start, .dec_slot_sync,
    .dec_n_corrected(d_corr), .dec_n_hdr_bad(d_bad), .dec_n_whole(d_whole), .dec_n_reasm(d_reasm),
    .dec_n_discard(d_disc), .dec_n_empty(d_empty), .dec_n_decomp(d_decomp), .dec_n_bypass(d_bypass),
    .dec_n_new(d_new), .dec_n_repeat(d_rep));
  lz78_enc_model #(.CYCLES_PER_BYTE(2)) u_lze (
    .clk, .rst_n, .in_valid(e_li_v), .in_data(e_li_d), .in_last(e_li_l), .in_ready(e_li_r),
    .out_valid(e_lo_v), .out_data(e_lo_d), .out_last(e_lo_l), .out_ready(e_lo_r));
  lz78_dec_model u_lzd (
    .clk, .rst_n, .in_valid(d_li_v), .in_data(d_li_d), .in_last(d_li_l), .in_ready(d_li_r),
    .out_valid(d_lo_v), .out_data(d_lo_d), .out_last(d_lo_l), .out_ready(d_lo_r));

  // maps, reference sizes and the predicted outcome
  logic [7:0] src [NF+2][MB];
  int stored [NF+2];
  int bb_of [NF+2];
  initial begin
    tb_util_pkg::bq_t q;
    int runs [6] = '{0, 12, 40, 150, 600, 2500};
    for (int n = 0; n < NF + 2; n++) begin
      int r, left;
      logic [7:0] v;
      r = runs[(n * 5) % 6];
      left = 0;
      q = {};
      for (int i = 0; i < MB; i++) begin
        if (r == 0) v = 8'($urandom);
        else if (left == 0) begin
          v = 8'({2'($urandom), 2'($urandom)} * 8'h11);
          left = 1 + $urandom % (2 * r);
        end
        left--;
        src[n][i] = (i == 0) ? 8'(n + 1) : v;
        q.push_back(src[n][i]);
      end
      stored[n] = lz78_encode(q).size();
      if (stored[n] > MB) stored[n] = MB;
    end
  end

  // CCIR source
  int s_line = 1, s_pos = 0, s_frame = 0, s_bit = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      bit f, v, d;
      int k, fl;
      f = s_line >= F2S;
      v = !((s_line >= F1A && s_line <= F1E) || (s_line >= F2A && s_line <= F2E));
      fl = f ? s_line - F2A : s_line - F1A;
      d = !v && (fl % 4 == 0);
      k = s_pos - (LB - AB);
      if (s_pos == 0 || s_pos == LB - AB - 4) ccir_in <= 8'hFF;
      else if (s_pos == 1 || s_pos == 2 || s_pos == LB - AB - 3 || s_pos == LB - AB - 2) ccir_in <= 8'h00;
      else if (s_pos == 3) ccir_in <= xy(f, v, 1);
      else if (s_pos == LB - AB - 1) ccir_in <= xy(f, v, 0);
      else if (k >= 0 && d) begin
        ccir_in <= src[s_frame][s_bit / 8][7 - s_bit % 8] ? MR : ML;
        s_bit++;
      end else ccir_in <= (s_pos % 2) ? 8'h10 : 8'h80;
      s_pos++;
      if (s_pos == LB) begin
        s_pos = 0; s_line++;
        if (s_line > LPF) begin
          s_line = 1; s_bit = 0;
          if (s_frame < NF + 1) s_frame++;
        end
      end
    end else ccir_in <= 8'h00;
  end
  // block size of each slot, and slot timing
  int nslot = 0, offset = -1;
  longint cyc = 0;
  longint eof_t [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && enc_sync) eof_t.push_back(cyc);
    if (rst_n && atm_v && atm_sob) begin
      longint d;
      if (nslot < NF + 2) bb_of[nslot] = enc_block_bytes;
      nslot++;
      chk(eof_t.size() > 0, "block without a frame end");
      if (eof_t.size() > 0) begin
        d = cyc - eof_t.pop_front() - ENC_DELAY;
        if (offset < 0) offset = int'(d);
        chk(d == offset && d >= 0 && d <= 8, $sformatf("block delay offset %0d", d));
      end
    end
  end

  // decoded CCIR parser: list of new maps shown
  logic [7:0] p1, p2, p3;
  bit pf = 0, pact = 0, pdisp = 0;
  int pcnt = 0, pline = 0, pbit = 0, last_tag = 0;
  int shown [$];
  logic [7:0] cap [MB];
  always @(posedge clk) if (rst_n) begin
    p1 <= ccir_out; p2 <= p1; p3 <= p2;
    if (pact) begin
      if (pdisp) begin
        if (pbit / 8 < MB) cap[pbit / 8][7 - pbit % 8] = (ccir_out == MR);
        pbit++;
      end
      pcnt++;
      if (pcnt == AB) pact = 0;
    end
    if (p3 == 8'hFF && p2 == 8'h00 && p1 == 8'h00) begin
      if (pf && !ccir_out[6]) begin
        int tag;
        bit same;
        tag = cap[0];
        if (pbit == MB * 8 && tag != 0 && tag != last_tag) begin
          same = tag <= NF + 2;
          if (same) for (int i = 0; i < MB; i++) if (cap[i] != src[tag-1][i]) same = 0;
          chk(same, $sformatf("content of map %0d", tag));
          shown.push_back(tag);
          last_tag = tag;
        end
        pbit = 0;
      end
      pf = ccir_out[6];
      if (ccir_out[5]) pline = 0;
      if (!ccir_out[4] && !ccir_out[5]) begin
        pact = 1; pcnt = 0; pdisp = (pline % 4 == 0); pline++;
      end
    end
  end

  initial begin
    int want [$];
    bit ub;
    enc_delay = 32'(ENC_DELAY);
    dec_delay = 32'(DEC_DELAY);
    enc_block_bytes = 16'(RATE_BB[0]);
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int s = 1; s < NSEG; s++) begin
      wait (s_frame == s * PER + 1 && s_line == 200);
      enc_block_bytes = 16'(RATE_BB[s]);
    end
    wait (s_frame == NF + 1);
    repeat (WAIT_FR * FRAME_CYC) @(posedge clk);
    // prediction for maps 0 .. NF-2 (tags 1 .. NF-1)
    ub = 0;
    for (int n = 0; n <= NF - 2; n++) begin
      int c;
      c = bb_of[n] - 4;
      if (ub) ub = 0;
      else if (stored[n] <= c) want.push_back(n + 1);
      else if (stored[n] <= 2 * c) begin want.push_back(n + 1); ub = 1; end
    end
    while (shown.size() > 0 && shown[$] > NF - 1) void'(shown.pop_back());
    begin
      bit ok;
      ok = shown.size() == want.size();
      if (ok) foreach (want[i]) if (shown[i] != want[i]) ok = 0;
      chk(ok, $sformatf("maps shown (%0d) equal the predicted ones (%0d)", shown.size(), want.size()));
    end
    for (int s = 0; s < NSEG; s++) begin
      int pass;
      pass = 0;
      foreach (shown[i]) if ((shown[i] - 1) / PER == s && shown[i] - 1 < NSEG * PER) pass++;
      $display("rate %0d bytes/block (%.2f Mbit/s): %0d of %0d maps passed", RATE_BB[s],
               RATE_BB[s] * 8.0 * 25.0 / 1.0e6, pass, PER);
    end
    $display("encoder whole=%0d frag=%0d drop=%0d empty=%0d raw=%0d", e_whole, e_frag, e_drop, e_empty, e_raw);
    chk(e_indrop == 0 && d_bad == 0, "no input loss, no header errors");
    chk(e_frag > 0 && e_drop > 0 && e_raw > 0, "fragmentation, drops and raw maps occur");
    done = 1;
  end
  initial begin
    repeat ((NF + WAIT_FR + 4) * FRAME_CYC) @(posedge clk);
    failures++;
    done = 1;
  end
endmodule
