// tb_disparity_encoder: the encoder unit at a reduced CCIR frame (23 lines of
// 80 bytes, 64 active bytes, 32-byte maps) with the behavioural LZ-78
// compression engine and a 32-byte ATM block. The source cycles through a
// constant map, a random map (incompressible, so it is sent raw and does not
// fit one block) and another constant map, byte 0 of each carrying its frame
// number as a tag. Every ATM block is collected and checked: length equal to
// the block size (a new block may not start earlier), a correct header CRC,
// and a payload that - after joining fragments and undoing the compression -
// equals the tagged source map, with tags strictly increasing. Each block must start a fixed number of clocks
// (0 to 8) after the programmed delay from the end of its frame. Whole,
// fragmented, dropped and raw maps must each occur.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_disparity_encoder;
  import codec_pkg::*;
  import tb_util_pkg::*;
  localparam int LB = 80, AB = 64, LPF = 23, F2S = 12, F1A = 3, F1E = 10, F2A = 14, F2E = 21;
  localparam int MB = ((F1E - F1A + 4) / 4 + (F2E - F2A + 4) / 4) * AB / 8;
  localparam int FRAME_CYC = LB * LPF, NF = 12, BB = 32;
  localparam logic [7:0] ML = 8'h10, MR = 8'hEB;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", s, $time); end endtask

  logic [31:0] delay; logic [15:0] block_bytes; logic [7:0] ccir_din;
  logic lz_in_valid, lz_in_last, lz_in_ready, lz_out_valid, lz_out_last, lz_out_ready;
  logic [7:0] lz_in_data, lz_out_data;
  logic atm_valid, atm_sob, sync; logic [7:0] atm_data;
  logic [15:0] n_whole, n_frag, n_drop, n_empty, n_raw, n_stall, in_drop_count;
  disparity_encoder #(.ACTIVE_BYTES(AB), .MAP_BYTES(MB), .MR_VALUE(MR), .BUF_AW(10)) dut (.*);
  lz78_enc_model #(.CYCLES_PER_BYTE(2)) u_lz (.clk, .rst_n, .in_valid(lz_in_valid),
    .in_data(lz_in_data), .in_last(lz_in_last), .in_ready(lz_in_ready),
    .out_valid(lz_out_valid), .out_data(lz_out_data), .out_last(lz_out_last), .out_ready(lz_out_ready));

  // source
  logic [7:0] src [NF+2][MB];
  initial for (int n = 0; n < NF + 2; n++) for (int i = 0; i < MB; i++)
    src[n][i] = (i == 0) ? 8'(n + 1) : ((n % 3 == 1) ? 8'($urandom) : ((n % 3 == 0) ? 8'h00 : 8'hFF));
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
      if (s_pos == 0 || s_pos == LB - AB - 4) ccir_din <= 8'hFF;
      else if (s_pos == 1 || s_pos == 2 || s_pos == LB - AB - 3 || s_pos == LB - AB - 2) ccir_din <= 8'h00;
      else if (s_pos == 3) ccir_din <= xy(f, v, 1);
      else if (s_pos == LB - AB - 1) ccir_din <= xy(f, v, 0);
      else if (k >= 0 && d) begin
        ccir_din <= src[s_frame][s_bit / 8][7 - s_bit % 8] ? MR : ML;
        s_bit++;
      end else ccir_din <= (s_pos % 2) ? 8'h10 : 8'h80;
      s_pos++;
      if (s_pos == LB) begin
        s_pos = 0; s_line++;
        if (s_line > LPF) begin
          s_line = 1; s_bit = 0;
          if (s_frame < NF + 1) s_frame++;
        end
      end
    end else ccir_din <= 8'h00;
  end

  // ATM block collector and checker
  tb_util_pkg::bq_t blk, first;
  bit have_first = 0;
  int last_tag = 0, blocks = 0, maps_ok = 0;
  task automatic judge(tb_util_pkg::bq_t b);
    tb_util_pkg::bq_t h, pay, m;
    int size;
    blk_type_t t;
    blocks++;
    h = b[0:2];
    chk(crc8(h) == b[3], "header CRC");
    t = blk_type_t'(b[0]);
    size = {b[1], b[2]};
    if (!t.present) begin chk(size == 0, "empty block size"); return; end
    pay = b[4:4+size-1];
    if (t.frag == FRAG_FIRST) begin first = pay; have_first = 1; return; end
    if (t.frag == FRAG_SECOND) begin
      chk(have_first, "second fragment follows a first");
      pay = {first, pay};
    end
    have_first = 0;
    m = t.compressed ? lz78_decode(pay) : pay;
    chk(m.size() == MB, $sformatf("map size %0d", m.size()));
    if (m.size() == MB) begin
      bit same = 1;
      int tag = m[0];
      chk(tag > last_tag && tag <= NF + 2, $sformatf("tag %0d after %0d", tag, last_tag));
      if (tag >= 1 && tag <= NF + 2) for (int i = 0; i < MB; i++) if (m[i] != src[tag-1][i]) same = 0;
      chk(same, $sformatf("map %0d content", tag));
      last_tag = tag;
      maps_ok++;
    end
  endtask
  always @(posedge clk) if (rst_n && atm_valid) begin
    if (atm_sob && blk.size() > 0) begin chk(0, "short block"); blk = {}; end
    blk.push_back(atm_data);
    if (blk.size() == BB) begin judge(blk); blk = {}; end
  end

  // slot timing
  longint cyc = 0;
  longint eof_t [$];
  int offset = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && sync) eof_t.push_back(cyc);
    if (rst_n && atm_valid && atm_sob && eof_t.size() > 0) begin
      longint d;
      d = cyc - eof_t.pop_front() - longint'(delay);
      if (offset < 0) offset = int'(d);
      chk(d == offset && d >= 0 && d <= 8, $sformatf("block delay offset %0d", d));
    end
  end

  initial begin
    delay = 32'(FRAME_CYC / 2);
    block_bytes = 16'(BB);
    repeat (3) @(posedge clk); rst_n = 1;
    wait (s_frame == NF + 1);
    repeat (2 * FRAME_CYC) @(posedge clk);
    $display("blocks=%0d maps=%0d whole=%0d frag=%0d drop=%0d empty=%0d raw=%0d stall=%0d",
             blocks, maps_ok, n_whole, n_frag, n_drop, n_empty, n_raw, n_stall);
    chk(n_whole > 0 && n_frag > 0 && n_drop > 0 && n_raw > 0, "whole, fragmented, dropped and raw maps");
    chk(maps_ok == n_whole + n_frag - int'(have_first) && maps_ok >= NF / 2, "maps received");
    chk(in_drop_count == 0, "no input bytes lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat ((NF + 6) * FRAME_CYC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
