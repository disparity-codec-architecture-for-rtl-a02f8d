// tb_disparity_decoder: the decoder unit at a reduced CCIR frame (23 lines of
// 80 bytes, 64 active bytes, 32-byte maps) with the behavioural LZ-78
// decompression engine. The testbench builds 40-byte ATM blocks itself, one
// per frame period, one byte every second clock:
//   map 1 whole compressed, map 2 whole raw, map 3 as two raw fragments,
//   an empty block, map 4 whole with one header bit flipped, a first fragment
//   of map 5 followed by map 6 whole (the fragment must be discarded), a
//   block whose header has two bits flipped (taken as empty), map 7 whole
//   compressed.
// The CCIR output is parsed back: every frame must show maps 1, 2, 3, 4, 6
// and 7 in that order, each possibly repeated, with exactly the original
// content, and the decoder counters must match the script.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_disparity_decoder;
  import codec_pkg::*;
  import tb_util_pkg::*;
  localparam int LB = 80, AB = 64, LPF = 23, F2S = 12, F1A = 3, F1E = 10, F2A = 14, F2E = 21;
  localparam int MB = ((F1E - F1A + 4) / 4 + (F2E - F2A + 4) / 4) * AB / 8;
  localparam int FRAME_CYC = LB * LPF, BB = 40;
  localparam logic [7:0] ML = 8'h10, MR = 8'hEB;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", s, $time); end endtask

  logic [31:0] delay; logic atm_valid, atm_sob; logic [7:0] atm_data;
  logic lzd_in_valid, lzd_in_last, lzd_in_ready, lzd_out_valid, lzd_out_last, lzd_out_ready;
  logic [7:0] lzd_in_data, lzd_out_data, ccir_dout;
  logic frame_start, slot_sync;
  logic [15:0] n_corrected, n_hdr_bad, n_whole, n_reasm, n_discard, n_empty, n_decomp, n_bypass, n_new, n_repeat;
  disparity_decoder #(.LINE_BYTES(LB), .ACTIVE_BYTES(AB), .LINES_PER_FRAME(LPF), .F2_START(F2S),
    .F1_ACT_START(F1A), .F1_ACT_END(F1E), .F2_ACT_START(F2A), .F2_ACT_END(F2E),
    .MAP_BYTES(MB), .ML_VALUE(ML), .MR_VALUE(MR), .BUF_AW(10), .OUT_FIFO_AW(8)) dut (.*);
  lz78_dec_model u_lz (.clk, .rst_n, .in_valid(lzd_in_valid), .in_data(lzd_in_data),
    .in_last(lzd_in_last), .in_ready(lzd_in_ready), .out_valid(lzd_out_valid),
    .out_data(lzd_out_data), .out_last(lzd_out_last), .out_ready(lzd_out_ready));

  tb_util_pkg::bq_t maps [8];
  initial for (int m = 1; m < 8; m++) begin
    maps[m] = {8'(m)};
    for (int i = 1; i < MB; i++) maps[m].push_back((m % 2) ? 8'h00 : 8'($urandom));
  end

  // parser: list of tags shown, content checked against maps[]
  logic [7:0] p1, p2, p3;
  bit pf = 0, pact = 0, pdisp = 0;
  int pcnt = 0, pline = 0, pbit = 0;
  int shown [$];
  logic [7:0] cap [MB];
  always @(posedge clk) if (rst_n) begin
    p1 <= ccir_dout; p2 <= p1; p3 <= p2;
    if (pact) begin
      if (pdisp) begin
        if (pbit / 8 < MB) cap[pbit / 8][7 - pbit % 8] = (ccir_dout == MR);
        pbit++;
      end
      pcnt++;
      if (pcnt == AB) pact = 0;
    end
    if (p3 == 8'hFF && p2 == 8'h00 && p1 == 8'h00) begin
      if (pf && !ccir_dout[6]) begin
        int tag;
        bit same;
        tag = cap[0];
        if (pbit == MB * 8 && tag != 0) begin
          same = tag < 8;
          if (same) for (int i = 0; i < MB; i++) if (cap[i] != maps[tag][i]) same = 0;
          chk(same, $sformatf("frame content of map %0d", tag));
          if (shown.size() == 0 || shown[$] != tag) shown.push_back(tag);
        end
        pbit = 0;
      end
      pf = ccir_dout[6];
      if (ccir_dout[5]) pline = 0;
      if (!ccir_dout[4] && !ccir_dout[5]) begin
        pact = 1; pcnt = 0; pdisp = (pline % 4 == 0); pline++;
      end
    end
  end

  task automatic send_block(tb_util_pkg::bq_t pay, bit present, bit comp, frag_t fr, int flip_a, int flip_b);
    tb_util_pkg::bq_t b, h;
    blk_type_t t;
    t = '0; t.present = present; t.compressed = comp; t.frag = fr;
    h = {8'(t), 8'(pay.size() >> 8), 8'(pay.size())};
    b = h;
    b.push_back(crc8(h));
    foreach (pay[i]) b.push_back(pay[i]);
    while (b.size() < BB) b.push_back(8'h00);
    if (flip_a >= 0) b[flip_a / 8][flip_a % 8] ^= 1'b1;
    if (flip_b >= 0) b[flip_b / 8][flip_b % 8] ^= 1'b1;
    foreach (b[i]) begin
      @(negedge clk); atm_valid = 1; atm_sob = (i == 0); atm_data = b[i];
      @(negedge clk); atm_valid = 0; atm_sob = 0;
    end
    repeat (FRAME_CYC - 2 * BB) @(posedge clk);
  endtask

  initial begin
    tb_util_pkg::bq_t e, none;
    none = {};
    delay = 32'(FRAME_CYC / 3);
    atm_valid = 0; atm_sob = 0; atm_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (100) @(posedge clk);
    e = lz78_encode(maps[1]); chk(e.size() <= BB - 4, "map 1 compresses into one block");
    send_block(e, 1, 1, FRAG_WHOLE, -1, -1);
    send_block(maps[2], 1, 0, FRAG_WHOLE, -1, -1);
    send_block(maps[3][0:19], 1, 0, FRAG_FIRST, -1, -1);
    send_block(maps[3][20:MB-1], 1, 0, FRAG_SECOND, -1, -1);
    send_block(none, 0, 0, FRAG_WHOLE, -1, -1);
    send_block(maps[4], 1, 0, FRAG_WHOLE, 20, -1);
    send_block(maps[5][0:15], 1, 0, FRAG_FIRST, -1, -1);
    send_block(maps[6], 1, 0, FRAG_WHOLE, -1, -1);
    send_block(maps[2], 1, 0, FRAG_WHOLE, 3, 17);
    e = lz78_encode(maps[7]);
    send_block(e, 1, 1, FRAG_WHOLE, -1, -1);
    repeat (3 * FRAME_CYC) @(posedge clk);
    begin
      int want [6] = '{1, 2, 3, 4, 6, 7};
      bit ok;
      ok = shown.size() == 6;
      if (ok) foreach (want[i]) if (shown[i] != want[i]) ok = 0;
      chk(ok, $sformatf("maps shown in order (%0d maps)", shown.size()));
    end
    chk(n_corrected == 1 && n_hdr_bad == 1, "header correction counters");
    chk(n_whole == 5 && n_reasm == 1 && n_discard == 1 && n_empty == 2, "slot counters");
    chk(n_decomp == 2 && n_bypass == 4 && n_new == 6, "decompression and output counters");
    chk(n_repeat > 0, "repeated frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (16 * FRAME_CYC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
