// tb_ddtm: the disparity data transmission module at a reduced CCIR frame
// (23 lines of 80 bytes, 64 active bytes, 32-byte maps). Maps are pushed
// into the output FIFO early in some frames and not in others, sometimes
// two at once. The CCIR output is parsed back: every timing reference code
// must carry correct protection bits, every frame must carry MAP_BYTES*8
// disparity bytes of value ML or MR, and the map shown in each frame must be
// the oldest complete map waiting at the frame start, or a repeat of the
// previous frame's map when none was waiting. new_map and the n_new and
// n_repeat counters are checked against that.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_ddtm;
  import tb_util_pkg::*;
  localparam int LB = 80, AB = 64, LPF = 23, F2S = 12, F1A = 3, F1E = 10, F2A = 14, F2E = 21;
  localparam int MB = ((F1E - F1A + 4) / 4 + (F2E - F2A + 4) / 4) * AB / 8;
  localparam logic [7:0] ML = 8'h10, MR = 8'hEB;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", s, $time); end endtask
  logic in_push, in_last, in_full, frame_start, new_map; logic [7:0] in_data, ccir_dout;
  logic [15:0] n_new, n_repeat;
  ddtm #(.LINE_BYTES(LB), .ACTIVE_BYTES(AB), .LINES_PER_FRAME(LPF), .F2_START(F2S),
         .F1_ACT_START(F1A), .F1_ACT_END(F1E), .F2_ACT_START(F2A), .F2_ACT_END(F2E),
         .MAP_BYTES(MB), .ML_VALUE(ML), .MR_VALUE(MR), .OUT_FIFO_AW(8)) dut (.*);

  // pushed maps, the ones complete in the FIFO, and the expectation per frame
  logic [7:0] maps [8][MB];
  int pushed = 0, shown = -1, frames = 0, news = 0, reps = 0;
  int exp_q [$];
  always @(posedge clk) if (rst_n && frame_start) begin
    bit fresh;
    fresh = (shown + 1 < pushed);
    if (fresh) shown++;
    chk(new_map == fresh, "new_map flag");
    if (fresh) news++; else reps++;
    exp_q.push_back(shown);
    frames++;
  end

  // parser
  logic [7:0] p1, p2, p3;
  bit pf = 0, pact = 0, pdisp = 0;
  int pcnt = 0, pline = 0, pbit = 0, judged = 0;
  logic [7:0] cap [MB];
  always @(posedge clk) if (rst_n) begin
    p1 <= ccir_dout; p2 <= p1; p3 <= p2;
    if (pact) begin
      if (pdisp) begin
        if (pbit / 8 < MB) cap[pbit / 8][7 - pbit % 8] = (ccir_dout == MR);
        chk(ccir_dout == MR || ccir_dout == ML, "disparity byte value");
        pbit++;
      end
      pcnt++;
      if (pcnt == AB) pact = 0;
    end
    if (p3 == 8'hFF && p2 == 8'h00 && p1 == 8'h00) begin
      chk(ccir_dout == xy(ccir_dout[6], ccir_dout[5], ccir_dout[4]), "XY protection bits");
      if (pf && !ccir_dout[6] && exp_q.size() >= 2) begin
        int e;
        bit same;
        e = exp_q.pop_front();
        same = 1;
        chk(pbit == MB * 8, "disparity bits per frame");
        if (e >= 0) for (int i = 0; i < MB; i++) if (cap[i] != maps[e][i]) same = 0;
        chk(e < 0 || same, $sformatf("frame shows map %0d", e));
        judged++;
      end
      if (pf && !ccir_dout[6]) pbit = 0;
      pf = ccir_dout[6];
      if (ccir_dout[5]) pline = 0;
      if (!ccir_dout[4] && !ccir_dout[5]) begin
        pact = 1; pcnt = 0; pdisp = (pline % 4 == 0); pline++;
      end
    end
  end

  task automatic push_map(int m);
    for (int i = 0; i < MB; i++) begin
      maps[m][i] = (i == 0) ? 8'(m + 1) : 8'($urandom);
      @(negedge clk); in_push = 1; in_data = maps[m][i]; in_last = (i == MB - 1);
    end
    @(negedge clk); in_push = 0; in_last = 0;
    pushed++;
  endtask
  // frame k gets: 1 map in frames 1,2,5; 2 maps in frame 7; none otherwise
  initial begin
    in_push = 0; in_data = 0; in_last = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      @(posedge clk iff frame_start);
      repeat (10) @(posedge clk);
      if (k == 1 || k == 2 || k == 5) push_map(pushed);
      if (k == 7) begin push_map(pushed); push_map(pushed); end
    end
    @(posedge clk iff frame_start);
    repeat (10) @(posedge clk);
    chk(judged >= 11, $sformatf("frames judged %0d", judged));
    chk(shown == pushed - 1 && pushed == 5, "all maps shown");
    chk(n_new == news && n_repeat == reps && news == 5, $sformatf("counters new=%0d repeat=%0d", n_new, n_repeat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (14 * LB * LPF + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
