// tb_ddrm: a behavioural CCIR source (15-line frames of 40 bytes, 16 active
// bytes) carries random maps; the DDRM must give out each map packed eight
// disparity bytes to one byte, first one in bit 7, last byte marked, and one
// sync per frame boundary.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_ddrm;
  import tb_util_pkg::*;
  localparam int LB = 40, AB = 16, LINES = 15, F2S = 8, A1S = 2, A1E = 6, A2S = 10, A2E = 14;
  localparam int MB = ((A1E - A1S + 4) / 4 + (A2E - A2S + 4) / 4) * AB / 8;  // 8 bytes
  localparam int NF = 6;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic [7:0] din, fifo_data; logic sync, fifo_valid, fifo_last, fifo_ready; logic [15:0] drop_count;
  ddrm #(.ACTIVE_BYTES(AB), .MR_VALUE(8'hEB), .IN_FIFO_AW(4)) dut (
    .clk, .rst_n, .ccir_din(din), .sync, .fifo_valid, .fifo_data, .fifo_last, .fifo_ready, .drop_count);
  logic [7:0] src [NF][MB];
  int line = 1, pos = 0, frame = 0, bitn = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      bit f, v, d; int k, fl;
      f = line >= F2S;
      v = !((line >= A1S && line <= A1E) || (line >= A2S && line <= A2E));
      fl = f ? line - A2S : line - A1S;
      d = !v && fl % 4 == 0;
      k = pos - (LB - AB);
      if (pos == 0 || pos == LB - AB - 4) din <= 8'hFF;
      else if (pos == 1 || pos == 2 || pos == LB - AB - 3 || pos == LB - AB - 2) din <= 8'h00;
      else if (pos == 3) din <= xy(f, v, 1);
      else if (pos == LB - AB - 1) din <= xy(f, v, 0);
      else if (k >= 0 && d) begin din <= src[frame][bitn / 8][7 - bitn % 8] ? 8'hEB : 8'h10; bitn++; end
      else if (k >= 0) din <= 8'hEB;  // non-disparity active lines must be ignored
      else din <= 8'h80;
      pos++;
      if (pos == LB) begin pos = 0; line++; if (line > LINES) begin line = 1; bitn = 0; frame++; end end
    end else din <= 0;
  end
  int got_frame = 0, idx = 0, syncs = 0;
  always @(posedge clk) if (rst_n) begin
    if (sync) syncs++;
    if (fifo_valid && fifo_ready) begin
      checks++;
      if (fifo_data != src[got_frame][idx] || fifo_last != (idx == MB - 1)) begin
        failures++; $display("FAIL map %0d byte %0d got %h/%0d exp %h", got_frame, idx, fifo_data, fifo_last, src[got_frame][idx]);
      end
      idx++;
      if (fifo_last || idx == MB) begin idx = 0; got_frame++; end
    end
  end
  always @(posedge clk) fifo_ready <= ($urandom % 3 != 0);
  initial begin
    foreach (src[i, j]) src[i][j] = 8'($urandom);
    repeat (3) @(posedge clk); rst_n = 1;
    wait (frame == NF - 1);
    repeat (LB * 2) @(posedge clk);
    checks++; if (got_frame != NF - 1) begin failures++; $display("FAIL maps %0d", got_frame); end
    checks++; if (syncs != NF - 1) begin failures++; $display("FAIL syncs %0d", syncs); end
    checks++; if (drop_count != 0) begin failures++; $display("FAIL drops"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (LB * LINES * (NF + 3)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
