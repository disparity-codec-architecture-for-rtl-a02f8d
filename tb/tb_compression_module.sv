// tb_compression_module: a scripted stand-in engine swallows a 16-byte map
// and then returns K bytes. K <= 16 must be committed as compressed with the
// engine's bytes; K = 16 is the boundary; K > 16 must be replaced by the
// uncompressed map, sent with out_restart on its first byte and committed as
// uncompressed with size 16. The framer side stalls at random.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_compression_module;
  localparam int MB = 16;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic in_valid, in_last, in_ready; logic [7:0] in_data;
  logic li_v, li_l, li_r, lo_v, lo_l, lo_r; logic [7:0] li_d, lo_d;
  logic out_valid, out_restart, out_ready, commit_valid, commit_raw; logic [7:0] out_data; logic [15:0] commit_size;
  compression_module #(.MAP_BYTES(MB)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_last, .in_ready,
    .lz_in_valid(li_v), .lz_in_data(li_d), .lz_in_last(li_l), .lz_in_ready(li_r),
    .lz_out_valid(lo_v), .lz_out_data(lo_d), .lz_out_last(lo_l), .lz_out_ready(lo_r),
    .out_valid, .out_data, .out_restart, .out_ready, .commit_valid, .commit_size, .commit_raw);
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  // stand-in engine: counts input, then emits K bytes 0xA0+i
  int K, eng_in = 0, eng_out = -1;
  assign li_r = 1'b1;
  assign lo_v = (eng_out >= 0) && (eng_out < K);
  assign lo_d = 8'(8'hA0 + eng_out);
  assign lo_l = (eng_out == K - 1);
  always @(posedge clk) if (rst_n) begin
    if (li_v && li_r) begin eng_in++; if (li_l) eng_out <= 0; end
    if (lo_v && lo_r) eng_out <= (eng_out == K - 1) ? -1 : eng_out + 1;
  end
  always @(posedge clk) out_ready <= ($urandom % 4 != 0);

  logic [7:0] map [MB];
  logic [7:0] got [$]; int restarts = 0, commits = 0; bit c_raw; int c_size;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      if (out_restart) begin restarts++; got.delete(); end
      got.push_back(out_data);
    end
    if (commit_valid) begin commits++; c_raw = commit_raw; c_size = commit_size; end
  end

  task automatic run_map(int k);
    int c0;
    K = k; got.delete(); restarts = 0; c0 = commits;
    foreach (map[i]) map[i] = 8'($urandom);
    for (int i = 0; i < MB; i++) begin
      @(negedge clk); in_valid = 1; in_data = map[i]; in_last = (i == MB - 1);
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    wait (commits == c0 + 1);
    @(posedge clk);
    if (k <= MB) begin
      chk(!c_raw && c_size == k && restarts == 0 && got.size() == k, $sformatf("compressed commit k=%0d", k));
      foreach (got[i]) chk(got[i] == 8'(8'hA0 + i), "compressed byte");
    end else begin
      chk(c_raw && c_size == MB && restarts == 1 && got.size() == MB, $sformatf("raw commit k=%0d raw=%0d size=%0d rs=%0d n=%0d", k, c_raw, c_size, restarts, got.size()));
      foreach (got[i]) chk(got[i] == map[i], "raw byte");
    end
  endtask

  initial begin
    in_valid = 0; in_data = 0; in_last = 0; K = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    run_map(5);
    run_map(16);
    run_map(17);
    run_map(40);
    run_map(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
