// tb_decompression_module: a testbench memory holds four maps, two stored
// LZ-78 compressed and two stored raw. The module is given each one in turn
// with a memory grant that is randomly withheld and an output FIFO that is
// randomly full; the bytes pushed out must equal the original map with the
// last flag on its final byte. Compressed maps must pass through the
// behavioural decompression engine and raw ones must bypass it.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_decompression_module;
  import tb_util_pkg::*;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic map_valid, map_compressed, map_ready; logic [AW-1:0] map_addr; logic [15:0] map_size;
  logic mem_req, mem_gnt; logic [AW-1:0] mem_addr; logic [7:0] mem_rdata;
  logic lz_in_valid, lz_in_last, lz_in_ready, lz_out_valid, lz_out_last, lz_out_ready;
  logic [7:0] lz_in_data, lz_out_data;
  logic out_push, out_last, out_full; logic [7:0] out_data;
  logic [15:0] n_decomp, n_bypass;
  decompression_module #(.AW(AW)) dut (.*);
  lz78_dec_model u_lz (.clk, .rst_n, .in_valid(lz_in_valid), .in_data(lz_in_data),
    .in_last(lz_in_last), .in_ready(lz_in_ready), .out_valid(lz_out_valid),
    .out_data(lz_out_data), .out_last(lz_out_last), .out_ready(lz_out_ready));
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  logic [7:0] mem [2**AW];
  logic gnt_r, full_r;
  always @(posedge clk) begin
    gnt_r <= ($urandom % 4) != 0; full_r <= ($urandom % 5) == 0;
    mem_rdata <= mem[mem_addr];
  end
  assign mem_gnt = mem_req && gnt_r;
  assign out_full = full_r;
  tb_util_pkg::bq_t got; int lasts = 0, lz_used = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_push && !out_full) begin got.push_back(out_data); if (out_last) lasts++; end
    if (lz_in_valid && lz_in_ready) lz_used++;
  end
  initial begin
    tb_util_pkg::bq_t maps [4], stored;
    int addr = 1000, used0;
    map_valid = 0; map_addr = 0; map_size = 0; map_compressed = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      maps[m] = {};
      for (int i = 0; i < 60 + 17 * m; i++) maps[m].push_back(m == 2 ? 8'h55 : 8'($urandom % 6));
      stored = (m % 2 == 0) ? lz78_encode(maps[m]) : maps[m];
      foreach (stored[i]) mem[AW'(addr + i)] = stored[i];   // wraps the memory
      got = {}; lasts = 0; used0 = lz_used;
      @(negedge clk);
      map_valid = 1; map_addr = AW'(addr); map_size = 16'(stored.size()); map_compressed = (m % 2 == 0);
      do @(posedge clk); while (!map_ready);
      @(negedge clk); map_valid = 0;
      fork
        wait (lasts == 1);
        repeat (5000) @(posedge clk);
      join_any
      disable fork;
      repeat (5) @(posedge clk);
      chk(lasts == 1 && got == maps[m], $sformatf("map %0d output (%0d bytes, %0d lasts)", m, got.size(), lasts));
      chk((m % 2 == 0) ? (lz_used - used0 == stored.size()) : (lz_used == used0), "engine used only for compressed maps");
      addr = (addr + stored.size()) % (2**AW);
    end
    chk(n_decomp == 2 && n_bypass == 2, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
