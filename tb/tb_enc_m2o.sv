// tb_enc_m2o: for blocks with and without payload, the ATM output must be
// exactly block_bytes bytes, one every second clock, starting with the
// header {type, size high, size low, CRC-8 of those three}, then the payload
// read from the buffer, then padding; done must follow the last byte.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_enc_m2o;
  import codec_pkg::*;
  import tb_util_pkg::*;
  localparam int AW = 7;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic [15:0] block_bytes, cmd_len; logic cmd_valid, busy, done; blk_type_t cmd_type;
  logic [AW-1:0] cmd_addr, mem_addr; logic mem_req, mem_gnt; logic [7:0] mem_rdata;
  logic atm_valid, atm_sob; logic [7:0] atm_data;
  enc_m2o #(.AW(AW)) dut (.*);
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  logic [7:0] mem [2**AW];
  assign mem_gnt = mem_req;
  always @(posedge clk) if (mem_req) mem_rdata <= mem[mem_addr];
  byte unsigned got [$]; longint last_t = 0, cyc = 0; bit pace_ok = 1; int dones = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (atm_valid) begin
      if (got.size() > 0 && cyc - last_t != 2) pace_ok = 0;
      if (atm_sob != (got.size() == 0)) pace_ok = 0;
      got.push_back(atm_data); last_t = cyc;
    end
    if (done) dones++;
  end
  task automatic blk(logic [7:0] t, int addr, int len, int bb);
    tb_util_pkg::bq_t h;
    got.delete(); pace_ok = 1; dones = 0;
    @(negedge clk);
    block_bytes = 16'(bb); cmd_valid = 1; cmd_type = t; cmd_addr = AW'(addr); cmd_len = 16'(len);
    @(negedge clk); cmd_valid = 0;
    wait (dones == 1); @(posedge clk);
    h = {t, 8'(len >> 8), 8'(len)};
    chk(got.size() == bb, $sformatf("block length %0d", got.size()));
    chk(pace_ok, "one byte every second clock, sob first");
    chk(got[0] == t && got[1] == 8'(len >> 8) && got[2] == 8'(len) && got[3] == crc8(h), "header");
    for (int i = 0; i < len; i++) chk(got[4 + i] == mem[AW'(addr + i)], "payload");
    for (int i = 4 + len; i < bb; i++) chk(got[i] == 8'h00, "padding");
  endtask
  initial begin
    foreach (mem[i]) mem[i] = 8'($urandom);
    cmd_valid = 0; block_bytes = 0; cmd_type = '0; cmd_addr = 0; cmd_len = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    blk(8'h03, 5, 20, 40);
    blk(8'h07, 120, 36, 40);   // wraps around the buffer end
    blk(8'h00, 0, 0, 16);
    blk(8'h0B, 0, 12, 16);     // payload fills the block: no padding
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
