// tb_dec_rx: ATM blocks built by the testbench (header with CRC-8, payload,
// padding; one byte every second clock) are fed in. Each block must give a
// slot sync and a slot_done with its type and size, the payload must be
// written to consecutive buffer addresses, padding must not be written, a
// header with one flipped bit must be corrected and counted, and one with
// two flipped bits must be reported as bad.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_dec_rx;
  import codec_pkg::*;
  import tb_util_pkg::*;
  localparam int AW = 7;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic atm_valid, atm_sob; logic [7:0] atm_data;
  logic mem_req; logic [AW-1:0] mem_addr; logic [7:0] mem_wdata;
  logic hdr_valid, slot_done; blk_type_t slot_type; logic [15:0] slot_size, n_corrected, n_hdr_bad;
  logic [AW-1:0] slot_addr;
  dec_rx #(.AW(AW)) dut (.*);
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  logic [7:0] mem [2**AW]; int writes = 0, syncs = 0, dones = 0;
  blk_type_t d_type; int d_size, d_addr;
  always @(posedge clk) if (rst_n) begin
    if (mem_req) begin mem[mem_addr] <= mem_wdata; writes++; end
    if (hdr_valid) syncs++;
    if (slot_done) begin dones++; d_type = slot_type; d_size = slot_size; d_addr = slot_addr; end
  end
  int wp = 0;
  task automatic send(logic [7:0] t, int len, int bb, int flip_a, int flip_b);
    tb_util_pkg::bq_t h, b;
    int w0 = writes, s0 = syncs, d0 = dones;
    logic [7:0] pay [$];
    h = {t, 8'(len >> 8), 8'(len)};
    b = {h, crc8(h)};
    for (int i = 0; i < len; i++) begin pay.push_back(8'($urandom)); b.push_back(pay[i]); end
    while (b.size() < bb) b.push_back(8'h00);
    if (flip_a >= 0) b[flip_a / 8][flip_a % 8] ^= 1'b1;
    if (flip_b >= 0) b[flip_b / 8][flip_b % 8] ^= 1'b1;
    foreach (b[i]) begin
      @(negedge clk); atm_valid = 1; atm_sob = (i == 0); atm_data = b[i];
      @(negedge clk); atm_valid = 0; atm_sob = 0;
    end
    repeat (3) @(posedge clk);
    chk(syncs == s0 + 1 && dones == d0 + 1, "one sync and one slot_done per block");
    if (flip_b < 0) begin
      chk(d_type == t && d_size == (t[0] ? len : 0) && d_addr == wp, $sformatf("slot fields %h %0d %0d", d_type, d_size, d_addr));
      chk(writes == w0 + (t[0] ? len : 0), "payload bytes written, padding not");
      if (t[0]) for (int i = 0; i < len; i++) chk(mem[AW'(wp + i)] == pay[i], "payload byte");
      if (t[0]) wp = (wp + len) % (2**AW);
    end else begin
      chk(d_type == '0 && d_size == 0 && writes == w0, "bad header: empty slot");
    end
  endtask
  initial begin
    atm_valid = 0; atm_sob = 0; atm_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    send(8'h03, 20, 30, -1, -1);
    send(8'h05, 24, 28, -1, -1);
    send(8'h09, 10, 28, 13, -1);    // one bit of the size field flipped
    chk(n_corrected == 1, "correction counted");
    send(8'h03, 100, 110, 26, -1);  // one bit of the CRC byte flipped, wraps the buffer
    send(8'h00, 0, 12, -1, -1);     // empty block
    send(8'h03, 8, 20, 2, 9);       // two bits flipped
    chk(n_hdr_bad == 1 && n_corrected == 2, "bad header counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
