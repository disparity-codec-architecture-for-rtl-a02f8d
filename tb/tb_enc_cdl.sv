// tb_enc_cdl: scripted slots and map descriptors with a 20-byte block
// (16 payload bytes): a map that fits is sent whole; a 30-byte uncompressed
// map is split 16 + 14 over two slots and the map of the second slot is
// dropped; a map too big for two slots is dropped with an empty block; a
// slot that finds no map sends an empty block and the late map is dropped
// on arrival. Buffer space must be released only after the block is sent.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_enc_cdl;
  import codec_pkg::*;
  localparam int AW = 8;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic [15:0] block_bytes; logic slot_valid, slot_ready;
  logic desc_valid, desc_raw, desc_ready; logic [AW-1:0] desc_addr; logic [15:0] desc_size;
  logic cmd_valid, m2o_busy, m2o_done; blk_type_t cmd_type; logic [AW-1:0] cmd_addr; logic [15:0] cmd_len;
  logic rel_valid; logic [AW-1:0] rel_ptr; logic in_ub;
  logic [15:0] n_whole, n_frag, n_drop, n_empty;
  enc_cdl #(.AW(AW)) dut (.*);
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  // descriptor queue and M2O stand-in
  typedef struct { int addr; int size; bit raw; } d_t;
  d_t dq [$];
  always @(posedge clk) begin
    if (desc_valid && desc_ready) void'(dq.pop_front());
    desc_valid <= dq.size() > 0;
    desc_addr  <= (dq.size() > 0) ? AW'(dq[0].addr) : '0;
    desc_size  <= (dq.size() > 0) ? 16'(dq[0].size) : '0;
    desc_raw   <= (dq.size() > 0) ? dq[0].raw : 1'b0;
  end
  int busy_cnt = 0;
  always_comb m2o_busy = busy_cnt > 0;
  blk_type_t c_type; int c_addr, c_len, cmds = 0, rels = 0, rel_at = -1;
  always @(posedge clk) begin
    m2o_done <= 1'b0;
    if (cmd_valid) begin busy_cnt <= 10; c_type = cmd_type; c_addr = cmd_addr; c_len = cmd_len; cmds++; end
    else if (busy_cnt > 0) begin busy_cnt <= busy_cnt - 1; if (busy_cnt == 1) m2o_done <= 1'b1; end
    if (rel_valid && rst_n) begin rels++; rel_at = rel_ptr; chk(busy_cnt == 0 || cmd_valid, "release while sending"); end
  end

  task automatic slot();
    int c0 = cmds;
    @(negedge clk); slot_valid = 1;
    do @(posedge clk); while (!slot_ready);
    @(negedge clk); slot_valid = 0;
    wait (cmds == c0 + 1);
    repeat (14) @(posedge clk);
  endtask

  initial begin
    block_bytes = 20; slot_valid = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // 1: fits
    dq.push_back('{addr: 0, size: 10, raw: 0});
    slot();
    chk(c_type.present && c_type.compressed && c_type.frag == FRAG_WHOLE && c_addr == 0 && c_len == 10, "whole map");
    chk(rels == 1 && rel_at == 10, $sformatf("release after whole map %0d %0d", rels, rel_at));
    // 2: two slots, next map dropped
    dq.push_back('{addr: 10, size: 30, raw: 1});
    slot();
    chk(c_type.present && !c_type.compressed && c_type.frag == FRAG_FIRST && c_addr == 10 && c_len == 16, "first fragment");
    chk(in_ub, "UB after first fragment");
    chk(rels == 1, "no release after first fragment");
    dq.push_back('{addr: 40, size: 5, raw: 0});
    slot();
    chk(c_type.present && !c_type.compressed && c_type.frag == FRAG_SECOND && c_addr == 26 && c_len == 14, "second fragment");
    chk(!in_ub && dq.size() == 0, "CB again, present map dropped");
    chk(rels == 2 && rel_at == 45, "release covers the dropped map");
    // 3: too big for two slots
    dq.push_back('{addr: 45, size: 40, raw: 1});
    slot();
    chk(!c_type.present && c_len == 0 && rels == 3 && rel_at == 85, "oversize map dropped, empty block");
    // 4: no map ready at the slot
    slot();
    chk(!c_type.present && c_len == 0 && rels == 3, "empty slot");
    dq.push_back('{addr: 85, size: 6, raw: 0});
    repeat (5) @(posedge clk);
    chk(dq.size() == 0 && rels == 4 && rel_at == 91, "late map dropped on arrival");
    // 5: the next map goes out normally
    dq.push_back('{addr: 91, size: 16, raw: 0});
    slot();
    chk(c_type.frag == FRAG_WHOLE && c_type.present && c_addr == 91 && c_len == 16, "map filling the slot exactly");
    chk(n_whole == 2 && n_frag == 1 && n_drop == 3 && n_empty == 1, $sformatf("counters %0d %0d %0d %0d", n_whole, n_frag, n_drop, n_empty));
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
