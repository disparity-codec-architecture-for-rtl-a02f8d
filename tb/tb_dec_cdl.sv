// tb_dec_cdl: scripted slot results. A whole map is passed on as it is; a
// first fragment followed by a second one is joined into one map starting
// at the first; an empty slot passes nothing; a first fragment not followed
// by a second is discarded and the block that broke the pair is handled
// normally.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_dec_cdl;
  import codec_pkg::*;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic slot_done; blk_type_t slot_type; logic [15:0] slot_size; logic [AW-1:0] slot_addr;
  logic map_valid, map_compressed, in_ub; logic [AW-1:0] map_addr; logic [15:0] map_size;
  logic [15:0] n_whole, n_reasm, n_discard, n_empty;
  dec_cdl #(.AW(AW)) dut (.*);
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  int maps = 0, m_addr, m_size; bit m_comp;
  always @(posedge clk) if (rst_n && map_valid) begin maps++; m_addr = map_addr; m_size = map_size; m_comp = map_compressed; end
  task automatic slot(bit present, bit comp, frag_t fr, int size, int addr);
    @(negedge clk);
    slot_done = 1; slot_type = '0;
    slot_type.present = present; slot_type.compressed = comp; slot_type.frag = fr;
    slot_size = 16'(size); slot_addr = AW'(addr);
    @(negedge clk); slot_done = 0;
    repeat (2) @(posedge clk);
  endtask
  initial begin
    slot_done = 0; slot_type = '0; slot_size = 0; slot_addr = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    slot(1, 1, FRAG_WHOLE, 50, 0);
    chk(maps == 1 && m_addr == 0 && m_size == 50 && m_comp, "whole compressed map");
    slot(1, 0, FRAG_FIRST, 100, 50);
    chk(maps == 1 && in_ub, "first fragment held, UB");
    slot(1, 0, FRAG_SECOND, 60, 150);
    chk(maps == 2 && m_addr == 50 && m_size == 160 && !m_comp && !in_ub, "reassembled map");
    slot(0, 0, FRAG_WHOLE, 0, 210);
    chk(maps == 2 && n_empty == 1, "empty slot");
    slot(1, 1, FRAG_FIRST, 100, 210);
    slot(1, 1, FRAG_WHOLE, 30, 310);   // pair broken: fragment discarded, map taken
    chk(maps == 3 && m_addr == 310 && m_size == 30 && n_discard == 1 && !in_ub, "broken pair");
    slot(1, 1, FRAG_SECOND, 30, 340);  // stray second fragment
    chk(maps == 3 && n_discard == 2, "stray second fragment discarded");
    chk(n_whole == 2 && n_reasm == 1, "counters");
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
