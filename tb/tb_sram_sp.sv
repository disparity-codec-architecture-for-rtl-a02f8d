// tb_sram_sp: random writes and reads against a reference array; every read
// must return the last value written, one clock after the request.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_sram_sp;
  logic clk = 0; always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic en, we; logic [5:0] addr; logic [7:0] wdata, rdata;
  logic [7:0] ref_mem [64];
  sram_sp #(.DEPTH(64), .W(8)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  initial begin
    foreach (ref_mem[i]) ref_mem[i] = 0;
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 6'(i); wdata = 8'($urandom); ref_mem[i] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      logic [5:0] a;
      @(negedge clk);
      a = 6'($urandom);
      en = 1; addr = a;
      if ($urandom % 2) begin
        we = 1; wdata = 8'($urandom); ref_mem[a] = wdata;
      end else begin
        we = 0;
        @(negedge clk); en = 0;
        checks++;
        if (rdata !== ref_mem[a]) begin failures++; $display("FAIL addr %0d got %h exp %h", a, rdata, ref_mem[a]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
