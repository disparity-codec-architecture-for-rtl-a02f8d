// tb_enc_c2m: maps of random length are streamed into a 64-byte circular
// buffer while the bus grant is withheld at random. Checks: each byte lands
// at the next address, a restart rewrites the map from its start, each
// commit queues the right {start, size, raw} descriptor, and writing stops
// when the buffer is full until space is released.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_enc_c2m;
  localparam int AW = 6;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic in_valid, in_restart, in_ready, commit_valid, commit_raw;
  logic [7:0] in_data; logic [15:0] commit_size;
  logic mem_req, mem_we, mem_gnt; logic [AW-1:0] mem_addr; logic [7:0] mem_wdata;
  logic desc_valid, desc_raw, desc_ready; logic [AW-1:0] desc_addr; logic [15:0] desc_size;
  logic rel_valid; logic [AW-1:0] rel_ptr; logic [AW:0] used;
  enc_c2m #(.AW(AW), .DESC_AW(3)) dut (.*);
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  logic [7:0] mem [2**AW];
  always @(posedge clk) gnt_r <= ($urandom % 3 != 0);
  logic gnt_r;
  assign mem_gnt = mem_req && gnt_r;
  always @(posedge clk) if (mem_req && mem_gnt && mem_we) mem[mem_addr] <= mem_wdata;

  int exp_start = 0;
  task automatic send(int n, bit restart_after, int k);
    // n bytes; if restart_after, resend k bytes from the start
    int c0;
    logic [7:0] b [$];
    for (int i = 0; i < n; i++) begin
      @(negedge clk); in_valid = 1; in_restart = 0; in_data = 8'($urandom); b.push_back(in_data);
      do @(posedge clk); while (!in_ready);
    end
    if (restart_after) begin
      b.delete();
      for (int i = 0; i < k; i++) begin
        @(negedge clk); in_valid = 1; in_restart = (i == 0); in_data = 8'($urandom); b.push_back(in_data);
        do @(posedge clk); while (!in_ready);
      end
    end
    @(negedge clk); in_valid = 0; in_restart = 0;
    commit_valid = 1; commit_size = 16'(b.size()); commit_raw = restart_after;
    @(negedge clk); commit_valid = 0;
    @(posedge clk); #1;
    chk(desc_valid && desc_addr == AW'(exp_start) && desc_size == 16'(b.size()) && desc_raw == restart_after,
        $sformatf("descriptor start %0d size %0d", desc_addr, desc_size));
    foreach (b[i]) chk(mem[AW'(exp_start + i)] == b[i], "buffer byte");
    @(negedge clk); desc_ready = 1; @(negedge clk); desc_ready = 0;
    exp_start = (exp_start + b.size()) % (2**AW);
  endtask

  initial begin
    in_valid = 0; in_restart = 0; in_data = 0; commit_valid = 0; commit_size = 0; commit_raw = 0;
    desc_ready = 0; rel_valid = 0; rel_ptr = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    send(10, 0, 0);
    send(12, 1, 7);
    // release what has been sent so far
    @(negedge clk); rel_valid = 1; rel_ptr = AW'(exp_start); @(negedge clk); rel_valid = 0;
    send(20, 0, 0);
    send(30, 1, 25);
    // 45 bytes outstanding since the release: fill to the brim (63 bytes)
    begin
      int sent = 0;
      for (int i = 0; i < 30; i++) begin
        @(negedge clk); in_valid = 1; in_data = 8'(i);
        repeat (4) begin @(posedge clk); if (in_ready) break; end
        if (in_ready) sent++;
      end
      @(negedge clk); in_valid = 0;
      chk(sent == 18, $sformatf("stops when full, sent %0d", sent));
      @(negedge clk); rel_valid = 1; rel_ptr = AW'(exp_start); @(negedge clk); rel_valid = 0;
      @(negedge clk); in_valid = 1;
      repeat (10) begin @(posedge clk); if (in_ready) break; end
      chk(in_ready, "resumes after release");
      @(negedge clk); in_valid = 0;
    end
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
