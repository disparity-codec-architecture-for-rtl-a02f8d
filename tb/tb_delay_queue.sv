// tb_delay_queue: events with payloads pushed at random times must come out
// in order, each exactly `delay` clocks after it went in (out_ready held
// high), and pushing into a full queue must raise overflow.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_delay_queue;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic [31:0] delay;
  logic in_valid, out_valid, out_ready, overflow;
  logic [7:0] in_data, out_data;
  longint cyc = 0;
  longint t_q [$]; logic [7:0] d_q [$];
  delay_queue #(.DATA_W(8), .AW(3)) dut (.*);
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    if (in_valid) begin t_q.push_back(cyc); d_q.push_back(in_data); end
    if (out_valid && out_ready) begin
      longint t; logic [7:0] d;
      t = t_q.pop_front(); d = d_q.pop_front();
      checks++;
      if (cyc - t != longint'(delay) || out_data != d) begin
        failures++; $display("FAIL latency %0d data %h exp %h", cyc - t, out_data, d);
      end
    end
  end
  initial begin
    delay = 37; in_valid = 0; in_data = 0; out_ready = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 6 == 0) && t_q.size() < 7; in_data = 8'($urandom);
    end
    @(negedge clk); in_valid = 0;
    repeat (100) @(posedge clk);
    checks++; if (overflow) begin failures++; $display("FAIL spurious overflow"); end
    // fill it while the output is held
    out_ready = 0;
    for (int n = 0; n < 9; n++) begin @(negedge clk); in_valid = 1; in_data = 8'(n); end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    checks++; if (!overflow) begin failures++; $display("FAIL no overflow"); end
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
