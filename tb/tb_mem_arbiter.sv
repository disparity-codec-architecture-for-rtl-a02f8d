// tb_mem_arbiter: random requests on both ports; port 0 must always be
// granted, port 1 only when port 0 is idle, and the SRAM side must carry
// the granted port's command.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_mem_arbiter;
  int checks = 0, failures = 0;
  logic req0, we0, gnt0, req1, we1, gnt1, mem_en, mem_we;
  logic [7:0] addr0, addr1, mem_addr;
  logic [7:0] wdata0, wdata1, mem_wdata;
  mem_arbiter #(.AW(8), .W(8)) dut (.*);
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    for (int n = 0; n < 1000; n++) begin
      {req0, we0, req1, we1} = 4'($urandom);
      addr0 = 8'($urandom); addr1 = 8'($urandom); wdata0 = 8'($urandom); wdata1 = 8'($urandom);
      #1;
      chk(gnt0 == req0, "gnt0");
      chk(gnt1 == (req1 && !req0), "gnt1");
      chk(mem_en == (req0 || req1), "en");
      if (req0) chk(mem_addr == addr0 && mem_we == we0 && mem_wdata == wdata0, "port0 mux");
      else if (req1) chk(mem_addr == addr1 && mem_we == we1 && mem_wdata == wdata1, "port1 mux");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
