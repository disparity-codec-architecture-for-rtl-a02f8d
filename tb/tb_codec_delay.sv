// tb_codec_delay: the whole codec at its default size with the longest
// encoder delay, 1 s (27,000,000 clocks, so 25 maps wait in the encoder's
// buffer), and the shortest decoder delay, 170 ms (4,590,000 clocks), at
// 2.90 Mbit/s (14500-byte blocks), twelve maps. Every block must leave
// exactly the programmed delay after its frame end and the delivered maps
// must match the prediction; see codec_rate_bench.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_codec_delay;
  codec_rate_bench #(.NSEG(1), .RATE_BB('{14500, 0, 0, 0}), .PER(12),
                     .ENC_DELAY(27000000), .DEC_DELAY(4590000)) bench ();
  initial begin
    wait (bench.done);
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures);
    $finish;
  end
endmodule
