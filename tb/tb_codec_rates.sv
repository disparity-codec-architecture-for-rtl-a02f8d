// tb_codec_rates: the whole codec at its default size at four channel rates,
// 0.88, 1.40, 2.07 and 2.90 Mbit/s (ATM blocks of 4400, 7000, 10350 and
// 14500 bytes at 25 blocks/s), six maps per rate, with an encoder delay of
// one frame period plus 20 clocks and a decoder delay of a quarter frame.
// See codec_rate_bench for what is checked.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_codec_rates;
  codec_rate_bench #(.ENC_DELAY(1075020), .DEC_DELAY(268750)) bench ();
  initial begin
    wait (bench.done);
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures);
    $finish;
  end
endmodule
