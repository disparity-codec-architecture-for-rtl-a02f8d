// tb_disparity_codec: end-to-end test of the encoder and decoder units at a
// reduced CCIR frame (23 lines of 80 bytes, 64 active bytes, 32-byte maps)
// and a 32-byte ATM block; see codec_e2e_bench for what is checked.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_disparity_codec;
  codec_e2e_bench #(.FULL(1'b0)) bench ();
endmodule
