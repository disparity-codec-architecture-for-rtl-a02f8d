// tb_codec_full: end-to-end test of disparity_codec with every parameter at
// its default: 625-line CCIR frames of 1720-byte lines, 25920-byte maps,
// a 512 Kbyte map buffer and 13000-byte ATM blocks (0.96 ms at 13.5 MHz).
// Sixteen maps are sent; see codec_e2e_bench for what is checked.
//
// The stimulus and the expected values are worked out by this testbench
// itself; what is checked is the behaviour described for the design.
module tb_codec_full;
  codec_e2e_bench #(
    .FULL(1'b1), .LINE_BYTES(1720), .ACTIVE_BYTES(1440), .LINES_PER_FRAME(625),
    .F2_START(313), .F1_ACT_START(23), .F1_ACT_END(310), .F2_ACT_START(336),
    .F2_ACT_END(623), .BLOCK_BYTES(13000), .SMALL_BLOCK(8000), .NFRAMES(16), .CPB(4)
  ) bench ();
endmodule
