// disparity_filter: disparity data filter and byte packetizer.
//
// Each active byte of a disparity line holds one of two values, ML or MR,
// so it carries one bit: 1 for MR, 0 for anything else. Eight consecutive
// bits are packed into one byte, first bit in bit 7. Each finished byte is
// held back until the next one is finished or the frame ends, so that the
// last byte of a map can be marked: on sync (end of frame) a partly filled
// byte is completed with zeros and the held byte goes out with last = 1.
// Output is push-only (out_valid, out_data, out_last) into the input FIFO;
// the CCIR stream cannot be held up, so the parent drops bytes the FIFO
// cannot take. One output byte per eight disparity bytes, one clock after
// the eighth.
//
// The two-valued bytes, one bit each and eight per byte follow the design;
// the bit order and the test against MR alone are this design's choice.
module disparity_filter #(
  parameter logic [7:0] MR_VALUE = 8'hEB
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       act_valid,
  input  logic [7:0] act_data,
  input  logic       act_disp,
  input  logic       sync,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_last
);
  logic [6:0] shreg;
  logic [2:0] nbits;
  logic [7:0] held;
  logic       held_valid;
  logic       flush;
  logic       bit_in;
  logic [7:0] done_byte;

  assign bit_in    = (act_data == MR_VALUE);
  assign done_byte = {shreg, bit_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      nbits      <= '0;
      held       <= '0;
      held_valid <= 1'b0;
      flush      <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_last   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (flush) begin
        out_valid  <= 1'b1;
        out_data   <= held;
        out_last   <= 1'b1;
        held_valid <= 1'b0;
        flush      <= 1'b0;
      end else if (sync) begin
        if (nbits != 0) begin
          // a partial byte: zero pad it; it becomes the last byte
          if (held_valid) begin
            out_valid <= 1'b1;
            out_data  <= held;
          end
          held       <= 8'({1'b0, shreg} << (4'd8 - 4'(nbits)));
          held_valid <= 1'b1;
          flush      <= 1'b1;
          nbits      <= '0;
          shreg      <= '0;
        end else if (held_valid) begin
          out_valid  <= 1'b1;
          out_data   <= held;
          out_last   <= 1'b1;
          held_valid <= 1'b0;
        end
      end else if (act_valid && act_disp) begin
        if (nbits == 3'd7) begin
          if (held_valid) begin
            out_valid <= 1'b1;
            out_data  <= held;
          end
          held       <= done_byte;
          held_valid <= 1'b1;
          nbits      <= '0;
        end else begin
          shreg <= {shreg[5:0], bit_in};
          nbits <= nbits + 1'b1;
        end
      end
    end
  end
endmodule
