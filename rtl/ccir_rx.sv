// ccir_rx: CCIR 601/656 receiver front end of the disparity data reception
// module.
//
// The input is the 8-bit, 27 MHz CCIR stream, one byte per clock. The
// receiver looks for the timing reference sequence FF 00 00 XY and takes the
// field (F), vertical blanking (V) and SAV/EAV (H) bits from XY. After an
// SAV with V = 0 the next ACTIVE_BYTES bytes are active video and are given
// out on act_valid/act_data, with act_disp set on every fourth active line of
// each field (the 1st, 5th, 9th ...), which are the lines that carry
// disparity data. A change of F from 1 to 0, seen in any timing reference,
// is the frame boundary: sync pulses for one cycle there. It is the
// end-of-frame signal the data framer times the output slots from.
//
// Timing: act_valid follows the byte on din by one clock; sync is raised in
// the clock after the XY byte. The protection bits of XY are not checked.
// That the data sit on every fourth line and the sync comes from the timing
// references follows the design; which line of four is used and the choice
// of the F edge as the boundary are this design's own.
module ccir_rx #(
  parameter int ACTIVE_BYTES = 1440
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] din,
  output logic       act_valid,
  output logic [7:0] act_data,
  output logic       act_disp,
  output logic       sync,
  output logic       field,
  output logic       vblank
);
  logic [7:0]  d1, d2, d3;
  logic        is_xy;
  logic        in_active;
  logic [$clog2(ACTIVE_BYTES+1)-1:0] bcnt;
  logic [9:0]  line_in_field;
  logic        disp_line;

  assign is_xy = (d3 == 8'hFF) && (d2 == 8'h00) && (d1 == 8'h00) && din[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1 <= '0; d2 <= '0; d3 <= '0;
      in_active     <= 1'b0;
      bcnt          <= '0;
      line_in_field <= '0;
      disp_line     <= 1'b0;
      field         <= 1'b0;
      vblank        <= 1'b1;
      sync          <= 1'b0;
      act_valid     <= 1'b0;
      act_data      <= '0;
      act_disp      <= 1'b0;
    end else begin
      d1 <= din; d2 <= d1; d3 <= d2;
      sync      <= 1'b0;
      act_valid <= 1'b0;
      if (in_active) begin
        act_valid <= 1'b1;
        act_data  <= din;
        act_disp  <= disp_line;
        bcnt      <= bcnt + 1'b1;
        if (32'(bcnt) == ACTIVE_BYTES - 1) in_active <= 1'b0;
      end
      if (is_xy) begin
        field  <= din[6];
        vblank <= din[5];
        if (field && !din[6]) sync <= 1'b1;
        if (din[5]) line_in_field <= '0;
        if (!din[4] && !din[5]) begin
          // SAV of an active line
          in_active     <= 1'b1;
          bcnt          <= '0;
          disp_line     <= (line_in_field[1:0] == 2'b00);
          line_in_field <= line_in_field + 1'b1;
        end
      end
    end
  end
endmodule
