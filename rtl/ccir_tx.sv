// ccir_tx: CCIR 601/656 transmitter of the disparity data transmission
// module (CCIR frame generator and depacketizer).
//
// Generates a continuous CCIR 601/656 stream, one byte per 27 MHz clock:
// LINES_PER_FRAME lines of LINE_BYTES bytes, each line made of the EAV code
// (FF 00 00 XY), blanking (80 10 80 10 ...), the SAV code and ACTIVE_BYTES
// active bytes. F is 1 from line F2_START on; V is 0 on the active lines
// F1_ACT_START..F1_ACT_END and F2_ACT_START..F2_ACT_END (lines counted from
// 1). On every fourth active line of each field (the 1st, 5th, ... of the
// field) the active bytes carry the disparity map: each map bit becomes one
// byte, MR_VALUE for 1 and ML_VALUE for 0, bit 7 of each map byte first.
// Other active lines carry the blanking pattern.
//
// At the start of each frame the transmitter looks at map_avail (a complete
// map waits in the output FIFO). If so, this frame pops that map's bytes from
// the FIFO (fifo_dout, first-word-fall-through, fifo_pop) and also writes
// them into the previous-map store; if not, the frame repeats the map in the
// store, which is how a dropped map is replaced by the last one received.
// frame_start pulses on the first byte of a frame; new_map tells whether that
// frame shows a new map.
//
// The 1 bit to 1 byte mapping, the CCIR framing and the repetition of the
// previous map follow the design; the line numbering defaults are those of
// the 625-line CCIR 656 format, with LINE_BYTES left at the 1720 bytes the
// design states. The content of non-disparity lines is this design's choice.
module ccir_tx
  import codec_pkg::*;
#(
  parameter int         LINE_BYTES      = 1720,
  parameter int         ACTIVE_BYTES    = 1440,
  parameter int         LINES_PER_FRAME = 625,
  parameter int         F2_START        = 313,
  parameter int         F1_ACT_START    = 23,
  parameter int         F1_ACT_END      = 310,
  parameter int         F2_ACT_START    = 336,
  parameter int         F2_ACT_END      = 623,
  parameter int         MAP_BYTES       = 25920,
  parameter logic [7:0] ML_VALUE        = 8'h10,
  parameter logic [7:0] MR_VALUE        = 8'hEB
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       map_avail,
  input  logic [7:0] fifo_dout,
  output logic       fifo_pop,
  output logic [7:0] dout,
  output logic       frame_start,
  output logic       new_map
);
  localparam int SAV_POS = LINE_BYTES - ACTIVE_BYTES - 4;
  localparam int ACT_POS = LINE_BYTES - ACTIVE_BYTES;
  localparam int MAW     = $clog2(MAP_BYTES);

  logic [10:0]    line;
  logic [$clog2(LINE_BYTES)-1:0] pos;
  logic           f, v, disp_line, use_new;
  logic [MAW-1:0] idx;
  logic [7:0]     cur;
  logic [7:0]     prev_map [MAP_BYTES];
  logic [7:0]     map_byte;
  logic [31:0]    k;
  logic           at_byte;

  initial begin
    for (int i = 0; i < MAP_BYTES; i++) prev_map[i] = '0;
  end

  always_comb begin
    f = (32'(line) >= F2_START);
    v = !((32'(line) >= F1_ACT_START && 32'(line) <= F1_ACT_END) ||
          (32'(line) >= F2_ACT_START && 32'(line) <= F2_ACT_END));
    disp_line = !v && (f ? ((32'(line) - F2_ACT_START) % 4 == 0)
                         : ((32'(line) - F1_ACT_START) % 4 == 0));
    k        = 32'(pos) - ACT_POS;
    at_byte  = disp_line && 32'(pos) >= ACT_POS && k[2:0] == 3'd0;
    map_byte = use_new ? fifo_dout : prev_map[idx];
    fifo_pop = at_byte && use_new;
  end

  always_ff @(posedge clk) begin
    if (at_byte && use_new) prev_map[idx] <= fifo_dout;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line        <= 11'd1;
      pos         <= '0;
      use_new     <= 1'b0;
      idx         <= '0;
      cur         <= '0;
      dout        <= '0;
      frame_start <= 1'b0;
      new_map     <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      // position counters
      if (32'(pos) == LINE_BYTES - 1) begin
        pos  <= '0;
        line <= (32'(line) == LINES_PER_FRAME) ? 11'd1 : line + 1'b1;
      end else begin
        pos <= pos + 1'b1;
      end
      if (line == 11'd1 && pos == '0) begin
        frame_start <= 1'b1;
        use_new     <= map_avail;
        new_map     <= map_avail;
        idx         <= '0;
      end
      // byte generation
      if (pos < 4) begin
        dout <= (pos == 0) ? 8'hFF : (pos == 3) ? ccir_xy(f, v, 1'b1) : 8'h00;
      end else if (32'(pos) < SAV_POS) begin
        dout <= pos[0] ? 8'h10 : 8'h80;
      end else if (32'(pos) < ACT_POS) begin
        dout <= (32'(pos) == SAV_POS) ? 8'hFF :
                (32'(pos) == ACT_POS - 1) ? ccir_xy(f, v, 1'b0) : 8'h00;
      end else if (v) begin
        dout <= pos[0] ? 8'h10 : 8'h80;
      end else if (disp_line) begin
        if (at_byte) begin
          cur  <= map_byte;
          dout <= map_byte[7] ? MR_VALUE : ML_VALUE;
          if (32'(idx) < MAP_BYTES - 1) idx <= idx + 1'b1;
        end else begin
          dout <= cur[3'd7 - k[2:0]] ? MR_VALUE : ML_VALUE;
        end
      end else begin
        dout <= pos[0] ? 8'h10 : 8'h80;
      end
    end
  end
endmodule
