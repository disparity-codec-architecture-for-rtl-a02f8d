// enc_m2o: memory-to-output (M2O) state machine, the packet formatting and
// transmission part of the data framer.
//
// On cmd_valid (from the CDL logic, once per output slot) it sends one ATM
// block of exactly block_bytes bytes:
//   4 header bytes   type, payload size (2 bytes, high first), CRC byte
//   cmd_len bytes    payload, read from the map buffer from cmd_addr on
//   padding bytes    PAD_BYTE up to block_bytes
// The output interface runs at half the 27 MHz clock (13.5 MHz): one byte
// every second clock, marked by atm_valid, with atm_sob on the first byte of
// the block. During the payload M2O holds the buffer bus (mem_req on port 0
// of the arbiter, which always wins), reading each byte one clock before it
// is sent; it releases the bus for the padding. done pulses after the last
// byte. The CDL logic only issues a command when busy is low.
//
// Header fields and their order, the CRC byte, the padding to a constant
// block size, the bus ownership during the payload and the 13.5 MHz output
// rate follow the design; the type byte coding, the CRC polynomial and the
// padding value are this design's own (see codec_pkg).
module enc_m2o
  import codec_pkg::*;
#(
  parameter int         AW       = 19,
  parameter logic [7:0] PAD_BYTE = 8'h00
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [15:0]   block_bytes,
  input  logic          cmd_valid,
  input  blk_type_t     cmd_type,
  input  logic [AW-1:0] cmd_addr,
  input  logic [15:0]   cmd_len,
  output logic          busy,
  output logic          done,
  // memory arbiter port (read only)
  output logic          mem_req,
  output logic [AW-1:0] mem_addr,
  input  logic          mem_gnt,
  input  logic [7:0]    mem_rdata,
  // ATM multiplexer interface
  output logic          atm_valid,
  output logic [7:0]    atm_data,
  output logic          atm_sob
);
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PAY, S_PAD} state_t;
  state_t state;

  logic          phase;
  logic [1:0]    hidx;
  logic [15:0]   cnt, len, total;
  logic [AW-1:0] raddr;
  logic [31:0]   hdr;
  blk_hdr_t      h;

  assign h.btype  = cmd_type;
  assign h.size   = cmd_len;
  assign busy     = (state != S_IDLE);
  assign mem_req  = (state == S_PAY);
  assign mem_addr = raddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      phase     <= 1'b0;
      hidx      <= '0;
      cnt       <= '0;
      len       <= '0;
      total     <= '0;
      raddr     <= '0;
      hdr       <= '0;
      done      <= 1'b0;
      atm_valid <= 1'b0;
      atm_data  <= '0;
      atm_sob   <= 1'b0;
    end else begin
      done      <= 1'b0;
      atm_valid <= 1'b0;
      atm_sob   <= 1'b0;
      if (state != S_IDLE) phase <= !phase;
      case (state)
        S_IDLE: if (cmd_valid) begin
          hdr   <= {h, hdr_crc(h)};
          len   <= cmd_len;
          raddr <= cmd_addr;
          total <= block_bytes;
          cnt   <= '0;
          hidx  <= '0;
          phase <= 1'b0;
          state <= S_HDR;
        end
        S_HDR: if (phase) begin
          atm_valid <= 1'b1;
          atm_sob   <= (hidx == 2'd0);
          atm_data  <= hdr[31:24];
          hdr       <= hdr << 8;
          hidx      <= hidx + 1'b1;
          cnt       <= cnt + 1'b1;
          if (hidx == 2'd3) state <= (len != 0) ? S_PAY : S_PAD;
        end
        S_PAY: if (phase) begin
          // read issued in the previous (even) clock
          atm_valid <= 1'b1;
          atm_data  <= mem_rdata;
          raddr     <= raddr + 1'b1;
          cnt       <= cnt + 1'b1;
          if (cnt == 16'(HDR_BYTES) + len - 1) state <= S_PAD;
        end
        S_PAD: if (phase) begin
          if (cnt >= total) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            atm_valid <= 1'b1;
            atm_data  <= PAD_BYTE;
            cnt       <= cnt + 1'b1;
            if (cnt + 1'b1 >= total) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) mem_req |-> mem_gnt)
    else $error("enc_m2o: lost the buffer bus during a payload");
endmodule
