// dec_rx: packet reception and header decoding logic of the data deframer.
//
// Takes the ATM demultiplexer byte stream (atm_valid strobes a byte,
// atm_sob marks the first byte of a block). The first four bytes of a block
// are the header: type, payload size (2 bytes) and the CRC byte. The header
// is checked and, if one bit is wrong, corrected (codec_pkg::hdr_correct).
// hdr_valid then pulses: it is the slot synchronisation signal of the
// decoder. The next `size` bytes are the payload; each is written straight
// into the map data buffer at the write pointer through port 0 of the memory
// arbiter, which always wins, so the ATM side is never held up. Padding
// bytes are ignored. When the payload is complete (at once for a block
// without payload or with a header that cannot be corrected) slot_done
// pulses with the decoded type, size and the buffer address of the
// payload's first byte. The buffer is circular (2**AW bytes) and the write
// pointer simply wraps: maps are read out long before they are overwritten.
//
// Header decoding, the single-bit correction and storing the payload in a
// buffer follow the design; the type coding and polynomial are this
// design's own (codec_pkg).
module dec_rx
  import codec_pkg::*;
#(
  parameter int AW = 19
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          atm_valid,
  input  logic [7:0]    atm_data,
  input  logic          atm_sob,
  // memory arbiter port 0 (write only)
  output logic          mem_req,
  output logic [AW-1:0] mem_addr,
  output logic [7:0]    mem_wdata,
  // slot events
  output logic          hdr_valid,
  output logic          slot_done,
  output blk_type_t     slot_type,
  output logic [15:0]   slot_size,
  output logic [AW-1:0] slot_addr,
  output logic [15:0]   n_corrected,
  output logic [15:0]   n_hdr_bad
);
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PAY} state_t;
  state_t state;

  logic [23:0]   hbuf;
  logic [1:0]    hcnt;
  logic [AW-1:0] wptr;
  logic [15:0]   remain;
  logic [32:0]   corr;
  blk_hdr_t      hd;

  assign corr      = hdr_correct({hbuf, atm_data});
  assign hd        = corr[31:8];
  assign mem_req   = (state == S_PAY) && atm_valid;
  assign mem_addr  = wptr;
  assign mem_wdata = atm_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      hbuf        <= '0;
      hcnt        <= '0;
      wptr        <= '0;
      remain      <= '0;
      hdr_valid   <= 1'b0;
      slot_done   <= 1'b0;
      slot_type   <= '0;
      slot_size   <= '0;
      slot_addr   <= '0;
      n_corrected <= '0;
      n_hdr_bad   <= '0;
    end else begin
      hdr_valid <= 1'b0;
      slot_done <= 1'b0;
      if (atm_valid && atm_sob) begin
        // a new block always restarts header collection
        state <= S_HDR;
        hbuf  <= {16'h0, atm_data};
        hcnt  <= 2'd1;
      end else if (atm_valid) begin
        case (state)
          S_HDR: begin
            if (hcnt != 2'd3) begin
              hbuf <= {hbuf[15:0], atm_data};
              hcnt <= hcnt + 1'b1;
            end else begin
              hdr_valid <= 1'b1;
              slot_addr <= wptr;
              if (!corr[32]) begin
                n_hdr_bad <= n_hdr_bad + 1'b1;
                slot_type <= '0;
                slot_size <= '0;
                slot_done <= 1'b1;
                state     <= S_IDLE;
              end else begin
                if (hdr_syndrome({hbuf, atm_data}) != 8'h00)
                  n_corrected <= n_corrected + 1'b1;
                slot_type <= hd.btype;
                slot_size <= hd.btype.present ? hd.size : 16'h0;
                remain    <= hd.size;
                if (!hd.btype.present || hd.size == 0) begin
                  slot_done <= 1'b1;
                  state     <= S_IDLE;
                end else begin
                  state <= S_PAY;
                end
              end
            end
          end
          S_PAY: begin
            wptr   <= wptr + 1'b1;
            remain <= remain - 1'b1;
            if (remain == 16'd1) begin
              slot_done <= 1'b1;
              state     <= S_IDLE;
            end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
