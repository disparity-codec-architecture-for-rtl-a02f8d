// decompression_module: the decoder's decompression module around an
// external LZ-78 decompression engine, with the compressed/uncompressed
// switch.
//
// A released map (map_valid with its buffer address, size and compressed
// flag, held until map_ready) is read byte by byte from the map data buffer
// through port 1 of the memory arbiter, which yields to the packet receiver.
// Each read takes a request clock (repeated until granted) and a data clock.
//  - compressed map: the bytes go to the engine (lz_in_*, lz_in_last on the
//    final one); whatever the engine returns (lz_out_*) is pushed into the
//    output FIFO, the engine's last flag marking the end of the map.
//  - uncompressed map: the bytes bypass the engine and go straight into the
//    output FIFO, the final one marked last.
// The next map is started only when the current one has reached the FIFO
// completely, so the two paths never mix. Pushes wait while the FIFO is
// full (out_full).
//
// The switch between engine and bypass, steered by the compressed flag of
// the block header, follows the design; the byte-serial read and the
// ordering rule are this design's own.
module decompression_module #(
  parameter int AW = 19
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          map_valid,
  input  logic [AW-1:0] map_addr,
  input  logic [15:0]   map_size,
  input  logic          map_compressed,
  output logic          map_ready,
  // memory arbiter port 1 (read only)
  output logic          mem_req,
  output logic [AW-1:0] mem_addr,
  input  logic          mem_gnt,
  input  logic [7:0]    mem_rdata,
  // LZ decompression engine
  output logic          lz_in_valid,
  output logic [7:0]    lz_in_data,
  output logic          lz_in_last,
  input  logic          lz_in_ready,
  input  logic          lz_out_valid,
  input  logic [7:0]    lz_out_data,
  input  logic          lz_out_last,
  output logic          lz_out_ready,
  // output FIFO
  output logic          out_push,
  output logic [7:0]    out_data,
  output logic          out_last,
  input  logic          out_full,
  output logic [15:0]   n_decomp,
  output logic [15:0]   n_bypass
);
  typedef enum logic [2:0] {S_IDLE, S_REQ, S_DATA, S_SEND, S_WAIT} state_t;
  state_t state;

  logic [AW-1:0] raddr;
  logic [15:0]   remain;
  logic          comp;
  logic [7:0]    hold;
  logic          send_fire;

  assign map_ready = (state == S_IDLE);
  assign mem_req   = (state == S_REQ);
  assign mem_addr  = raddr;

  assign lz_in_valid = (state == S_SEND) && comp;
  assign lz_in_data  = hold;
  assign lz_in_last  = (remain == 16'd1);

  // the engine output is drained while a compressed map is in progress
  assign lz_out_ready = comp && (state != S_IDLE) && !out_full;

  always_comb begin
    out_push  = 1'b0;
    out_data  = hold;
    out_last  = (remain == 16'd1);
    send_fire = 1'b0;
    if (comp) begin
      out_push  = lz_out_valid && lz_out_ready;
      out_data  = lz_out_data;
      out_last  = lz_out_last;
      send_fire = (state == S_SEND) && lz_in_ready;
    end else if (state == S_SEND && !out_full) begin
      out_push  = 1'b1;
      send_fire = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      raddr    <= '0;
      remain   <= '0;
      comp     <= 1'b0;
      hold     <= '0;
      n_decomp <= '0;
      n_bypass <= '0;
    end else begin
      case (state)
        S_IDLE: if (map_valid) begin
          raddr  <= map_addr;
          remain <= map_size;
          comp   <= map_compressed;
          if (map_compressed) n_decomp <= n_decomp + 1'b1;
          else                n_bypass <= n_bypass + 1'b1;
          state  <= (map_size == 0) ? S_IDLE : S_REQ;
        end
        S_REQ:  if (mem_gnt) state <= S_DATA;
        S_DATA: begin
          hold  <= mem_rdata;
          state <= S_SEND;
        end
        S_SEND: if (send_fire) begin
          raddr  <= raddr + 1'b1;
          remain <= remain - 1'b1;
          if (remain == 16'd1) state <= comp ? S_WAIT : S_IDLE;
          else                 state <= S_REQ;
        end
        S_WAIT: if (lz_out_valid && lz_out_ready && lz_out_last) begin
          state <= S_IDLE;
          comp  <= 1'b0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
