// compression_module: the encoder's compression module around an external
// LZ-78 compression engine.
//
// The LZ engine itself is a separate device; this block connects it and adds
// what the controlled-data-loss scheme needs from the compression side:
//  - every input byte of a map goes both to the engine (lz_in_*) and into a
//    map store (the previous-frame memory, MAP_BYTES bytes), while the number
//    of input bytes is counted;
//  - the engine's output (lz_out_*) is passed on to the data framer (out_*)
//    and counted;
//  - when the engine marks the end of the map, the compressed size is set
//    against the uncompressed one. If it is not larger, the map is committed
//    as compressed. If it is larger (or grows past MAP_BYTES while streaming,
//    after which the rest of the engine output is discarded), the stored
//    uncompressed copy is sent again from the start, the first byte flagged
//    with out_restart so that the framer rewrites the same buffer area, and
//    the map is committed as uncompressed.
// commit_valid pulses once per map, after its last byte has been taken, with
// commit_size (bytes) and commit_raw.
//
// All streams are valid/ready; a byte moves when both are high. The next
// map's input is held off until the current map is committed, so one map
// store suffices. Sending an uncompressed copy when compression fails follows
// the design; keeping that copy in this module's store and the restart flag
// are this design's own.
module compression_module #(
  parameter int MAP_BYTES = 25920,
  localparam int SW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the input FIFO
  input  logic          in_valid,
  input  logic [7:0]    in_data,
  input  logic          in_last,
  output logic          in_ready,
  // to the LZ engine
  output logic          lz_in_valid,
  output logic [7:0]    lz_in_data,
  output logic          lz_in_last,
  input  logic          lz_in_ready,
  // from the LZ engine
  input  logic          lz_out_valid,
  input  logic [7:0]    lz_out_data,
  input  logic          lz_out_last,
  output logic          lz_out_ready,
  // to the data framer (C2M)
  output logic          out_valid,
  output logic [7:0]    out_data,
  output logic          out_restart,
  input  logic          out_ready,
  output logic          commit_valid,
  output logic [SW-1:0] commit_size,
  output logic          commit_raw
);
  localparam int MAW = $clog2(MAP_BYTES);

  typedef enum logic [1:0] {S_CMP, S_RAW_RD, S_RAW_OUT} state_t;
  state_t state;

  logic [SW-1:0] rcount, ccount, raw_idx;
  logic          in_done, cmp_done, overflow;
  logic          first_raw;
  logic          mem_en, mem_we;
  logic [MAW-1:0] mem_addr;
  logic [7:0]    mem_rdata;
  logic          in_fire, lz_fire, fwd;

  // input side: map bytes to engine and store
  assign in_ready    = (state == S_CMP) && !in_done && lz_in_ready;
  assign lz_in_valid = (state == S_CMP) && !in_done && in_valid;
  assign lz_in_data  = in_data;
  assign lz_in_last  = in_last;
  assign in_fire     = in_valid && in_ready;

  // output side: engine output forwarded until it overflows
  assign fwd          = (state == S_CMP) && !cmp_done && !overflow;
  assign lz_out_ready = (state == S_CMP) && !cmp_done && (overflow || out_ready);
  assign lz_fire      = lz_out_valid && lz_out_ready;

  always_comb begin
    out_valid   = 1'b0;
    out_data    = lz_out_data;
    out_restart = 1'b0;
    if (fwd) begin
      out_valid = lz_out_valid;
    end else if (state == S_RAW_OUT) begin
      out_valid   = 1'b1;
      out_data    = mem_rdata;
      out_restart = first_raw;
    end
  end

  always_comb begin
    mem_en   = 1'b0;
    mem_we   = 1'b0;
    mem_addr = MAW'(rcount);
    if (in_fire && rcount < SW'(MAP_BYTES)) begin
      mem_en = 1'b1;
      mem_we = 1'b1;
    end else if (state == S_RAW_RD) begin
      mem_en   = 1'b1;
      mem_addr = MAW'(raw_idx);
    end
  end

  sram_sp #(.DEPTH(MAP_BYTES), .W(8)) u_map_store (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(in_data),
    .rdata(mem_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_CMP;
      rcount       <= '0;
      ccount       <= '0;
      raw_idx      <= '0;
      in_done      <= 1'b0;
      cmp_done     <= 1'b0;
      overflow     <= 1'b0;
      first_raw    <= 1'b0;
      commit_valid <= 1'b0;
      commit_size  <= '0;
      commit_raw   <= 1'b0;
    end else begin
      commit_valid <= 1'b0;
      case (state)
        S_CMP: begin
          if (in_fire) begin
            if (rcount < SW'(MAP_BYTES)) rcount <= rcount + 1'b1;
            if (in_last) in_done <= 1'b1;
          end
          if (lz_fire) begin
            if (!overflow) begin
              if (ccount == SW'(MAP_BYTES)) overflow <= 1'b1;
              else ccount <= ccount + 1'b1;
            end
            if (lz_out_last) cmp_done <= 1'b1;
          end
          // decide once both the input and the engine output are complete
          if (in_done && cmp_done) begin
            if (!overflow && ccount <= rcount) begin
              commit_valid <= 1'b1;
              commit_size  <= ccount;
              commit_raw   <= 1'b0;
              rcount   <= '0;
              ccount   <= '0;
              in_done  <= 1'b0;
              cmp_done <= 1'b0;
              overflow <= 1'b0;
            end else begin
              state     <= S_RAW_RD;
              raw_idx   <= '0;
              first_raw <= 1'b1;
            end
          end
        end
        S_RAW_RD: state <= S_RAW_OUT;
        S_RAW_OUT: begin
          if (out_ready) begin
            first_raw <= 1'b0;
            if (raw_idx + 1'b1 == rcount) begin
              state        <= S_CMP;
              commit_valid <= 1'b1;
              commit_size  <= rcount;
              commit_raw   <= 1'b1;
              rcount   <= '0;
              ccount   <= '0;
              in_done  <= 1'b0;
              cmp_done <= 1'b0;
              overflow <= 1'b0;
            end else begin
              raw_idx <= raw_idx + 1'b1;
              state   <= S_RAW_RD;
            end
          end
        end
        default: state <= S_CMP;
      endcase
    end
  end
endmodule
