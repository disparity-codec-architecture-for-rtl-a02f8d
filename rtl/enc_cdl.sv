// enc_cdl: controlled data loss (CDL) state machine of the encoder's data
// framer, with the map fragmentation logic.
//
// Two states, CB (compressed block) and UB (uncompressed block); the machine
// starts in CB. Each output slot is opened by slot_valid, which the delay
// timer raises a programmed time after the end-of-frame sync of the map that
// belongs to the slot. The slot's map is the oldest descriptor (start, size,
// uncompressed flag) queued by C2M. The usable slot capacity is
// cap = block_bytes - 4 header bytes.
//   CB: the map fits (size <= cap): send it whole, stay in CB.
//       it needs two slots (size <= 2*cap): send the first cap bytes now,
//       go to UB.
//       it does not fit two slots, or it is not ready yet: send an empty
//       block and drop the map.
//   UB: send the rest of the fragmented map, drop the present slot's map,
//       return to CB.
// A map that is not ready when its slot opens is counted in skip and
// dropped as soon as its descriptor arrives, which keeps maps and slots
// paired. Buffer space of a map that was sent or dropped is handed back to
// C2M (rel_*) when the block of that slot has been sent, so the bytes being
// read are never overwritten. The counters count the kinds of slots.
//
// The two states, the fit test, the split over two slots and the dropping
// of the next map follow the design's SDL description; dropping a map that
// does not fit two slots, the empty block for a slot without a map and the
// release bookkeeping are this design's own.
module enc_cdl
  import codec_pkg::*;
#(
  parameter int AW = 19
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [15:0]   block_bytes,
  // slot timer
  input  logic          slot_valid,
  output logic          slot_ready,
  // map descriptors from C2M
  input  logic          desc_valid,
  input  logic [AW-1:0] desc_addr,
  input  logic [15:0]   desc_size,
  input  logic          desc_raw,
  output logic          desc_ready,
  // command to M2O
  output logic          cmd_valid,
  output blk_type_t     cmd_type,
  output logic [AW-1:0] cmd_addr,
  output logic [15:0]   cmd_len,
  input  logic          m2o_busy,
  input  logic          m2o_done,
  // buffer space release to C2M
  output logic          rel_valid,
  output logic [AW-1:0] rel_ptr,
  // state and statistics
  output logic          in_ub,
  output logic [15:0]   n_whole,
  output logic [15:0]   n_frag,
  output logic [15:0]   n_drop,
  output logic [15:0]   n_empty
);
  typedef enum logic {CB, UB} state_t;
  state_t state;

  logic [16:0]   cap;
  logic [AW-1:0] frag_addr, rel_target;
  logic [15:0]   frag_rem;
  logic          frag_raw;
  logic          rel_pending;
  logic [7:0]    skip;
  logic          ready_now, bg_drop;

  assign cap       = {1'b0, block_bytes} - 17'(HDR_BYTES);
  assign ready_now = !m2o_busy && !cmd_valid && !rel_pending &&
                     !(skip != 0 && desc_valid);
  assign slot_ready = ready_now;
  assign bg_drop    = !slot_valid && !m2o_busy && !cmd_valid && !rel_pending &&
                      skip != 0 && desc_valid;
  assign in_ub      = (state == UB);

  always_comb begin
    desc_ready = 1'b0;
    if (bg_drop) desc_ready = 1'b1;
    else if (slot_valid && ready_now && desc_valid) desc_ready = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= CB;
      cmd_valid   <= 1'b0;
      cmd_type    <= '0;
      cmd_addr    <= '0;
      cmd_len     <= '0;
      frag_addr   <= '0;
      frag_rem    <= '0;
      frag_raw    <= 1'b0;
      rel_target  <= '0;
      rel_pending <= 1'b0;
      rel_valid   <= 1'b0;
      rel_ptr     <= '0;
      skip        <= '0;
      n_whole     <= '0;
      n_frag      <= '0;
      n_drop      <= '0;
      n_empty     <= '0;
    end else begin
      cmd_valid <= 1'b0;
      rel_valid <= 1'b0;
      if (m2o_done && rel_pending) begin
        rel_valid   <= 1'b1;
        rel_ptr     <= rel_target;
        rel_pending <= 1'b0;
      end
      if (bg_drop) begin
        // a map whose slot has already passed
        rel_valid <= 1'b1;
        rel_ptr   <= desc_addr + AW'(desc_size);
        skip      <= skip - 1'b1;
        n_drop    <= n_drop + 1'b1;
      end else if (slot_valid && ready_now) begin
        cmd_valid <= 1'b1;
        cmd_type <= '0;
        case (state)
          CB: begin
            if (desc_valid) begin
              // space is returned after this block, except for a first
              // fragment, whose rest is still to be sent
              rel_target  <= desc_addr + AW'(desc_size);
              rel_pending <= ({1'b0, desc_size} <= cap) || ({1'b0, desc_size} > (cap << 1));
              if ({1'b0, desc_size} <= cap) begin
                cmd_type.present    <= 1'b1;
                cmd_type.compressed <= !desc_raw;
                cmd_type.frag       <= FRAG_WHOLE;
                cmd_addr <= desc_addr;
                cmd_len  <= desc_size;
                n_whole  <= n_whole + 1'b1;
              end else if ({1'b0, desc_size} <= (cap << 1)) begin
                cmd_type.present    <= 1'b1;
                cmd_type.compressed <= !desc_raw;
                cmd_type.frag       <= FRAG_FIRST;
                cmd_addr  <= desc_addr;
                cmd_len   <= cap[15:0];
                frag_addr <= desc_addr + AW'(cap);
                frag_rem  <= desc_size - cap[15:0];
                frag_raw  <= desc_raw;
                n_frag    <= n_frag + 1'b1;
                state     <= UB;
              end else begin
                cmd_len <= '0;
                n_drop  <= n_drop + 1'b1;
              end
            end else begin
              cmd_len <= '0;
              skip    <= skip + 1'b1;
              n_empty <= n_empty + 1'b1;
            end
          end
          UB: begin
            cmd_type.present    <= 1'b1;
            cmd_type.compressed <= !frag_raw;
            cmd_type.frag       <= FRAG_SECOND;
            cmd_addr <= frag_addr;
            cmd_len  <= frag_rem;
            rel_pending <= 1'b1;
            if (desc_valid) begin
              rel_target <= desc_addr + AW'(desc_size);
              n_drop     <= n_drop + 1'b1;
            end else begin
              rel_target <= frag_addr + AW'(frag_rem);
              skip       <= skip + 1'b1;
            end
            state <= CB;
          end
          default: state <= CB;
        endcase
      end
    end
  end
endmodule
