// dec_cdl: CDL state machine of the decoder unit, with map reassembly.
//
// Two states, CB (compressed block) and UB (uncompressed block), starting in
// CB. At the end of every slot (slot_done from dec_rx, carrying the block
// type, its payload size and where the payload sits in the map buffer):
//   CB: a whole map (compressed or not) is complete: queue it.
//       a first fragment: remember it, go to UB.
//       an empty block: nothing new; the output keeps showing the previous
//       map.
//   UB: a second fragment: the two fragments lie back to back in the
//       circular buffer, so the map is the first fragment's start and the sum
//       of both sizes: queue it, return to CB.
//       anything else: the first fragment is discarded and the block is
//       treated as in CB.
// A queued map goes out as map_valid with map_addr, map_size and
// map_compressed, to the delay control and then to the decompression module.
//
// The two states, storing a whole map in CB, storing a first fragment and
// moving to UB, then storing the second one and returning to CB follow the
// design's SDL description; the handling of a missing second fragment is
// this design's own.
module dec_cdl
  import codec_pkg::*;
#(
  parameter int AW = 19
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          slot_done,
  input  blk_type_t     slot_type,
  input  logic [15:0]   slot_size,
  input  logic [AW-1:0] slot_addr,
  output logic          map_valid,
  output logic [AW-1:0] map_addr,
  output logic [15:0]   map_size,
  output logic          map_compressed,
  output logic          in_ub,
  output logic [15:0]   n_whole,
  output logic [15:0]   n_reasm,
  output logic [15:0]   n_discard,
  output logic [15:0]   n_empty
);
  typedef enum logic {CB, UB} state_t;
  state_t state;

  logic [AW-1:0] f_addr;
  logic [15:0]   f_size;
  logic          f_comp;
  logic          is_whole, is_first, is_second;

  assign is_whole  = slot_type.present && slot_type.frag == FRAG_WHOLE;
  assign is_first  = slot_type.present && slot_type.frag == FRAG_FIRST;
  assign is_second = slot_type.present && slot_type.frag == FRAG_SECOND;
  assign in_ub     = (state == UB);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= CB;
      f_addr         <= '0;
      f_size         <= '0;
      f_comp         <= 1'b0;
      map_valid      <= 1'b0;
      map_addr       <= '0;
      map_size       <= '0;
      map_compressed <= 1'b0;
      n_whole        <= '0;
      n_reasm        <= '0;
      n_discard      <= '0;
      n_empty        <= '0;
    end else begin
      map_valid <= 1'b0;
      if (slot_done) begin
        if (state == UB && is_second && slot_type.compressed == f_comp) begin
          map_valid      <= 1'b1;
          map_addr       <= f_addr;
          map_size       <= f_size + slot_size;
          map_compressed <= f_comp;
          n_reasm        <= n_reasm + 1'b1;
          state          <= CB;
        end else begin
          if (state == UB) n_discard <= n_discard + 1'b1;
          state <= CB;
          if (is_whole) begin
            map_valid      <= 1'b1;
            map_addr       <= slot_addr;
            map_size       <= slot_size;
            map_compressed <= slot_type.compressed;
            n_whole        <= n_whole + 1'b1;
          end else if (is_first) begin
            f_addr <= slot_addr;
            f_size <= slot_size;
            f_comp <= slot_type.compressed;
            state  <= UB;
          end else if (!slot_type.present) begin
            n_empty <= n_empty + 1'b1;
          end else begin
            n_discard <= n_discard + 1'b1;
          end
        end
      end
    end
  end
endmodule
