// codec_pkg: types, constants and functions shared by the disparity encoder
// and decoder units.
//
// ATM block header (4 bytes, sent first in every block):
//   byte 0  frame type (blk_type_t below)
//   byte 1  payload size in this block, high byte
//   byte 2  payload size in this block, low byte
//   byte 3  protection byte: CRC-8 (x^8+x^2+x+1) over bytes 0..2
// The three fields and their byte counts follow the block layout of the
// design; the bit coding of the type byte and the choice of polynomial are
// this design's own. The polynomial is the one ATM uses for its header check,
// and like it the 32 single-bit errors of the 4-byte header give 32 distinct,
// non-zero syndromes, so any single flipped bit can be corrected.
//
// CCIR 601/656 timing reference code: FF 00 00 XY with
//   XY = {1, F, V, H, V^H, F^H, F^V, F^V^H}.
package codec_pkg;

  localparam int HDR_BYTES = 4;

  // Type byte: bit0 payload present, bit1 payload is LZ compressed,
  // bits 3:2 fragment (00 whole map, 01 first part, 10 second part).
  typedef enum logic [1:0] {
    FRAG_WHOLE  = 2'b00,
    FRAG_FIRST  = 2'b01,
    FRAG_SECOND = 2'b10
  } frag_t;

  typedef struct packed {
    logic [3:0] rsvd;
    frag_t      frag;
    logic       compressed;
    logic       present;
  } blk_type_t;

  typedef struct packed {
    blk_type_t   btype;
    logic [15:0] size;
  } blk_hdr_t;

  // One CRC-8 step over a byte, MSB first.
  function automatic logic [7:0] crc8_byte(logic [7:0] crc, logic [7:0] data);
    logic [7:0] c;
    c = crc ^ data;
    for (int i = 0; i < 8; i++)
      c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    return c;
  endfunction

  function automatic logic [7:0] hdr_crc(blk_hdr_t h);
    logic [7:0] c;
    c = crc8_byte(8'h00, h.btype);
    c = crc8_byte(c, h.size[15:8]);
    c = crc8_byte(c, h.size[7:0]);
    return c;
  endfunction

  // Syndrome of the 32-bit word {b0,b1,b2,b3} (b3 being the CRC byte).
  // Zero for a correct header.
  function automatic logic [7:0] hdr_syndrome(logic [31:0] w);
    logic [7:0] c;
    c = crc8_byte(8'h00, w[31:24]);
    c = crc8_byte(c, w[23:16]);
    c = crc8_byte(c, w[15:8]);
    return c ^ w[7:0];
  endfunction

  // Corrects at most one flipped bit of a received header word.
  // ok = 0 when the syndrome matches no single-bit error.
  function automatic logic [32:0] hdr_correct(logic [31:0] w);
    logic [7:0]  syn;
    logic [31:0] fixed;
    logic        ok;
    syn   = hdr_syndrome(w);
    fixed = w;
    ok    = (syn == 8'h00);
    for (int i = 0; i < 32; i++) begin
      if (!ok && syn == hdr_syndrome(32'(1) << i)) begin
        fixed = w ^ (32'(1) << i);
        ok    = 1'b1;
      end
    end
    return {ok, fixed};
  endfunction

  function automatic logic [7:0] ccir_xy(logic f, logic v, logic h);
    return {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h};
  endfunction

endpackage
