// tb_util_pkg: reference functions for the testbenches, written
// independently of the RTL: the header CRC-8 (x^8+x^2+x+1, MSB first, zero
// initial value), LZ78 encoding and decoding of a byte queue (3-byte tokens
// {code high, code low, byte}), and CCIR XY code construction.
//
// The CRC polynomial and token format match the choices made in the RTL and
// in the engine models; they are not taken from the original design.
package tb_util_pkg;
  typedef byte unsigned bq_t [$];

  function automatic byte unsigned crc8(bq_t d);
    int c = 0;
    foreach (d[i]) begin
      c = c ^ d[i];
      for (int b = 0; b < 8; b++) c = (c & 8'h80) ? (((c << 1) ^ 7) & 255) : ((c << 1) & 255);
    end
    return byte'(c);
  endfunction

  function automatic bq_t lz78_encode(bq_t d);
    bq_t o;
    int dict [int];
    int pre [int];
    byte unsigned chr [int];
    int nc = 1, w = 0;
    foreach (d[i]) begin
      int key = (w << 8) | d[i];
      if (dict.exists(key)) begin
        w = dict[key];
        if (i == d.size() - 1) begin
          o.push_back(byte'(pre[w] >> 8)); o.push_back(byte'(pre[w])); o.push_back(chr[w]);
        end
      end else begin
        o.push_back(byte'(w >> 8)); o.push_back(byte'(w)); o.push_back(d[i]);
        dict[key] = nc; pre[nc] = w; chr[nc] = d[i]; nc++;
        w = 0;
      end
    end
    return o;
  endfunction

  function automatic bq_t lz78_decode(bq_t t);
    bq_t o;
    int pre [int];
    byte unsigned chr [int];
    int nc = 1;
    for (int i = 0; i + 2 < t.size(); i += 3) begin
      bq_t s;
      int p = (int'(t[i]) << 8) | t[i+1];
      while (p != 0) begin s.push_front(chr[p]); p = pre[p]; end
      s.push_back(t[i+2]);
      foreach (s[j]) o.push_back(s[j]);
      pre[nc] = (int'(t[i]) << 8) | t[i+1]; chr[nc] = t[i+2]; nc++;
    end
    return o;
  endfunction

  function automatic byte unsigned xy(bit f, bit v, bit h);
    return {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h};
  endfunction
endpackage
