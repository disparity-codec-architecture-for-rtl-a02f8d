// lz78_dec_model: behavioural model of the external LZ-78 decompression
// engine (not synthesizable; used only by testbenches). Inverse of
// lz78_enc_model: each 3-byte token {code (16 bits), c} expands to the
// dictionary string of code followed by c, which becomes a new entry. The
// input byte marked last ends the map: the final output byte is marked last
// and the dictionary is cleared.
//
// The token format is this model's own (see lz78_enc_model).
module lz78_dec_model (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_last,
  output logic       in_ready,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_last,
  input  logic       out_ready
);
  int          pre [int];
  byte         chr [int];
  int          next_code;
  int          nb;
  logic [15:0] code;
  logic [8:0]  q [$];

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre.delete(); chr.delete();
      next_code = 1; nb = 0; code = '0;
      q.delete();
      in_ready  <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) begin
        if (nb == 0)      begin code[15:8] = in_data; nb = 1; end
        else if (nb == 1) begin code[7:0]  = in_data; nb = 2; end
        else begin
          byte s [$];
          int  p;
          s.delete();
          p = int'(code);
          while (p != 0) begin s.push_front(chr[p]); p = pre[p]; end
          s.push_back(byte'(in_data));
          foreach (s[i]) q.push_back({in_last && (i == s.size() - 1), s[i]});
          if (next_code < 65536) begin
            pre[next_code] = int'(code); chr[next_code] = byte'(in_data); next_code++;
          end
          nb = 0;
          if (in_last) begin pre.delete(); chr.delete(); next_code = 1; end
        end
      end
      in_ready  <= q.size() < 64;
      out_valid <= q.size() > 0;
      out_data  <= (q.size() > 0) ? q[0][7:0] : 8'h00;
      out_last  <= (q.size() > 0) ? q[0][8] : 1'b0;
    end
  end
endmodule
