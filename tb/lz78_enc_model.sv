// lz78_enc_model: behavioural model of the external LZ-78 compression engine
// (not synthesizable; used only by testbenches).
//
// Byte stream in (in_*, in_last on the final byte of a map), token stream
// out (out_*, out_last on the final byte of the map's tokens). Classic LZ78:
// the longest dictionary string w matching the input is extended by the
// next byte c; the token {code(w) as 16 bits big-endian, c} is sent and w+c
// becomes a new dictionary entry. A string still pending at the end of the
// map is sent as {code(prefix of w), last byte of w}, so every token has
// three bytes. The dictionary is cleared after every map. CYCLES_PER_BYTE
// throttles the input rate to imitate the engine's throughput.
//
// The original uses a commercial LZ-78 ASIC whose token format is not
// public; the 3-byte token format here is this model's own.
module lz78_enc_model #(
  parameter int CYCLES_PER_BYTE = 1
) (
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
  int          dict [int];
  int          pre  [int];
  byte         chr  [int];
  int          next_code;
  int          w;
  int          wait_cnt;
  logic [8:0]  q [$];

  task automatic emit(int code, byte c, bit last);
    q.push_back({1'b0, 8'(code >> 8)});
    q.push_back({1'b0, 8'(code)});
    q.push_back({last, c});
  endtask

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dict.delete(); pre.delete(); chr.delete();
      next_code = 1; w = 0; wait_cnt = 0;
      q.delete();
      in_ready  <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      if (out_valid && out_ready) void'(q.pop_front());
      if (wait_cnt > 0) wait_cnt--;
      if (in_valid && in_ready) begin
        int key;
        key = (w << 8) | int'(in_data);
        wait_cnt = CYCLES_PER_BYTE - 1;
        if (dict.exists(key)) begin
          w = dict[key];
          if (in_last) emit(pre[w], chr[w], 1'b1);
        end else begin
          emit(w, byte'(in_data), in_last);
          if (next_code < 65536) begin
            dict[key] = next_code; pre[next_code] = w; chr[next_code] = byte'(in_data);
            next_code++;
          end
          w = 0;
        end
        if (in_last) begin
          dict.delete(); pre.delete(); chr.delete();
          next_code = 1; w = 0;
        end
      end
      in_ready  <= (q.size() < 16) && (wait_cnt == 0) && !(in_valid && in_ready && CYCLES_PER_BYTE > 1);
      out_valid <= q.size() > 0;
      out_data  <= (q.size() > 0) ? q[0][7:0] : 8'h00;
      out_last  <= (q.size() > 0) ? q[0][8] : 1'b0;
    end
  end
endmodule
