// enc_c2m: compressor-to-memory (C2M) state machine of the data framer.
//
// Writes the byte stream of the compression module into the map data buffer,
// a circular buffer of 2**AW bytes, through the memory arbiter (port 1, the
// lower priority). C2M owns the write pointer. A byte is taken (in_ready)
// only in a cycle where the arbiter grants the bus and the buffer has room;
// while the memory-to-output machine holds the bus the compressor side is
// simply stalled and resumes afterwards. A byte flagged in_restart is written
// at the start of the current map again, which is how an uncompressed copy
// replaces a failed compressed one. On commit_valid the map's descriptor
// {start address, size, uncompressed flag} is queued for the CDL logic
// (desc_* , first-word-fall-through, 2**DESC_AW entries), and the next map
// starts at the write pointer. Space is returned by the CDL logic with
// rel_valid/rel_ptr: everything before rel_ptr may be overwritten.
//
// C2M writing the buffer, owning the write pointer and working through the
// arbiter follows the design; the descriptor queue and the release
// handshake are this design's own.
module enc_c2m #(
  parameter int AW      = 19,
  parameter int DESC_AW = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [7:0]    in_data,
  input  logic          in_restart,
  output logic          in_ready,
  input  logic          commit_valid,
  input  logic [15:0]   commit_size,
  input  logic          commit_raw,
  // memory arbiter port
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [7:0]    mem_wdata,
  input  logic          mem_gnt,
  // descriptor queue to the CDL logic
  output logic          desc_valid,
  output logic [AW-1:0] desc_addr,
  output logic [15:0]   desc_size,
  output logic          desc_raw,
  input  logic          desc_ready,
  // space release from the CDL logic
  input  logic          rel_valid,
  input  logic [AW-1:0] rel_ptr,
  output logic [AW:0]   used
);
  logic [AW-1:0] wptr, map_start, free_ptr, waddr;
  logic          room;
  logic          dempty, dfull;
  logic [DESC_AW:0] dcount;

  assign waddr = in_restart ? map_start : wptr;
  assign used  = {1'b0, waddr - free_ptr};
  assign room  = (waddr - free_ptr) != {AW{1'b1}};

  assign mem_req   = in_valid && room;
  assign mem_we    = 1'b1;
  assign mem_addr  = waddr;
  assign mem_wdata = in_data;
  assign in_ready  = mem_gnt && room;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      map_start <= '0;
      free_ptr  <= '0;
    end else begin
      if (in_valid && in_ready) wptr <= waddr + 1'b1;
      if (commit_valid) map_start <= wptr;
      if (rel_valid) free_ptr <= rel_ptr;
    end
  end

  sync_fifo #(.W(AW + 17), .AW(DESC_AW)) u_desc (
    .clk, .rst_n,
    .push(commit_valid), .din({map_start, commit_size, commit_raw}),
    .pop(desc_ready && !dempty), .dout({desc_addr, desc_size, desc_raw}),
    .empty(dempty), .full(dfull), .count(dcount)
  );
  assign desc_valid = !dempty;
endmodule
