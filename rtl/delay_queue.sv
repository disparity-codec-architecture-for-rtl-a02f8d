// delay_queue: constant, user-programmed delay for a stream of events.
//
// Each event pushed with in_valid is stamped with a free-running cycle
// counter and held together with its DATA_W-bit payload. The oldest entry
// is offered on out_valid/out_data once at least `delay` cycles have passed
// since it was pushed; it stays offered until out_ready. Up to 2**AW events
// can be waiting, enough for the longest delay the units are used with
// (1 s is 25 maps at 25 maps/s). An event pushed while the queue is full is
// lost and counted on overflow.
//
// In the encoder this is the CDL timer started by each end-of-frame sync; in
// the decoder it is the automatic delay control that releases completed maps.
// The delay value comes in as a port because the unit's delay is set by the
// user; its unit (clock cycles) is this design's choice.
module delay_queue #(
  parameter int DATA_W = 1,
  parameter int AW     = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       delay,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,
  input  logic              out_ready,
  output logic              overflow
);
  logic [31:0]       now;
  logic [31:0]       stamp [2**AW];
  logic [DATA_W-1:0] data  [2**AW];
  logic [AW:0]       wptr, rptr;
  logic              empty, full;

  assign empty     = (wptr == rptr);
  assign full      = (wptr - rptr) == (AW+1)'(2**AW);
  assign out_data  = data[rptr[AW-1:0]];
  assign out_valid = !empty && ((now - stamp[rptr[AW-1:0]]) >= delay);

  always_ff @(posedge clk) begin
    if (in_valid && !full) begin
      stamp[wptr[AW-1:0]] <= now;
      data[wptr[AW-1:0]]  <= in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now      <= '0;
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      now <= now + 1;
      if (in_valid) begin
        if (!full) wptr <= wptr + 1'b1;
        else       overflow <= 1'b1;
      end
      if (out_valid && out_ready) rptr <= rptr + 1'b1;
    end
  end
endmodule
