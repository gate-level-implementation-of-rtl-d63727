// edge_queue: FIFO of edges between the left/right arbiter and one edge
// rasterizer (the document's left and right edge queues).
//
// DEPTH entries (chosen here), push when not full, pop when not empty; dout
// shows the oldest entry. Push and pop may happen in the same clock.
// An assertion flags a push into a full queue. Because it is disabled
// during reset, the lint tool sees rst_n used both as an asynchronous reset
// and as a clocked signal; the assertion is not logic, so that note stands.
module edge_queue
  import accel_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  edge_t din,
  output logic  full,
  input  logic  pop,
  output edge_t dout,
  output logic  empty
);
  localparam int unsigned PW = $clog2(DEPTH);
  edge_t           mem [DEPTH];
  logic [PW-1:0]   rp, wp;
  logic [PW:0]     cnt;

  assign full  = (cnt == (PW+1)'(DEPTH));
  assign empty = (cnt == '0);
  assign dout  = mem[rp];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; cnt <= '0;
    end else begin
      if (push && !full) wp <= (wp == PW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (pop && !empty) rp <= (rp == PW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (PW+1)'(push && !full) - (PW+1)'(pop && !empty);
    end
  end

  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) !(push && full);
  endproperty
  a_no_overflow: assert property (p_no_overflow);
endmodule
