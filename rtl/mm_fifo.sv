// mm_fifo: small synchronous first-in first-out buffer, the data buffer in
// front of the memory for the streaming interfaces (CCD, photometers,
// telemetry).
//
// DEPTH must be a power of two. The head entry is visible on dout whenever
// empty is low (first-word fall-through); pop removes it at the clock edge.
// push while full and pop while empty are ignored. count gives the fill level.
// Depth and width are this design's own choices.
module mm_fifo #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic                     push,
  input  logic [WIDTH-1:0]         din,
  output logic                     full,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [WIDTH-1:0] buf_q [DEPTH];
  logic [PW:0]      wptr, rptr;
  logic             do_push, do_pop;

  assign count   = wptr - rptr;
  assign full    = (count == (PW+1)'(DEPTH));
  assign empty   = (wptr == rptr);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = buf_q[rptr[PW-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (do_push) buf_q[wptr[PW-1:0]] <= din;

endmodule
