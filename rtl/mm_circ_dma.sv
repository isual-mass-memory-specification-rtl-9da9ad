// mm_circ_dma: circular-buffer write DMA for a continuous sample stream (one
// instance for the Array Photometer, one for the Spectrophotometer).
//
// While en is high, every sample presented with in_valid enters a small FIFO
// and is then written to memory as one 16-bit word (sample zero-extended) at
// base + 2*wptr. wptr counts up and returns to 0 after size-1, so the newest
// size samples are always in the buffer; wrapped is set the first time it
// returns. base and size (in samples) are taken when en rises. The serial
// source cannot be held off: a sample that finds the FIFO full is dropped and
// sets overrun. Taking en low stops the channel and clears the FIFO and the
// flags.
//
// The circular buffer, auto-incrementing address and setup by the DPU follow
// the interface description; the word format, the FIFO and the overrun
// handling are this design's own choices.
module mm_circ_dma
  import mm_pkg::*;
#(
  parameter int unsigned WIDTH      = 12,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  mm_addr_t         base,
  input  mm_wcnt_t         size,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output mm_wcnt_t         wptr,
  output logic             wrapped,
  output logic             overrun,
  // arbiter port
  output logic             mem_req,
  output mm_req_t          mem_pl,
  input  logic             mem_gnt
);

  logic             en_q;
  mm_addr_t         base_q;
  mm_wcnt_t         last_q;     // size - 1
  logic             f_full, f_empty;
  logic [WIDTH-1:0] f_dout;

  mm_fifo #(.WIDTH(WIDTH), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .flush (!en),
    .push  (en_q && in_valid),
    .din   (in_data),
    .full  (f_full),
    .pop   (mem_gnt),
    .dout  (f_dout),
    .empty (f_empty),
    .count ()
  );

  assign mem_req      = en && en_q && !f_empty;
  assign mem_pl.we    = 1'b1;
  assign mem_pl.size  = SZ_WORD;
  assign mem_pl.addr  = base_q + {wptr, 1'b0};
  assign mem_pl.wdata = 32'(f_dout);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      en_q    <= 1'b0;
      base_q  <= '0;
      last_q  <= '0;
      wptr    <= '0;
      wrapped <= 1'b0;
      overrun <= 1'b0;
    end else begin
      en_q <= en;
      if (en && !en_q) begin
        base_q  <= base;
        last_q  <= (size == '0) ? '0 : size - 1'b1;
        wptr    <= '0;
        wrapped <= 1'b0;
        overrun <= 1'b0;
      end else if (!en) begin
        wrapped <= 1'b0;
        overrun <= 1'b0;
      end else begin
        if (in_valid && f_full) overrun <= 1'b1;
        if (mem_gnt) begin
          if (wptr == last_q) begin
            wptr    <= '0;
            wrapped <= 1'b1;
          end else begin
            wptr <= wptr + 1'b1;
          end
        end
      end
    end
  end

  a_gnt_req: assert property (@(posedge clk) disable iff (!rst_n) mem_gnt |-> mem_req);

endmodule
