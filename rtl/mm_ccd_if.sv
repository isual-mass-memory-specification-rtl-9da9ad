// mm_ccd_if: CCD imager interface with write DMA.
//
// While the CCD captures an image, the camera controller forwards one 12-bit
// pixel about every 125 ns. Pixels arrive on a valid/ready handshake (a pixel
// moves on a clock edge where both are high) and enter a small FIFO; the DMA
// side writes the FIFO head to memory as one 16-bit word (pixel zero-extended)
// at base + 2*n, n counting up from 0. arm (one-cycle pulse) latches base and
// size (in pixels) and starts a buffer; when size pixels have been written,
// busy falls and done rises until the next arm. ready is low when the buffer
// has taken all its pixels, when no buffer is armed, or when the FIFO is full,
// which holds the CCD off while higher-priority traffic owns the memory.
//
// Write-only, sequential, high priority, handshake and DMA at incrementing
// addresses follow the interface description; the handshake style, storing one
// pixel per 16-bit word and stopping at the end of the buffer are this
// design's own choices.
module mm_ccd_if
  import mm_pkg::*;
#(
  parameter int unsigned PIX_W      = 12,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // CCD pixel stream
  input  logic             ccd_valid,
  input  logic [PIX_W-1:0] ccd_data,
  output logic             ccd_ready,
  // setup and status
  input  logic             arm,
  input  mm_addr_t         base,
  input  mm_wcnt_t         size,
  output logic             busy,
  output logic             done,
  output mm_wcnt_t         count,
  // arbiter port
  output logic             mem_req,
  output mm_req_t          mem_pl,
  input  logic             mem_gnt
);

  logic             f_full, f_empty;
  logic [PIX_W-1:0] f_dout;
  logic             accept;
  mm_wcnt_t         taken;
  mm_addr_t         addr;
  mm_wcnt_t         size_q;

  assign ccd_ready = busy && (taken != size_q) && !f_full;
  assign accept    = ccd_valid && ccd_ready;

  mm_fifo #(.WIDTH(PIX_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .flush (arm),
    .push  (accept),
    .din   (ccd_data),
    .full  (f_full),
    .pop   (mem_gnt),
    .dout  (f_dout),
    .empty (f_empty),
    .count ()
  );

  assign mem_req      = busy && !f_empty;
  assign mem_pl.we    = 1'b1;
  assign mem_pl.size  = SZ_WORD;
  assign mem_pl.addr  = addr;
  assign mem_pl.wdata = 32'(f_dout);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      count  <= '0;
      taken  <= '0;
      addr   <= '0;
      size_q <= '0;
    end else if (arm) begin
      busy   <= (size != '0);
      done   <= (size == '0);
      count  <= '0;
      taken  <= '0;
      addr   <= base;
      size_q <= size;
    end else begin
      if (accept) taken <= taken + 1'b1;
      if (mem_gnt) begin
        addr  <= addr + MEM_ADDR_W'(2);
        count <= count + 1'b1;
        if (count + 1'b1 == size_q) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_gnt_req: assert property (@(posedge clk) disable iff (!rst_n) mem_gnt |-> mem_req);

endmodule
