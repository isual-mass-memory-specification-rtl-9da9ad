// mm_tlm_if: telemetry interface, a read DMA feeding a three-wire serial link
// (data, clock, CTS) to the DPU.
//
// The DPU builds each telemetry packet from a few header and trailer bytes of
// its own and a data portion that the MM supplies from a block of memory. A
// start pulse latches the block's byte address (base) and length in bytes
// (len). The DMA side then reads the block a byte at a time at incrementing
// addresses, keeping a small FIFO filled ahead of the serial side. The serial
// side sends each byte most significant bit first: one bit takes CLK_DIV
// system clocks, tlm_data changes while tlm_clk is low (first half of the bit)
// and the receiver samples it on the rising edge of tlm_clk (middle of the
// bit). tlm_cts (clear to send, from the DPU) is looked at before each byte:
// while it is low the link idles after the current byte. busy is high from
// start until the last bit has gone; done then stays high until the next start.
//
// Read-only sequential DMA, the three wires and high priority follow the
// interface description; the bit format, CTS granularity and the divider are
// this design's own choices. CLK_DIV = 10 gives the quoted 2 Mb/s from a
// 20 MHz clock.
module mm_tlm_if
  import mm_pkg::*;
#(
  parameter int unsigned CLK_DIV    = 10,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // setup and status
  input  logic        start,
  input  mm_addr_t    base,
  input  mm_addr_t    len,
  output logic        busy,
  output logic        done,
  // serial link
  output logic        tlm_data,
  output logic        tlm_clk,
  input  logic        tlm_cts,
  // arbiter port
  output logic        mem_req,
  output mm_req_t     mem_pl,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  logic [31:0] mem_rdata
);

  localparam int unsigned DW = $clog2(CLK_DIV);
  localparam int unsigned FW = $clog2(FIFO_DEPTH) + 1;

  // ---------------- DMA side ----------------
  mm_addr_t    addr, fetched, sent, len_q;
  logic        inflight;
  logic        f_full, f_empty, f_pop;
  logic [7:0]  f_dout;
  logic [FW-1:0] f_count;

  mm_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .flush (start),
    .push  (mem_rvalid),
    .din   (mem_rdata[7:0]),
    .full  (f_full),
    .pop   (f_pop),
    .dout  (f_dout),
    .empty (f_empty),
    .count (f_count)
  );

  assign mem_req      = busy && (fetched != len_q) &&
                        ((f_count + FW'(inflight)) < FW'(FIFO_DEPTH));
  assign mem_pl.we    = 1'b0;
  assign mem_pl.size  = SZ_BYTE;
  assign mem_pl.addr  = addr;
  assign mem_pl.wdata = '0;

  // ---------------- serial side ----------------
  logic [7:0]    shreg;
  logic [2:0]    bitn;
  logic [DW-1:0] div;
  logic          shifting;

  assign f_pop = !shifting && busy && !f_empty && tlm_cts;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      addr     <= '0;
      fetched  <= '0;
      sent     <= '0;
      len_q    <= '0;
      inflight <= 1'b0;
      shreg    <= '0;
      bitn     <= '0;
      div      <= '0;
      shifting <= 1'b0;
      tlm_data <= 1'b0;
      tlm_clk  <= 1'b0;
    end else if (start) begin
      busy     <= (len != '0);
      done     <= (len == '0);
      addr     <= base;
      fetched  <= '0;
      sent     <= '0;
      len_q    <= len;
      inflight <= 1'b0;
      shifting <= 1'b0;
      tlm_clk  <= 1'b0;
    end else begin
      inflight <= mem_gnt;
      if (mem_gnt) begin
        addr    <= addr + 1'b1;
        fetched <= fetched + 1'b1;
      end
      if (f_pop) begin
        shreg    <= {f_dout[6:0], 1'b0};
        tlm_data <= f_dout[7];
        tlm_clk  <= 1'b0;
        bitn     <= '0;
        div      <= '0;
        shifting <= 1'b1;
      end else if (shifting) begin
        if (div == DW'(CLK_DIV / 2 - 1)) tlm_clk <= 1'b1;
        if (div == DW'(CLK_DIV - 1)) begin
          div     <= '0;
          tlm_clk <= 1'b0;
          if (bitn == 3'd7) begin
            shifting <= 1'b0;
            sent     <= sent + 1'b1;
            if (sent + 1'b1 == len_q) begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end else begin
            bitn     <= bitn + 1'b1;
            tlm_data <= shreg[7];
            shreg    <= {shreg[6:0], 1'b0};
          end
        end else begin
          div <= div + 1'b1;
        end
      end
    end
  end

  a_gnt_req: assert property (@(posedge clk) disable iff (!rst_n) mem_gnt |-> mem_req);
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> !f_full);

endmodule
