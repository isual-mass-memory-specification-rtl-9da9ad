// mm_dsp_if: DSP bus interface, random read/write access to the whole memory
// in 16-bit words.
//
// The DSP drives a 26-bit word address (2^26 words of 16 bits = the whole
// gigabit), 16 data lines, dsp_cs (cycle in progress) and dsp_we. When dsp_cs
// rises the interface raises a request to the arbiter and asserts dsp_wait
// (combinationally, in the same cycle) until the access is finished: for a
// write, the cycle the arbiter grants it; for a read, the cycle after, when
// the data is on dsp_rdata. dsp_rdata then holds the word until the next read.
// The DSP ends the cycle by dropping dsp_cs; one access is made per cs pulse.
// With an idle memory a write finishes in the cycle cs rises and a read one
// cycle later; other clients completing their accesses lengthen the wait.
//
// Width, address range, read/write random access and the wait signal follow
// the interface description; the exact control lines and their timing, and a
// bus synchronous to the MM clock, are this design's own choices.
module mm_dsp_if
  import mm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // DSP bus
  input  logic        dsp_cs,
  input  logic        dsp_we,
  input  logic [25:0] dsp_addr,
  input  logic [15:0] dsp_wdata,
  output logic [15:0] dsp_rdata,
  output logic        dsp_wait,
  // arbiter port
  output logic        mem_req,
  output mm_req_t     mem_pl,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  logic [31:0] mem_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_READ, S_DONE} state_e;
  state_e      state;
  logic [15:0] rdata_q;

  // Read data goes to the DSP in the cycle it leaves the memory, then is held.
  assign dsp_rdata = (state == S_READ) ? mem_rdata[15:0] : rdata_q;

  // A new cycle is requested straight from IDLE so that an uncontested write
  // finishes in one clock.
  assign mem_req      = dsp_cs && (state == S_IDLE || state == S_REQ);
  assign mem_pl.we    = dsp_we;
  assign mem_pl.size  = SZ_WORD;
  assign mem_pl.addr  = {dsp_addr, 1'b0};
  assign mem_pl.wdata = {16'd0, dsp_wdata};

  always_comb begin
    unique case (state)
      S_IDLE:  dsp_wait = dsp_cs && !(mem_gnt && dsp_we);
      S_REQ:   dsp_wait = !(mem_gnt && dsp_we);
      S_READ:  dsp_wait = !mem_rvalid;
      default: dsp_wait = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rdata_q   <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_REQ:
          if (dsp_cs) begin
            if (mem_gnt) state <= dsp_we ? S_DONE : S_READ;
            else         state <= S_REQ;
          end else begin
            state <= S_IDLE;
          end
        S_READ:
          if (mem_rvalid) begin
            rdata_q   <= mem_rdata[15:0];
            state     <= S_DONE;
          end
        default:
          if (!dsp_cs) state <= S_IDLE;
      endcase
    end
  end

endmodule
