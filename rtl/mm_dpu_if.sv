// mm_dpu_if: DPU bus interface, byte access to the memory through a bank
// window, and access to the MM setup registers.
//
// The DPU's 14 address lines span 16 KB, far less than the memory, so a bank
// number (from the BANK register, 13 bits for 2^27 bytes) supplies the upper
// address bits: memory byte address = {bank, dpu_addr}. With dpu_reg high the
// cycle instead goes to the register file (dpu_addr[5:0]), which answers in
// the same clock. Handshake: dpu_cs high starts a cycle; dpu_wait is high
// (combinationally) until the access is done; dpu_rdata is valid when
// dpu_wait is low and holds until the next read; the DPU drops dpu_cs to end
// the cycle, one access per cs pulse. The DPU is the lowest-priority client,
// so its wait lasts as long as higher-priority traffic keeps the memory busy;
// its 1524 ns bus cycle is about 30 clocks at 20 MHz.
//
// Byte width, 14 address lines, 16 KB banks and low priority follow the
// interface description; the register-space select line, the wait line and
// a plain bank register are this design's own choices.
module mm_dpu_if
  import mm_pkg::*;
#(
  parameter int unsigned BANK_BITS = 14
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // DPU bus
  input  logic                          dpu_cs,
  input  logic                          dpu_we,
  input  logic                          dpu_reg,
  input  logic [BANK_BITS-1:0]          dpu_addr,
  input  logic [7:0]                    dpu_wdata,
  output logic [7:0]                    dpu_rdata,
  output logic                          dpu_wait,
  input  logic [MEM_ADDR_W-BANK_BITS-1:0] bank,
  // register file port
  output logic                          reg_we,
  output logic [5:0]                    reg_addr,
  output logic [7:0]                    reg_wdata,
  input  logic [7:0]                    reg_rdata,
  // arbiter port
  output logic                          mem_req,
  output mm_req_t                       mem_pl,
  input  logic                          mem_gnt,
  input  logic                          mem_rvalid,
  input  logic [31:0]                   mem_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_READ, S_DONE} state_e;
  state_e     state;
  logic [7:0] rdata_q;
  logic       reg_cycle;

  // Register cycles complete in the clock where cs is first seen.
  assign reg_cycle = dpu_cs && dpu_reg && (state == S_IDLE);
  assign reg_we    = reg_cycle && dpu_we;
  assign reg_addr  = dpu_addr[5:0];
  assign reg_wdata = dpu_wdata;

  assign mem_req      = dpu_cs && !dpu_reg && (state == S_IDLE || state == S_REQ);
  assign mem_pl.we    = dpu_we;
  assign mem_pl.size  = SZ_BYTE;
  assign mem_pl.addr  = {bank, dpu_addr};
  assign mem_pl.wdata = {24'd0, dpu_wdata};

  always_comb begin
    unique case (state)
      S_IDLE:  dpu_wait = dpu_cs && !dpu_reg && !(mem_gnt && dpu_we);
      S_REQ:   dpu_wait = !(mem_gnt && dpu_we);
      S_READ:  dpu_wait = !mem_rvalid;
      default: dpu_wait = 1'b0;
    endcase
  end

  always_comb begin
    if (state == S_READ)   dpu_rdata = mem_rdata[7:0];
    else if (reg_cycle)    dpu_rdata = reg_rdata;
    else                   dpu_rdata = rdata_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      rdata_q <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_REQ:
          if (dpu_cs && dpu_reg && state == S_IDLE) begin
            if (!dpu_we) rdata_q <= reg_rdata;
            state <= S_DONE;
          end else if (dpu_cs) begin
            if (mem_gnt) state <= dpu_we ? S_DONE : S_READ;
            else         state <= S_REQ;
          end else begin
            state <= S_IDLE;
          end
        S_READ:
          if (mem_rvalid) begin
            rdata_q <= mem_rdata[7:0];
            state   <= S_DONE;
          end
        default:
          if (!dpu_cs) state <= S_IDLE;
      endcase
    end
  end

endmodule
