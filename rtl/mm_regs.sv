// mm_regs: setup and status registers of the MM, written and read by the DPU
// a byte at a time.
//
// Map (byte addresses; 32-bit registers, little-endian, unused bits read 0):
//   0x00 CTRL      bit0 CCD arm (pulse), bit1 AP enable, bit2 SP enable,
//                  bit3 telemetry start (pulse); pulse bits read as 0
//   0x04 BANK      DPU bank number, 13 bits (16 KB banks)
//   0x08 CCD_BASE  byte address      0x0C CCD_SIZE  pixels
//   0x10 AP_BASE   byte address      0x14 AP_SIZE   samples
//   0x18 SP_BASE   byte address      0x1C SP_SIZE   samples
//   0x20 TLM_BASE  byte address      0x24 TLM_LEN   bytes
//   0x28 STATUS    read-only: bit0 CCD busy, bit1 CCD done, bit2 AP overrun,
//                  bit3 AP wrapped, bit4 AP frame error, bit5 SP overrun,
//                  bit6 SP wrapped, bit7 SP frame error, bit8 TLM busy,
//                  bit9 TLM done
//   0x2C CCD_COUNT pixels written    0x30 AP_WPTR   0x34 SP_WPTR  (read-only)
// A write takes effect at the clock edge; the pulse bits drive ccd_arm and
// tlm_start for the one following clock. Reads are combinational. The frame
// error bits are sticky here and are cleared by writing CTRL.
//
// That the DPU sets up the buffers follows the interface description; the
// map itself is this design's own choice.
module mm_regs
  import mm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [5:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output mm_cfg_t    cfg,
  input  mm_status_t status
);

  localparam int unsigned NREG = 14;

  logic [31:0] rw [10];        // writable registers 0x00..0x24
  logic [31:0] rd [NREG];
  logic        arm_q, start_q;
  logic        ap_ferr, sp_ferr;
  logic [3:0]  widx;

  assign widx = addr[5:2];

  function automatic logic [3:0] idx(input logic [5:0] a);
    return a[5:2];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 10; i++) rw[i] <= '0;
      arm_q   <= 1'b0;
      start_q <= 1'b0;
      ap_ferr <= 1'b0;
      sp_ferr <= 1'b0;
    end else begin
      arm_q   <= 1'b0;
      start_q <= 1'b0;
      if (status.ap_frame_err) ap_ferr <= 1'b1;
      if (status.sp_frame_err) sp_ferr <= 1'b1;
      if (we && widx <= idx(REG_TLM_LEN)) begin
        rw[widx][8*addr[1:0] +: 8] <= wdata;
        if (widx == idx(REG_CTRL)) begin
          ap_ferr <= 1'b0;
          sp_ferr <= 1'b0;
          if (addr[1:0] == 2'd0) begin
            arm_q   <= wdata[0];
            start_q <= wdata[3];
          end
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NREG; i++) rd[i] = '0;
    rd[idx(REG_CTRL)] = {29'd0, rw[idx(REG_CTRL)][2:1], 1'b0};
    rd[idx(REG_BANK)] = 32'(rw[idx(REG_BANK)][12:0]);
    rd[idx(REG_CCD_BASE)] = 32'(rw[idx(REG_CCD_BASE)][MEM_ADDR_W-1:0]);
    rd[idx(REG_CCD_SIZE)] = 32'(rw[idx(REG_CCD_SIZE)][WCNT_W-1:0]);
    rd[idx(REG_AP_BASE)] = 32'(rw[idx(REG_AP_BASE)][MEM_ADDR_W-1:0]);
    rd[idx(REG_AP_SIZE)] = 32'(rw[idx(REG_AP_SIZE)][WCNT_W-1:0]);
    rd[idx(REG_SP_BASE)] = 32'(rw[idx(REG_SP_BASE)][MEM_ADDR_W-1:0]);
    rd[idx(REG_SP_SIZE)] = 32'(rw[idx(REG_SP_SIZE)][WCNT_W-1:0]);
    rd[idx(REG_TLM_BASE)] = 32'(rw[idx(REG_TLM_BASE)][MEM_ADDR_W-1:0]);
    rd[idx(REG_TLM_LEN)] = 32'(rw[idx(REG_TLM_LEN)][MEM_ADDR_W-1:0]);
    rd[idx(REG_STATUS)] = {22'd0, status.tlm_done, status.tlm_busy,
              sp_ferr, status.sp_wrapped, status.sp_overrun,
              ap_ferr, status.ap_wrapped, status.ap_overrun,
              status.ccd_done, status.ccd_busy};
    rd[idx(REG_CCD_COUNT)] = 32'(status.ccd_count);
    rd[idx(REG_AP_WPTR)] = 32'(status.ap_wptr);
    rd[idx(REG_SP_WPTR)] = 32'(status.sp_wptr);
  end

  assign rdata = (widx < 4'(NREG)) ? rd[widx][8*addr[1:0] +: 8] : 8'd0;

  assign cfg.bank      = rw[idx(REG_BANK)][12:0];
  assign cfg.ccd_arm   = arm_q;
  assign cfg.ccd_base  = rw[idx(REG_CCD_BASE)][MEM_ADDR_W-1:0];
  assign cfg.ccd_size  = rw[idx(REG_CCD_SIZE)][WCNT_W-1:0];
  assign cfg.ap_en     = rw[idx(REG_CTRL)][1];
  assign cfg.ap_base   = rw[idx(REG_AP_BASE)][MEM_ADDR_W-1:0];
  assign cfg.ap_size   = rw[idx(REG_AP_SIZE)][WCNT_W-1:0];
  assign cfg.sp_en     = rw[idx(REG_CTRL)][2];
  assign cfg.sp_base   = rw[idx(REG_SP_BASE)][MEM_ADDR_W-1:0];
  assign cfg.sp_size   = rw[idx(REG_SP_SIZE)][WCNT_W-1:0];
  assign cfg.tlm_start = start_q;
  assign cfg.tlm_base  = rw[idx(REG_TLM_BASE)][MEM_ADDR_W-1:0];
  assign cfg.tlm_len   = rw[idx(REG_TLM_LEN)][MEM_ADDR_W-1:0];

endmodule
