// mm_top: the ISUAL Mass Memory (MM) module.
//
// One gigabit of memory (mm_memory) is shared by six client interfaces
// through one priority arbiter (mm_arbiter), one access per clock:
//   CCD imager   mm_ccd_if   12-bit pixel handshake, write DMA     high
//   DSP          mm_dsp_if   16-bit random read/write with wait    high
//   telemetry    mm_tlm_if   read DMA to a serial link (data/clk/CTS) high
//   AP           mm_serial_rx + mm_circ_dma, circular buffer       medium
//   SP           mm_serial_rx + mm_circ_dma, circular buffer       medium
//   DPU          mm_dpu_if   8-bit access through 16 KB banks      low
// The DPU also reaches the setup and status registers (mm_regs) through its
// register-space select line; these set the bank, the CCD buffer, the two
// photometer circular buffers and the telemetry block, and start the DMAs.
// All interfaces may run at the same time, limited only by the one access
// per clock of the memory. The clock is assumed to be 20 MHz.
//
// The client list, the DMA behaviour, the priorities and the widths follow the
// module description; the memory organisation as one synchronous array, the
// clock, the control signals and the register map are this design's own
// choices (see each module's header).
module mm_top
  import mm_pkg::*;
#(
  parameter int unsigned TLM_CLK_DIV = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  // CCD (via the camera controller)
  input  logic        ccd_valid,
  input  logic [11:0] ccd_data,
  output logic        ccd_ready,
  // DSP bus
  input  logic        dsp_cs,
  input  logic        dsp_we,
  input  logic [25:0] dsp_addr,
  input  logic [15:0] dsp_wdata,
  output logic [15:0] dsp_rdata,
  output logic        dsp_wait,
  // DPU bus
  input  logic        dpu_cs,
  input  logic        dpu_we,
  input  logic        dpu_reg,
  input  logic [13:0] dpu_addr,
  input  logic [7:0]  dpu_wdata,
  output logic [7:0]  dpu_rdata,
  output logic        dpu_wait,
  // Array Photometer serial link
  input  logic        ap_data,
  input  logic        ap_clk,
  input  logic        ap_strobe,
  // Spectrophotometer serial link
  input  logic        sp_data,
  input  logic        sp_clk,
  input  logic        sp_strobe,
  // telemetry serial link to the DPU
  output logic        tlm_data,
  output logic        tlm_clk,
  input  logic        tlm_cts
);

  mm_cfg_t    cfg;
  mm_status_t status;

  logic [N_REQ-1:0] req, gnt, rvalid;
  mm_req_t          req_pl [N_REQ];
  logic [31:0]      rdata, mem_rdata;
  logic             mem_en;
  mm_req_t          mem_req;

  // ---------------- memory and arbiter ----------------
  mm_memory #(.ADDR_W(MEM_ADDR_W)) u_mem (
    .clk, .en(mem_en), .req(mem_req), .rdata(mem_rdata)
  );

  mm_arbiter #(.N(N_REQ), .PRIO(PORT_PRIO)) u_arb (
    .clk, .rst_n, .req, .req_pl, .gnt,
    .mem_en, .mem_req, .mem_rdata, .rvalid, .rdata
  );

  // ---------------- CCD ----------------
  mm_ccd_if u_ccd (
    .clk, .rst_n,
    .ccd_valid, .ccd_data, .ccd_ready,
    .arm   (cfg.ccd_arm),
    .base  (cfg.ccd_base),
    .size  (cfg.ccd_size),
    .busy  (status.ccd_busy),
    .done  (status.ccd_done),
    .count (status.ccd_count),
    .mem_req (req[RQ_CCD]),
    .mem_pl  (req_pl[RQ_CCD]),
    .mem_gnt (gnt[RQ_CCD])
  );

  // ---------------- DSP ----------------
  mm_dsp_if u_dsp (
    .clk, .rst_n,
    .dsp_cs, .dsp_we, .dsp_addr, .dsp_wdata, .dsp_rdata, .dsp_wait,
    .mem_req    (req[RQ_DSP]),
    .mem_pl     (req_pl[RQ_DSP]),
    .mem_gnt    (gnt[RQ_DSP]),
    .mem_rvalid (rvalid[RQ_DSP]),
    .mem_rdata  (rdata)
  );

  // ---------------- telemetry ----------------
  mm_tlm_if #(.CLK_DIV(TLM_CLK_DIV)) u_tlm (
    .clk, .rst_n,
    .start (cfg.tlm_start),
    .base  (cfg.tlm_base),
    .len   (cfg.tlm_len),
    .busy  (status.tlm_busy),
    .done  (status.tlm_done),
    .tlm_data, .tlm_clk, .tlm_cts,
    .mem_req    (req[RQ_TLM]),
    .mem_pl     (req_pl[RQ_TLM]),
    .mem_gnt    (gnt[RQ_TLM]),
    .mem_rvalid (rvalid[RQ_TLM]),
    .mem_rdata  (rdata)
  );

  // ---------------- Array Photometer ----------------
  logic        ap_valid;
  logic [11:0] ap_sample;

  mm_serial_rx #(.WIDTH(12)) u_ap_rx (
    .clk, .rst_n,
    .s_data (ap_data), .s_clk (ap_clk), .s_strobe (ap_strobe),
    .out_valid (ap_valid), .out_data (ap_sample),
    .frame_err (status.ap_frame_err)
  );

  mm_circ_dma #(.WIDTH(12)) u_ap_dma (
    .clk, .rst_n,
    .en   (cfg.ap_en),
    .base (cfg.ap_base),
    .size (cfg.ap_size),
    .in_valid (ap_valid),
    .in_data  (ap_sample),
    .wptr     (status.ap_wptr),
    .wrapped  (status.ap_wrapped),
    .overrun  (status.ap_overrun),
    .mem_req  (req[RQ_AP]),
    .mem_pl   (req_pl[RQ_AP]),
    .mem_gnt  (gnt[RQ_AP])
  );

  // ---------------- Spectrophotometer ----------------
  logic        sp_valid;
  logic [11:0] sp_sample;

  mm_serial_rx #(.WIDTH(12)) u_sp_rx (
    .clk, .rst_n,
    .s_data (sp_data), .s_clk (sp_clk), .s_strobe (sp_strobe),
    .out_valid (sp_valid), .out_data (sp_sample),
    .frame_err (status.sp_frame_err)
  );

  mm_circ_dma #(.WIDTH(12)) u_sp_dma (
    .clk, .rst_n,
    .en   (cfg.sp_en),
    .base (cfg.sp_base),
    .size (cfg.sp_size),
    .in_valid (sp_valid),
    .in_data  (sp_sample),
    .wptr     (status.sp_wptr),
    .wrapped  (status.sp_wrapped),
    .overrun  (status.sp_overrun),
    .mem_req  (req[RQ_SP]),
    .mem_pl   (req_pl[RQ_SP]),
    .mem_gnt  (gnt[RQ_SP])
  );

  // ---------------- DPU and registers ----------------
  logic       reg_we;
  logic [5:0] reg_addr;
  logic [7:0] reg_wdata, reg_rdata;

  mm_dpu_if #(.BANK_BITS(14)) u_dpu (
    .clk, .rst_n,
    .dpu_cs, .dpu_we, .dpu_reg, .dpu_addr, .dpu_wdata, .dpu_rdata, .dpu_wait,
    .bank (cfg.bank),
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .mem_req    (req[RQ_DPU]),
    .mem_pl     (req_pl[RQ_DPU]),
    .mem_gnt    (gnt[RQ_DPU]),
    .mem_rvalid (rvalid[RQ_DPU]),
    .mem_rdata  (rdata)
  );

  mm_regs u_regs (
    .clk, .rst_n,
    .we (reg_we), .addr (reg_addr), .wdata (reg_wdata), .rdata (reg_rdata),
    .cfg, .status
  );

endmodule
