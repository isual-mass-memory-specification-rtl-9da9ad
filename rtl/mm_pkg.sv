// mm_pkg: types and constants shared by the Mass Memory (MM) modules.
//
// The MM holds one gigabit, 2^27 bytes, addressed by byte. Every client
// interface talks to the memory through the same request record (mm_req_t):
// a write flag, an access size (byte, 16-bit word or 32-bit double word, the
// three sizes the memory supports), a byte address and right-justified write
// data. Read data comes back right-justified as well.
//
// The client numbering and the priority classes follow the interface list:
// CCD, DSP and telemetry are high priority, the two photometers medium and the
// DPU low. The register records (mm_cfg_t, mm_status_t) hold what the DPU
// programs and reads back; their layout is this design's own.
package mm_pkg;

  localparam int unsigned MEM_ADDR_W = 27;          // 1 Gbit = 2^27 bytes
  localparam int unsigned WCNT_W     = MEM_ADDR_W - 1; // count of 16-bit words
  localparam int unsigned N_REQ      = 6;

  typedef logic [MEM_ADDR_W-1:0] mm_addr_t;
  typedef logic [WCNT_W-1:0]     mm_wcnt_t;

  typedef enum logic [1:0] {
    SZ_BYTE  = 2'd0,
    SZ_WORD  = 2'd1,
    SZ_DWORD = 2'd2
  } mm_size_e;

  typedef struct packed {
    logic        we;
    mm_size_e    size;
    mm_addr_t    addr;
    logic [31:0] wdata;
  } mm_req_t;

  // Arbiter port numbers.
  typedef enum logic [2:0] {
    RQ_CCD = 3'd0,
    RQ_DSP = 3'd1,
    RQ_TLM = 3'd2,
    RQ_AP  = 3'd3,
    RQ_SP  = 3'd4,
    RQ_DPU = 3'd5
  } mm_port_e;

  localparam logic [1:0] PRIO_LOW  = 2'd0;
  localparam logic [1:0] PRIO_MED  = 2'd1;
  localparam logic [1:0] PRIO_HIGH = 2'd2;

  // Priority of each port, index = mm_port_e.
  localparam logic [N_REQ-1:0][1:0] PORT_PRIO = {
    PRIO_LOW,   // DPU
    PRIO_MED,   // SP
    PRIO_MED,   // AP
    PRIO_HIGH,  // TLM
    PRIO_HIGH,  // DSP
    PRIO_HIGH   // CCD
  };

  // Setup written by the DPU.
  typedef struct packed {
    logic [12:0] bank;       // DPU 16 KB bank number
    logic        ccd_arm;    // one-cycle pulse
    mm_addr_t    ccd_base;
    mm_wcnt_t    ccd_size;   // pixels
    logic        ap_en;
    mm_addr_t    ap_base;
    mm_wcnt_t    ap_size;    // samples
    logic        sp_en;
    mm_addr_t    sp_base;
    mm_wcnt_t    sp_size;    // samples
    logic        tlm_start;  // one-cycle pulse
    mm_addr_t    tlm_base;
    mm_addr_t    tlm_len;    // bytes
  } mm_cfg_t;

  // Status read back by the DPU.
  typedef struct packed {
    logic     ccd_busy;
    logic     ccd_done;
    mm_wcnt_t ccd_count;
    logic     ap_overrun;
    logic     ap_wrapped;
    logic     ap_frame_err;
    mm_wcnt_t ap_wptr;
    logic     sp_overrun;
    logic     sp_wrapped;
    logic     sp_frame_err;
    mm_wcnt_t sp_wptr;
    logic     tlm_busy;
    logic     tlm_done;
  } mm_status_t;

  // Register map of the DPU register space (byte addresses).
  localparam logic [5:0] REG_CTRL      = 6'h00; // [0] ccd_arm* [1] ap_en [2] sp_en [3] tlm_start*  (*pulse)
  localparam logic [5:0] REG_BANK      = 6'h04;
  localparam logic [5:0] REG_CCD_BASE  = 6'h08;
  localparam logic [5:0] REG_CCD_SIZE  = 6'h0C;
  localparam logic [5:0] REG_AP_BASE   = 6'h10;
  localparam logic [5:0] REG_AP_SIZE   = 6'h14;
  localparam logic [5:0] REG_SP_BASE   = 6'h18;
  localparam logic [5:0] REG_SP_SIZE   = 6'h1C;
  localparam logic [5:0] REG_TLM_BASE  = 6'h20;
  localparam logic [5:0] REG_TLM_LEN   = 6'h24;
  localparam logic [5:0] REG_STATUS    = 6'h28;
  localparam logic [5:0] REG_CCD_COUNT = 6'h2C;
  localparam logic [5:0] REG_AP_WPTR   = 6'h30;
  localparam logic [5:0] REG_SP_WPTR   = 6'h34;

endpackage
