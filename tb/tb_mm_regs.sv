// tb_mm_regs: self-checking test of the MM setup and status registers.
//
// Every setup register is written byte by byte with random values and read
// back, and the matching field of the setup record is compared (bank 13 bits,
// addresses 27 bits, sizes 26 bits). The pulse bits of CTRL must give exactly
// one-cycle ccd_arm and tlm_start pulses and read back as 0; enables must
// stick. Status inputs are driven with random values and read back through
// the STATUS, CCD_COUNT, AP_WPTR and SP_WPTR registers; a frame error must
// stay set until CTRL is written.
module tb_mm_regs;
  import mm_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [5:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  mm_cfg_t cfg;
  mm_status_t status;
  int checks = 0, failures = 0;

  mm_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr32(input logic [5:0] a, input logic [31:0] v);
    for (int b = 0; b < 4; b++) begin
      @(negedge clk);
      we = 1; addr = a + 6'(b); wdata = v[8*b +: 8];
    end
    @(negedge clk);
    we = 0;
  endtask

  task automatic rd32(input logic [5:0] a, output logic [31:0] v);
    for (int b = 0; b < 4; b++) begin
      @(negedge clk);
      addr = a + 6'(b);
      #1 v[8*b +: 8] = rdata;
    end
  endtask

  initial begin
    logic [31:0] v, r;
    status = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      v = $urandom; wr32(REG_BANK, v);      rd32(REG_BANK, r);
      check(r == {19'd0, v[12:0]} && cfg.bank == v[12:0], "BANK");
      v = $urandom; wr32(REG_CCD_BASE, v);  rd32(REG_CCD_BASE, r);
      check(r == {5'd0, v[26:0]} && cfg.ccd_base == v[26:0], "CCD_BASE");
      v = $urandom; wr32(REG_CCD_SIZE, v);  rd32(REG_CCD_SIZE, r);
      check(r == {6'd0, v[25:0]} && cfg.ccd_size == v[25:0], "CCD_SIZE");
      v = $urandom; wr32(REG_AP_BASE, v);   check(cfg.ap_base == v[26:0], "AP_BASE");
      v = $urandom; wr32(REG_AP_SIZE, v);   check(cfg.ap_size == v[25:0], "AP_SIZE");
      v = $urandom; wr32(REG_SP_BASE, v);   check(cfg.sp_base == v[26:0], "SP_BASE");
      v = $urandom; wr32(REG_SP_SIZE, v);   check(cfg.sp_size == v[25:0], "SP_SIZE");
      v = $urandom; wr32(REG_TLM_BASE, v);  rd32(REG_TLM_BASE, r);
      check(r == {5'd0, v[26:0]} && cfg.tlm_base == v[26:0], "TLM_BASE");
      v = $urandom; wr32(REG_TLM_LEN, v);   check(cfg.tlm_len == v[26:0], "TLM_LEN");
    end
    // CTRL pulses and enables
    for (int k = 0; k < 2; k++) begin
      automatic logic [7:0] v = k ? 8'b0000_0110 : 8'b0000_1001;
      automatic int arms = 0, starts = 0;
      fork
        begin
          @(negedge clk); we = 1; addr = REG_CTRL; wdata = v;
          @(negedge clk); we = 0;
          repeat (5) @(negedge clk);
        end
        repeat (8) @(posedge clk) begin
          #1;
          if (cfg.ccd_arm) arms++;
          if (cfg.tlm_start) starts++;
        end
      join
      check(arms == (k ? 0 : 1) && starts == (k ? 0 : 1), "one-cycle pulses");
      check(cfg.ap_en == k[0] && cfg.sp_en == k[0], "enables");
      rd32(REG_CTRL, r);
      check(r == (k ? 32'h6 : 32'h0), "CTRL reads enables only");
    end
    // status
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      status = mm_status_t'({$urandom, $urandom, $urandom, $urandom});
      status.ap_frame_err = 0; status.sp_frame_err = 0;
      rd32(REG_STATUS, r);
      check(r[9:0] == {status.tlm_done, status.tlm_busy, 1'b0, status.sp_wrapped,
                       status.sp_overrun, 1'b0, status.ap_wrapped, status.ap_overrun,
                       status.ccd_done, status.ccd_busy} && r[31:10] == 0, "STATUS");
      rd32(REG_CCD_COUNT, r); check(r == 32'(status.ccd_count), "CCD_COUNT");
      rd32(REG_AP_WPTR, r);   check(r == 32'(status.ap_wptr), "AP_WPTR");
      rd32(REG_SP_WPTR, r);   check(r == 32'(status.sp_wptr), "SP_WPTR");
    end
    // sticky frame error
    @(negedge clk); status.ap_frame_err = 1;
    @(negedge clk); status.ap_frame_err = 0;
    rd32(REG_STATUS, r); check(r[4], "AP frame error sticky");
    @(negedge clk); we = 1; addr = REG_CTRL; wdata = 8'b0000_0110;
    @(negedge clk); we = 0;
    rd32(REG_STATUS, r); check(!r[4], "frame error cleared by CTRL write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
