// tb_mm_top: end-to-end test of the Mass Memory at its full size (1 Gbit,
// default parameters), with models of the CIC/DSP, the DPU, both photometers,
// the CCD pixel source and the telemetry receiver around it.
//
// Phase 1, every interface at its full rate at once (20 MHz clock): the DPU
// programs the registers, the DSP writes a telemetry block, then the CCD
// streams 2000 pixels at one pixel every 125 ns while the AP (325 k samples/s)
// and SP (61.6 k samples/s) serial streams run into their circular buffers,
// telemetry sends the 1106-byte block at 2 Mb/s with one CTS pause, the DSP
// runs back-to-back read/write cycles (a write every 100 ns, a read every
// 150 ns) and the DPU writes through a bank window. Checks: the CCD is never held off at its
// nominal rate, all pixels are in memory, the buffers wrap and hold the newest
// samples, the telemetry bytes equal the block the DSP wrote (little-endian),
// DSP and DPU read data, and a malformed SP frame shows in STATUS.
// Phase 2, overload: the CCD sends a pixel every clock while the DSP hammers
// the memory. The CCD must be held off (ready low) without losing a pixel,
// the medium-priority photometer channels must overrun and the DPU must be
// kept waiting. Each mechanism is counted and must have happened.
`timescale 1ns/1ps
module tb_mm_top;
  import mm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ccd_valid = 0, ccd_ready;
  logic [11:0] ccd_data = '0;
  logic dsp_cs = 0, dsp_we = 0, dsp_wait;
  logic [25:0] dsp_addr = '0;
  logic [15:0] dsp_wdata = '0, dsp_rdata;
  logic dpu_cs = 0, dpu_we = 0, dpu_reg = 0, dpu_wait;
  logic [13:0] dpu_addr = '0;
  logic [7:0] dpu_wdata = '0, dpu_rdata;
  logic ap_data = 0, ap_clk = 0, ap_strobe = 0;
  logic sp_data = 0, sp_clk = 0, sp_strobe = 0;
  logic tlm_data, tlm_clk, tlm_cts = 1;

  mm_top dut (.*);

  always #25 clk = ~clk;   // 20 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #40ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- buffer layout ----------------
  localparam mm_addr_t CCD_BASE = 27'h200_0000;
  localparam int       CCD_N1   = 2000;
  localparam int       CCD_N2   = 1500;
  localparam mm_addr_t AP_BASE  = 27'h400_0000;
  localparam int       AP_N     = 16;
  localparam mm_addr_t SP_BASE  = 27'h500_0000;
  localparam int       SP_N     = 6;
  localparam mm_addr_t TLM_BASE = 27'h7FF_0000;
  localparam int       TLM_LEN  = 1106;

  // ---------------- mechanism counters ----------------
  int n_dsp_wait = 0, n_dpu_wait = 0, n_ccd_hold = 0, n_cts_pause = 0;
  int n_bank_switch = 0, n_ap_wrap = 0, n_sp_wrap = 0, n_overrun = 0, n_frame_err = 0;
  int n_ccd_hold_nominal = 0, n_dsp_cycles = 0;
  bit overload = 0;
  always @(posedge clk) begin
    if (dsp_cs && dsp_wait) n_dsp_wait++;
    if (dpu_cs && dpu_wait) n_dpu_wait++;
    if (ccd_valid && !ccd_ready) begin
      n_ccd_hold++;
      if (!overload) n_ccd_hold_nominal++;
    end
  end

  // ---------------- bus models ----------------
  task automatic dsp_bus(input bit we, input logic [25:0] a, input logic [15:0] d,
                         output logic [15:0] q);
    @(negedge clk);
    dsp_cs = 1; dsp_we = we; dsp_addr = a; dsp_wdata = d;
    #1;
    while (dsp_wait) begin @(negedge clk); #1; end
    q = dsp_rdata;
    @(negedge clk);
    dsp_cs = 0;
  endtask

  task automatic dpu_bus(input bit rs, input bit we, input logic [13:0] a,
                         input logic [7:0] d, output logic [7:0] q);
    @(negedge clk);
    dpu_cs = 1; dpu_reg = rs; dpu_we = we; dpu_addr = a; dpu_wdata = d;
    #1;
    while (dpu_wait) begin @(negedge clk); #1; end
    q = dpu_rdata;
    @(negedge clk);
    dpu_cs = 0;
  endtask

  task automatic reg_wr32(input logic [5:0] a, input logic [31:0] v);
    logic [7:0] q;
    for (int b = 0; b < 4; b++) dpu_bus(1, 1, 14'(a + 6'(b)), v[8*b +: 8], q);
  endtask

  task automatic reg_rd32(input logic [5:0] a, output logic [31:0] v);
    logic [7:0] q;
    for (int b = 0; b < 4; b++) begin dpu_bus(1, 0, 14'(a + 6'(b)), 0, q); v[8*b +: 8] = q; end
  endtask

  logic [7:0] ctrl_q = '0;
  task automatic ctrl(input logic [7:0] v);
    logic [7:0] q;
    dpu_bus(1, 1, 14'(REG_CTRL), v, q);
    ctrl_q = v & 8'h06;
  endtask

  task automatic set_bank(input logic [12:0] b);
    reg_wr32(REG_BANK, 32'(b));
    n_bank_switch++;
  endtask

  // ---------------- serial senders ----------------
  logic [11:0] ap_sent [$], sp_sent [$];

  task automatic ser_send(input bit is_ap, input logic [15:0] v, input int nbits,
                          input realtime half);
    if (is_ap) ap_strobe = 1; else sp_strobe = 1;
    for (int i = nbits - 1; i >= 0; i--) begin
      if (is_ap) ap_data = v[i]; else sp_data = v[i];
      #half; if (is_ap) ap_clk = 1; else sp_clk = 1;
      #half; if (is_ap) ap_clk = 0; else sp_clk = 0;
    end
    #half;
    if (is_ap) ap_strobe = 0; else sp_strobe = 0;
    #(3 * half);
  endtask

  bit streams_on = 0;
  initial begin : ap_source
    for (int n = 0; ; n++) begin
      automatic logic [11:0] v = 12'(n * 7 + 1);
      wait (streams_on);
      ap_sent.push_back(v);
      ser_send(1, {4'd0, v}, 12, 110ns);       // 3.08 us per sample: 325 k samples/s
    end
  end
  initial begin : sp_source
    for (int n = 0; ; n++) begin
      automatic logic [11:0] v = 12'(n * 13 + 5);
      wait (streams_on);
      if (n == 3) ser_send(0, 16'h0AB, 9, 580ns);  // malformed frame
      else begin
        sp_sent.push_back(v);
        ser_send(0, {4'd0, v}, 12, 580ns);     // 16.2 us per sample: 61.6 k samples/s
      end
    end
  end

  // ---------------- CCD source ----------------
  logic [11:0] ccd_sent [$];
  task automatic ccd_stream(int n, bit every_clock);
    for (int i = 0; i < n; i++) begin
      automatic logic [11:0] v = 12'($urandom);
      if (!every_clock || i == 0) @(negedge clk);
      ccd_valid = 1; ccd_data = v;
      @(posedge clk);
      while (!ccd_ready) @(posedge clk);
      ccd_sent.push_back(v);
      @(negedge clk);
      if (!every_clock || i == n - 1) ccd_valid = 0;
      // 125 ns per pixel = 2.5 clocks: alternate 2 and 3 clocks
      if (!every_clock) repeat ((i % 2 == 0) ? 1 : 2) @(negedge clk);
    end
  endtask

  // ---------------- telemetry receiver ----------------
  logic [7:0] tlm_rx [$];
  logic [7:0] tsh;
  int tnb = 0, bits_in_pause = 0;
  bit tpaused = 0;
  always @(posedge tlm_clk) begin
    if (tpaused) bits_in_pause++;
    tsh = {tsh[6:0], tlm_data};
    tnb++;
    if (tnb == 8) begin tlm_rx.push_back(tsh); tnb = 0; end
  end

  // telemetry block contents as written by the DSP
  function automatic logic [15:0] tlm_word(int i);
    return 16'(i * 16'h0101 + 16'h3C5A);
  endfunction

  // ---------------- main sequence ----------------
  initial begin
    logic [15:0] q16;
    logic [7:0] q8;
    logic [31:0] r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // DSP writes the telemetry block (words, little-endian bytes)
    for (int i = 0; i < TLM_LEN / 2; i++)
      dsp_bus(1, 26'((TLM_BASE >> 1) + i), tlm_word(i), q16);

    // DPU set-up
    reg_wr32(REG_CCD_BASE, 32'(CCD_BASE));
    reg_wr32(REG_CCD_SIZE, CCD_N1 + CCD_N2);
    reg_wr32(REG_AP_BASE, 32'(AP_BASE));
    reg_wr32(REG_AP_SIZE, AP_N);
    reg_wr32(REG_SP_BASE, 32'(SP_BASE));
    reg_wr32(REG_SP_SIZE, SP_N);
    reg_wr32(REG_TLM_BASE, 32'(TLM_BASE));
    reg_wr32(REG_TLM_LEN, TLM_LEN);
    ctrl(8'b0000_0111);          // arm CCD, enable AP and SP
    streams_on = 1;
    ctrl(8'b0000_1110);          // start telemetry, keep enables

    // ---------- phase 1: nominal rates ----------
    fork
      ccd_stream(CCD_N1, 0);
      begin : dsp_traffic
        // back-to-back DSP cycles for as long as the CCD streams
        while (ccd_sent.size() < CCD_N1 - 4) begin
          automatic logic [25:0] a = 26'h010_0000 + 26'($urandom % 32);
          automatic logic [15:0] d = 16'($urandom);
          dsp_bus(1, a, d, q16);
          dsp_bus(0, a, 0, q16);
          check(q16 == d, "DSP read after write");
          n_dsp_cycles += 2;
        end
      end
      begin : dpu_traffic
        // DPU exchanges a block with the DSP through bank 0x0040
        set_bank(13'h0040);
        for (int i = 0; i < 16; i++) dpu_bus(0, 1, 14'(i), 8'(8'hA0 + i), q8);
      end
      begin : cts_pause
        repeat (30000) @(negedge clk);
        tlm_cts = 0;
        repeat (100) @(negedge clk);
        tpaused = 1;
        repeat (2000) @(negedge clk);
        tpaused = 0;
        tlm_cts = 1;
        n_cts_pause++;
      end
    join
    check(n_ccd_hold_nominal == 0, "CCD never held off at 125 ns per pixel");
    $display("phase 1: %0d pixels and %0d back-to-back DSP cycles in %0t", CCD_N1, n_dsp_cycles, $time);
    for (int i = 0; i < 8; i++) begin
      dsp_bus(0, 26'(({13'h0040, 14'd0} >> 1) + i), 0, q16);
      check(q16 == {8'(8'hA1 + 2*i), 8'(8'hA0 + 2*i)}, "DSP sees DPU bytes");
    end

    // let the photometers wrap and the telemetry finish
    begin
      int guard = 0;
      do begin
        repeat (2000) @(negedge clk);
        reg_rd32(REG_STATUS, r);
        guard++;
      end while (!(r[9] && r[3] && r[6]) && guard < 60);
    end
    check(r[9] && !r[8], "telemetry done");
    check(r[3], "AP buffer wrapped");
    check(r[6], "SP buffer wrapped");
    check(r[7], "SP frame error reported");
    check(!r[2] && !r[5], "no overrun at nominal rates");
    if (r[3]) n_ap_wrap++;
    if (r[6]) n_sp_wrap++;
    if (r[7]) n_frame_err++;
    check(tlm_rx.size() == TLM_LEN, $sformatf("telemetry length %0d", tlm_rx.size()));
    for (int i = 0; i < tlm_rx.size() && i < TLM_LEN; i++) begin
      automatic logic [15:0] w = tlm_word(i / 2);
      check(tlm_rx[i] == ((i % 2) ? w[15:8] : w[7:0]), "telemetry byte");
    end
    check(bits_in_pause == 0, "no telemetry bits while CTS low");

    // circular buffers: stop the streams, then compare the newest samples
    streams_on = 0;
    #20us;
    ctrl(8'b0000_0000);          // disable AP and SP (after they drained)
    begin
      int na, ns;
      na = ap_sent.size();
      ns = sp_sent.size();
      check(na > AP_N && ns > SP_N, "streams ran past their buffer size");
      for (int k = na - AP_N; k < na; k++) begin
        dsp_bus(0, 26'((AP_BASE >> 1) + (k % AP_N)), 0, q16);
        check(q16 == {4'd0, ap_sent[k]}, $sformatf("AP newest samples %0d of %0d: %h exp %h", k, na, q16, ap_sent[k]));
      end
      for (int k = ns - SP_N; k < ns; k++) begin
        dsp_bus(0, 26'((SP_BASE >> 1) + (k % SP_N)), 0, q16);
        check(q16 == {4'd0, sp_sent[k]}, "SP newest samples");
      end
    end

    // ---------- phase 2: overload ----------
    overload = 1;
    ap_sent.delete(); sp_sent.delete();
    ctrl(8'b0000_0110);          // re-enable the photometers
    streams_on = 1;
    fork
      ccd_stream(CCD_N2, 1);
      begin : dsp_hammer
        while (ccd_sent.size() < CCD_N1 + CCD_N2 - 20) dsp_bus(0, 26'($urandom), 0, q16);
      end
      begin : dpu_during_overload
        set_bank(13'h1FFF);
        dpu_bus(0, 1, 14'h3FFF, 8'h77, q8);
      end
    join
    streams_on = 0;
    reg_rd32(REG_STATUS, r);
    check(r[2] || r[5], "photometer overrun under overload");
    if (r[2] || r[5]) n_overrun++;
    repeat (50) @(negedge clk);
    reg_rd32(REG_STATUS, r);
    check(r[1] && !r[0], "CCD buffer done");
    reg_rd32(REG_CCD_COUNT, r);
    check(r == CCD_N1 + CCD_N2, "CCD pixel count");
    // every pixel, spot-checked by DSP and fully by DPU-free direct reads
    for (int i = 0; i < CCD_N1 + CCD_N2; i += 7) begin
      dsp_bus(0, 26'((CCD_BASE >> 1) + i), 0, q16);
      check(q16 == {4'd0, ccd_sent[i]}, "CCD pixel in memory");
    end
    // last byte of the memory through the top bank
    dsp_bus(0, 26'h3FF_FFFF, 0, q16);
    check(q16[15:8] == 8'h77, "DPU write through top bank");

    // mechanisms
    check(n_dsp_wait > 0, "DSP held off by wait");
    check(n_dpu_wait > 0, "DPU held off by higher priority");
    check(n_ccd_hold > 0, "CCD held off under overload");
    check(n_cts_pause > 0, "telemetry CTS pause");
    check(n_bank_switch >= 2, "bank switch");
    check(n_ap_wrap > 0 && n_sp_wrap > 0, "circular wrap");
    check(n_overrun > 0, "overrun");
    check(n_frame_err > 0, "frame error");
    $display("mechanisms: dsp_wait=%0d dpu_wait=%0d ccd_hold=%0d cts_pause=%0d bank=%0d ap_wrap=%0d sp_wrap=%0d overrun=%0d frame_err=%0d",
             n_dsp_wait, n_dpu_wait, n_ccd_hold, n_cts_pause, n_bank_switch, n_ap_wrap,
             n_sp_wrap, n_overrun, n_frame_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
