// tb_mm_ccd_if: self-checking test of the CCD write DMA.
//
// A pixel source drives the valid/ready handshake; a memory model grants
// requests (all the time in the first buffer, about one in three cycles in the
// second, to fill the FIFO and hold the CCD off) and records every write. The
// test checks address, size and data of each write, the pixel count, the
// done flag, that ready stays low once the buffer is complete, and that with
// free memory a buffer of N pixels takes N cycles plus a small constant
// (one pixel per clock, well above the 8 Mpixel/s the CCD needs).
module tb_mm_ccd_if;
  import mm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ccd_valid = 0, ccd_ready;
  logic [11:0] ccd_data = '0;
  logic arm = 0, busy, done;
  mm_addr_t base = '0;
  mm_wcnt_t size = '0, count;
  logic mem_req, mem_gnt;
  mm_req_t mem_pl;
  int checks = 0, failures = 0;
  int grant_pct = 100;
  logic [15:0] mem [mm_addr_t];
  int held_off = 0;

  mm_ccd_if dut (.*);

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

  // memory model
  logic lucky = 1'b1;
  always @(negedge clk) lucky <= ($urandom % 100) < grant_pct;
  assign mem_gnt = mem_req && lucky;
  always @(posedge clk) if (mem_gnt) begin
    if (!mem_pl.we || mem_pl.size != SZ_WORD) begin
      failures++; $display("FAIL request kind");
    end
    mem[mem_pl.addr] = mem_pl.wdata[15:0];
  end
  always @(posedge clk) if (ccd_valid && !ccd_ready && busy) held_off++;

  function automatic logic [11:0] pix(int b, int i);
    return 12'((b * 1000 + i * 37) & 12'hFFF);
  endfunction

  task automatic run_buffer(int b, mm_addr_t a, int n, int pct, output int cycles);
    grant_pct = pct;
    @(negedge clk);
    base = a; size = mm_wcnt_t'(n); arm = 1;
    @(negedge clk);
    arm = 0;
    cycles = 0;
    for (int i = 0; i < n; i++) begin
      ccd_valid = 1; ccd_data = pix(b, i);
      @(posedge clk);
      cycles++;
      while (!ccd_ready) begin @(posedge clk); cycles++; end
      @(negedge clk);
    end
    ccd_valid = 0;
    while (!done) begin @(negedge clk); cycles++; end
    check(!busy && count == mm_wcnt_t'(n), "count at end");
    for (int i = 0; i < n; i++)
      check(mem.exists(a + 2*i) && mem[a + 2*i] == {4'd0, pix(b, i)}, "stored pixel");
    check(!mem.exists(a + 2*n), "no write past the buffer");
    // further pixels are refused
    ccd_valid = 1;
    @(negedge clk);
    check(!ccd_ready, "ready low after buffer");
    ccd_valid = 0;
  endtask

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!ccd_ready && !busy, "idle after reset");
    run_buffer(1, 27'h100_0000, 200, 100, cyc);
    check(cyc <= 200 + 3, "one pixel per clock with free memory");
    run_buffer(2, 27'h7FF_F000, 300, 30, cyc);
    check(held_off > 0, "CCD held off when the FIFO fills");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
