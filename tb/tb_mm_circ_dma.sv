// tb_mm_circ_dma: self-checking test of the circular-buffer DMA.
//
// Samples are fed into a 10-sample buffer; a memory model grants requests at
// random and records every write. The test checks that sample n lands at
// base + 2*(n mod 10), that wptr and wrapped follow, that the newest ten
// samples are in the buffer at the end, that a burst with the memory withheld
// overruns (sample dropped, overrun set), and that disabling clears the flags.
module tb_mm_circ_dma;
  import mm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en = 0, in_valid = 0;
  mm_addr_t base = 27'h400_0000;
  mm_wcnt_t size = 10, wptr;
  logic [11:0] in_data = '0;
  logic wrapped, overrun, mem_req, mem_gnt;
  mm_req_t mem_pl;
  int checks = 0, failures = 0;
  int grant_pct = 60;
  logic [15:0] mem [mm_addr_t];
  int nwrites = 0;

  mm_circ_dma dut (.*);

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

  logic lucky = 1'b1;
  always @(negedge clk) lucky <= ($urandom % 100) < grant_pct;
  assign mem_gnt = mem_req && lucky;
  always @(posedge clk) if (mem_gnt) begin
    // writes must follow the circular order
    if (mem_pl.addr != base + 2 * (nwrites % 10)) begin
      failures++; $display("FAIL address %h for write %0d", mem_pl.addr, nwrites);
    end
    checks++;
    mem[mem_pl.addr] = mem_pl.wdata[15:0];
    nwrites++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    en = 1;
    @(negedge clk);
    for (int n = 0; n < 37; n++) begin
      in_valid = 1; in_data = 12'(n * 101);
      @(negedge clk);
      in_valid = 0;
      repeat (3) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(nwrites == 37, "all samples written");
    check(wptr == mm_wcnt_t'(37 % 10), "write pointer");
    check(wrapped, "wrapped");
    check(!overrun, "no overrun at this rate");
    for (int n = 27; n < 37; n++) begin
      automatic logic [11:0] v = 12'(n * 101);
      automatic mm_addr_t a = base + mm_addr_t'(2 * (n % 10));
      check(mem.exists(a) && mem[a] == {4'd0, v}, "newest samples held");
    end
    // memory withheld: FIFO (4) fills and a fifth sample overruns
    grant_pct = 0;
    for (int n = 0; n < 6; n++) begin
      in_valid = 1; in_data = 12'hABC;
      @(negedge clk);
    end
    in_valid = 0;
    check(overrun, "overrun flagged");
    grant_pct = 100;
    repeat (10) @(negedge clk);
    check(nwrites == 41, "only the buffered samples written");
    en = 0;
    @(negedge clk);
    @(negedge clk);
    check(!overrun && !wrapped && !mem_req, "disable clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
