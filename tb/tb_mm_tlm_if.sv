// tb_mm_tlm_if: self-checking test of the telemetry read DMA and serial link.
//
// A memory model answers byte reads one clock after the grant (granting at
// random) with a byte derived from the address. A receiver model samples
// tlm_data on each rising tlm_clk and rebuilds the bytes. The test checks the
// byte stream against the block contents, the length, busy/done, the bit
// period of CLK_DIV clocks (2 Mb/s at 20 MHz), and that with CTS low no
// further byte starts. The block length is the 1106-byte packet size of the
// telemetry link.
module tb_mm_tlm_if;
  import mm_pkg::*;
  localparam int DIV = 10;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  mm_addr_t base = '0, len = '0;
  logic tlm_data, tlm_clk, tlm_cts = 1;
  logic mem_req, mem_gnt, mem_rvalid = 0;
  mm_req_t mem_pl;
  logic [31:0] mem_rdata = '0;
  int checks = 0, failures = 0;
  int grant_pct = 50;
  logic [7:0] rx [$];
  logic [7:0] sh;
  int nb = 0;
  longint last_rise = -1;
  int bad_period = 0, rises = 0, rises_paused = 0;
  bit paused = 0;
  longint cyc = 0;

  mm_tlm_if #(.CLK_DIV(DIV)) dut (.*);

  always #25 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  function automatic logic [7:0] content(mm_addr_t a);
    return a[7:0] ^ a[15:8] ^ 8'h5C;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model
  logic lucky = 1'b1;
  always @(negedge clk) lucky <= ($urandom % 100) < grant_pct;
  assign mem_gnt = mem_req && lucky;
  always @(posedge clk) begin
    mem_rvalid <= mem_gnt;
    if (mem_gnt) begin
      if (mem_pl.we || mem_pl.size != SZ_BYTE) begin failures++; $display("FAIL request kind"); end
      mem_rdata <= {24'hDEAD_00 >> 8, content(mem_pl.addr)};
    end
  end

  // receiver model
  always @(posedge tlm_clk) begin
    rises++;
    if (paused) rises_paused++;
    if (last_rise >= 0 && nb != 0 && cyc - last_rise != DIV) bad_period++;
    last_rise = cyc;
    sh = {sh[6:0], tlm_data};
    nb++;
    if (nb == 8) begin rx.push_back(sh); nb = 0; end
  end

  task automatic run_block(mm_addr_t a, int n);
    rx.delete();
    @(negedge clk);
    base = a; len = mm_addr_t'(n); start = 1;
    @(negedge clk);
    start = 0;
    check(busy && !done, "busy after start");
    while (!done) @(negedge clk);
    check(!busy, "not busy at end");
    check(rx.size() == n, $sformatf("byte count %0d", rx.size()));
    for (int i = 0; i < rx.size() && i < n; i++)
      check(rx[i] == content(a + mm_addr_t'(i)), "byte value");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_block(27'h012_3400, 1106);
    check(bad_period == 0, "bit period of CLK_DIV clocks");
    // CTS pause in the middle of a block
    fork
      run_block(27'h7FF_FF00, 40);
      begin
        repeat (DIV * 8 * 10) @(negedge clk);
        tlm_cts = 0;
        repeat (DIV * 9) @(negedge clk);   // let the current byte finish
        paused = 1;
        repeat (DIV * 50) @(negedge clk);
        paused = 0;
        tlm_cts = 1;
      end
    join
    check(rises_paused == 0, "no bits sent while CTS is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
