// tb_mm_dsp_if: self-checking test of the DSP bus interface.
//
// A DSP model runs bus cycles (cs, we, 26-bit word address, data) and waits
// while dsp_wait is high; a memory model grants requests (always, or at
// random to imitate other clients) and returns read data one clock after the
// grant. The test compares read data with a word model of the memory, checks
// that each write reaches the memory as a 16-bit word at byte address 2*addr,
// counts wait cycles, and checks the latency with a free memory: a write ends
// in the clock cs rises, a read one clock later.
module tb_mm_dsp_if;
  import mm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic dsp_cs = 0, dsp_we = 0, dsp_wait;
  logic [25:0] dsp_addr = '0;
  logic [15:0] dsp_wdata = '0, dsp_rdata;
  logic mem_req, mem_gnt, mem_rvalid = 0;
  mm_req_t mem_pl;
  logic [31:0] mem_rdata = '0;
  int checks = 0, failures = 0;
  int grant_pct = 100;
  logic [15:0] mem [mm_addr_t];
  logic [15:0] model [logic [25:0]];
  int waits = 0;

  mm_dsp_if dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic lucky = 1'b1;
  always @(negedge clk) lucky <= ($urandom % 100) < grant_pct;
  assign mem_gnt = mem_req && lucky;
  always @(posedge clk) begin
    mem_rvalid <= mem_gnt && !mem_pl.we;
    if (mem_gnt) begin
      if (mem_pl.size != SZ_WORD || mem_pl.addr[0]) begin failures++; $display("FAIL kind"); end
      if (mem_pl.we) mem[mem_pl.addr] = mem_pl.wdata[15:0];
      else mem_rdata <= {16'hFFFF, mem.exists(mem_pl.addr) ? mem[mem_pl.addr] : 16'h0};
    end
  end

  // one bus cycle; returns the number of clocks until wait was low
  task automatic bus(input bit we, input logic [25:0] a, input logic [15:0] d,
                     output logic [15:0] q, output int clocks);
    @(negedge clk);
    dsp_cs = 1; dsp_we = we; dsp_addr = a; dsp_wdata = d;
    clocks = 0;
    #1;
    while (dsp_wait) begin @(negedge clk); #1; clocks++; waits++; end
    q = dsp_rdata;
    @(negedge clk);
    dsp_cs = 0;
  endtask

  initial begin
    logic [15:0] q;
    int c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    bus(1, 26'h3FF_FFFF, 16'hCAFE, q, c);
    check(c == 0, "write latency 0 with free memory");
    bus(0, 26'h3FF_FFFF, 0, q, c);
    check(c == 1 && q == 16'hCAFE, "read latency 1 and data");
    model[26'h3FF_FFFF] = 16'hCAFE;
    grant_pct = 35;
    for (int n = 0; n < 600; n++) begin
      automatic logic [25:0] a = 26'($urandom % 64) | 26'h100_0000;
      if ($urandom % 2) begin
        automatic logic [15:0] d = 16'($urandom);
        bus(1, a, d, q, c);
        model[a] = d;
      end else begin
        bus(0, a, 0, q, c);
        check(q == (model.exists(a) ? model[a] : 16'h0), "read data");
      end
    end
    check(waits > 300, "wait used under contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
