// tb_mm_dpu_if: self-checking test of the DPU bus interface.
//
// A DPU model runs byte cycles with a bank number applied; a memory model
// grants at random and answers reads one clock after the grant. The test
// checks that memory cycles reach byte address {bank, dpu_addr}, read data
// against a byte model, that register cycles go to the register port in one
// clock without touching the memory, and that every cycle ends well inside
// the DPU's 1524 ns (about 30 clocks at 20 MHz) when the memory is free half
// the time.
module tb_mm_dpu_if;
  import mm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic dpu_cs = 0, dpu_we = 0, dpu_reg = 0, dpu_wait;
  logic [13:0] dpu_addr = '0;
  logic [7:0] dpu_wdata = '0, dpu_rdata;
  logic [12:0] bank = '0;
  logic reg_we;
  logic [5:0] reg_addr;
  logic [7:0] reg_wdata, reg_rdata;
  logic mem_req, mem_gnt, mem_rvalid = 0;
  mm_req_t mem_pl;
  logic [31:0] mem_rdata = '0;
  int checks = 0, failures = 0;
  int grant_pct = 50;
  logic [7:0] mem [mm_addr_t];
  logic [7:0] regfile [64];
  int max_clocks = 0, reg_writes = 0;

  mm_dpu_if dut (.*);

  always #25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
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
      if (mem_pl.size != SZ_BYTE) begin failures++; $display("FAIL kind"); end
      if (mem_pl.we) mem[mem_pl.addr] = mem_pl.wdata[7:0];
      else mem_rdata <= {24'hABCDEF, mem.exists(mem_pl.addr) ? mem[mem_pl.addr] : 8'h0};
    end
    if (reg_we) begin regfile[reg_addr] = reg_wdata; reg_writes++; end
  end
  assign reg_rdata = regfile[reg_addr];

  task automatic bus(input bit rs, input bit we, input logic [13:0] a, input logic [7:0] d,
                     output logic [7:0] q, output int clocks);
    @(negedge clk);
    dpu_cs = 1; dpu_reg = rs; dpu_we = we; dpu_addr = a; dpu_wdata = d;
    clocks = 0;
    #1;
    while (dpu_wait) begin @(negedge clk); #1; clocks++; end
    q = dpu_rdata;
    if (clocks > max_clocks) max_clocks = clocks;
    @(negedge clk);
    dpu_cs = 0;
  endtask

  initial begin
    logic [7:0] q;
    int c;
    logic [7:0] model [mm_addr_t];
    for (int i = 0; i < 64; i++) regfile[i] = 8'(i * 3);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      automatic logic [13:0] a = 14'($urandom % 32) | (($urandom % 2) ? 14'h3FE0 : 14'h0);
      automatic mm_addr_t fa;
      automatic int op;
      if (n % 100 == 0) bank = 13'($urandom);
      fa = {bank, a};
      op = $urandom % 4;
      unique case (op)
        0: begin
          automatic logic [7:0] d = 8'($urandom);
          bus(0, 1, a, d, q, c);
          model[fa] = d;
          check(mem.exists(fa) && mem[fa] == d, "write reaches {bank,addr}");
        end
        1: begin
          bus(0, 0, a, 0, q, c);
          check(q == (model.exists(fa) ? model[fa] : 8'h0), "memory read data");
        end
        2: begin
          automatic int wr_before = reg_writes;
          bus(1, 1, a, 8'(n), q, c);
          check(c == 0 && reg_writes == wr_before + 1 && regfile[a[5:0]] == 8'(n), "register write");
        end
        default: begin
          bus(1, 0, a, 0, q, c);
          check(c == 0 && q == regfile[a[5:0]], "register read");
        end
      endcase
    end
    check(max_clocks > 0 && max_clocks < 30, $sformatf("cycle within 1524 ns (max %0d)", max_clocks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
