// tb_mm_arbiter: self-checking test of mm_arbiter with the MM's six clients.
//
// Random request patterns are applied; each cycle the grant is compared with
// a reference that picks the highest priority class present and, inside it,
// the next client after the previous winner. The memory-side record must be
// the winner's, and rvalid must follow a read grant by exactly one clock.
// A directed part checks that two saturating high-priority clients alternate
// and that the low-priority DPU waits until the high and medium ones are idle.
module tb_mm_arbiter;
  import mm_pkg::*;
  localparam int N = N_REQ;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, gnt, rvalid;
  mm_req_t req_pl [N];
  logic mem_en;
  mm_req_t mem_req;
  logic [31:0] mem_rdata = 32'h1234_5678, rdata;
  int checks = 0, failures = 0;
  int last = N - 1;
  logic [N-1:0] exp_rv = '0;

  mm_arbiter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s req=%b gnt=%b t=%0t", what, req, gnt, $time); end
  endtask

  function automatic int ref_pick(logic [N-1:0] r);
    int best = -1;
    for (int p = 2; p >= 0 && best < 0; p--)
      for (int k = 1; k <= N; k++) begin
        int i = (last + k) % N;
        if (best < 0 && r[i] && PORT_PRIO[i] == 2'(p)) best = i;
      end
    return best;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt [N];
  int dpu_wait_cycles;

  initial begin
    for (int i = 0; i < N; i++) begin
      req_pl[i] = '0;
      req_pl[i].addr = MEM_ADDR_W'(i * 16);
      req_pl[i].wdata = 32'(i);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int w;
      @(negedge clk);
      check(rvalid == exp_rv, "rvalid timing");
      for (int i = 0; i < N; i++) req_pl[i].we = $urandom % 2;
      req = N'($urandom);
      #1;
      w = ref_pick(req);
      if (w < 0) check(gnt == '0 && !mem_en, "idle");
      else begin
        check(gnt == (N'(1) << w), "winner");
        check(mem_en && mem_req == req_pl[w], "memory record");
        last = w;
      end
      exp_rv = (w >= 0 && !req_pl[w].we) ? (N'(1) << w) : '0;
      @(posedge clk);
      #1;
      if (exp_rv != '0) check(rdata == mem_rdata, "rdata");
    end
    // CCD and DSP saturate, DPU waits; they must alternate
    @(negedge clk);
    req = '0; req[RQ_CCD] = 1; req[RQ_DSP] = 1; req[RQ_DPU] = 1;
    for (int i = 0; i < N; i++) cnt[i] = 0;
    for (int n = 0; n < 100; n++) begin
      #1;
      for (int i = 0; i < N; i++) if (gnt[i]) cnt[i]++;
      @(negedge clk);
    end
    check(cnt[RQ_CCD] == 50 && cnt[RQ_DSP] == 50, "round-robin share");
    check(cnt[RQ_DPU] == 0, "low priority held off");
    req[RQ_CCD] = 0; req[RQ_DSP] = 0;
    #1;
    check(gnt[RQ_DPU], "low priority served when alone");
    @(negedge clk);
    req = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
