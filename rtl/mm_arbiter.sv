// mm_arbiter: the memory request priority circuit.
//
// N clients share the one memory port. Each cycle the arbiter looks at the
// raised request lines, keeps those of the highest priority class present
// (PRIO gives each client's class: a larger number wins), and among them grants
// the first one after the client granted last (round-robin), so that two
// busy clients of the same class share the bandwidth. The grant is
// combinational: the granted client's request record goes to the memory in
// the same cycle (mem_en/mem_req) and the client sees gnt and may present its
// next request on the following cycle. A read's data reaches the client one
// cycle later, flagged by its rvalid bit; rdata is shared by all clients.
//
// Fixed priority classes follow the interface list (CCD, DSP and telemetry
// high, photometers medium, DPU low). The round-robin tie-break is this
// design's own choice.
module mm_arbiter
  import mm_pkg::*;
#(
  parameter int unsigned            N    = N_REQ,
  parameter logic [N-1:0][1:0]      PRIO = PORT_PRIO
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  mm_req_t       req_pl [N],
  output logic [N-1:0]  gnt,
  output logic          mem_en,
  output mm_req_t       mem_req,
  input  logic [31:0]   mem_rdata,
  output logic [N-1:0]  rvalid,
  output logic [31:0]   rdata
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [1:0]   top_prio;
  logic [N-1:0] cand;
  logic [IW-1:0] last, sel;
  logic          found;

  always_comb begin
    top_prio = '0;
    for (int i = 0; i < N; i++)
      if (req[i] && PRIO[i] > top_prio) top_prio = PRIO[i];
    for (int i = 0; i < N; i++)
      cand[i] = req[i] && (PRIO[i] == top_prio);
  end

  // Round-robin search starting just after the last grant.
  always_comb begin
    int unsigned idx;
    found = 1'b0;
    sel   = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (int'(last) + k) % N;
      if (!found && cand[idx]) begin
        found = 1'b1;
        sel   = IW'(idx);
      end
    end
  end

  always_comb begin
    gnt = '0;
    if (found) gnt[sel] = 1'b1;
  end

  assign mem_en  = found;
  assign mem_req = req_pl[sel];

  logic [N-1:0] rd_gnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last     <= IW'(N - 1);
      rd_gnt_q <= '0;
    end else begin
      if (found) last <= sel;
      rd_gnt_q <= (found && !req_pl[sel].we) ? gnt : '0;
    end
  end

  assign rvalid = rd_gnt_q;
  assign rdata  = mem_rdata;

  // At most one grant, and only to a requesting client.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) (gnt & (gnt - 1'b1)) == '0);
  a_req:    assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
