// tb_mm_memory: self-checking test of mm_memory (reduced to 4 KB).
//
// Random byte, word and double-word writes and reads are mirrored in a byte
// array model; every read is compared with the model one clock after it is
// issued, which also checks the one-cycle read latency.
module tb_mm_memory;
  import mm_pkg::*;
  localparam int AW = 12;
  logic clk = 0, en = 0;
  mm_req_t req;
  logic [31:0] rdata;
  int checks = 0, failures = 0;
  logic [7:0] model [2**AW];

  mm_memory #(.ADDR_W(AW)) dut (.clk, .en, .req, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expect_read(logic [AW-1:0] a, mm_size_e sz);
    logic [AW-1:0] b;
    unique case (sz)
      SZ_BYTE:  return {24'd0, model[a]};
      SZ_WORD:  begin b = {a[AW-1:1], 1'b0}; return {16'd0, model[b+1], model[b]}; end
      default:  begin b = {a[AW-1:2], 2'b0};
                      return {model[b+3], model[b+2], model[b+1], model[b]}; end
    endcase
  endfunction

  task automatic access(input bit we, input mm_size_e sz, input logic [AW-1:0] a,
                        input logic [31:0] d);
    logic [AW-1:0] b;
    @(negedge clk);
    en = 1;
    req.we = we; req.size = sz; req.addr = MEM_ADDR_W'(a); req.wdata = d;
    @(negedge clk);
    en = 0;
    if (we) begin
      unique case (sz)
        SZ_BYTE: model[a] = d[7:0];
        SZ_WORD: begin b = {a[AW-1:1], 1'b0}; model[b] = d[7:0]; model[b+1] = d[15:8]; end
        default: begin b = {a[AW-1:2], 2'b0};
                       for (int k = 0; k < 4; k++) model[b+k] = d[8*k +: 8]; end
      endcase
    end else begin
      checks++;
      if (rdata !== expect_read(a, sz)) begin
        failures++;
        $display("FAIL read size %0d addr %h got %h exp %h", sz, a, rdata, expect_read(a, sz));
      end
    end
  endtask

  initial begin
    req = '0;
    // initialise a window by double words
    for (int i = 0; i < 256; i += 4) access(1, SZ_DWORD, AW'(i), $urandom);
    for (int i = 0; i < 256; i += 4) access(0, SZ_DWORD, AW'(i), 0);
    for (int n = 0; n < 4000; n++) begin
      automatic mm_size_e sz = mm_size_e'($urandom % 3);
      automatic logic [AW-1:0] a = AW'($urandom % 256);
      access($urandom % 2, sz, a, $urandom);
    end
    // top corner of the array
    access(1, SZ_WORD, AW'(2**AW - 2), 32'h0000_BEEF);
    access(0, SZ_BYTE, AW'(2**AW - 1), 0);
    access(0, SZ_WORD, AW'(2**AW - 2), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
