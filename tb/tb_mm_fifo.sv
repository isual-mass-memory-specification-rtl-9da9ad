// tb_mm_fifo: self-checking test of mm_fifo.
//
// Random pushes and pops (including pushes while full and pops while empty)
// are mirrored in a queue model; the head, empty, full and count outputs are
// compared with the model every cycle. A flush is checked at the end.
module tb_mm_fifo;
  localparam int W = 12, D = 8;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic full, empty;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  mm_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (model size %0d count %0d)", what, model.size(), count);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(count == ($clog2(D)+1)'(model.size()), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      if (model.size() > 0) check(dout == model[0], "head");
      // bias the mix so that both full and empty are reached
      push = ($urandom % 100) < ((i / 300) % 2 ? 70 : 30);
      pop  = ($urandom % 100) < ((i / 300) % 2 ? 30 : 70);
      din  = W'($urandom);
      @(posedge clk);
      #1;
    end
    // model update happens in the sampling process below
    @(negedge clk);
    push = 1; pop = 0; din = 12'h5A5;
    @(negedge clk);
    push = 0; flush = 1;
    @(negedge clk);
    flush = 0;
    check(empty && count == 0, "flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, updated on the same edges as the FIFO
  always @(posedge clk) if (rst_n) begin
    if (flush) model.delete();
    else begin
      automatic bit can_push = model.size() < D;
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push && can_push) model.push_back(din);
    end
  end
endmodule
