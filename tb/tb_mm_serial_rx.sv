// tb_mm_serial_rx: self-checking test of the three-wire serial receiver.
//
// A sender model frames random 12-bit samples with the strobe, MSB first,
// data changing while the serial clock is low. The serial clock is slow
// against the system clock and its edges are offset from it, as for a link
// from another module. Every received sample is compared with the sent one;
// frames of 11 and 13 bits must give frame_err and no sample.
module tb_mm_serial_rx;
  logic clk = 0, rst_n = 0;
  logic s_data = 0, s_clk = 0, s_strobe = 0;
  logic out_valid, frame_err;
  logic [11:0] out_data;
  int checks = 0, failures = 0;
  logic [11:0] sent [$];
  int errs = 0, got = 0;

  mm_serial_rx #(.WIDTH(12)) dut (.*);

  always #25 clk = ~clk;   // 20 MHz system clock (50 ns)

  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid) begin
      got++;
      checks++;
      if (sent.size() == 0 || out_data != sent[0]) begin
        failures++; $display("FAIL sample %h", out_data);
      end
      if (sent.size() > 0) void'(sent.pop_front());
    end
    if (frame_err) errs++;
  end

  // 3.84 Mb/s: 260 ns bit period
  task automatic send(input logic [15:0] v, input int nbits);
    s_strobe = 1;
    for (int i = nbits - 1; i >= 0; i--) begin
      s_data = v[i];
      #130ns s_clk = 1;
      #130ns s_clk = 0;
    end
    #130ns s_strobe = 0;
    #390ns;
  endtask

  initial begin
    #113ns rst_n = 1;
    #500ns;
    for (int n = 0; n < 200; n++) begin
      automatic logic [11:0] v = 12'($urandom);
      if (n == 50) send(16'h7FF, 11);
      else if (n == 120) send(16'h1FFF, 13);
      else begin
        sent.push_back(v);
        send({4'd0, v}, 12);
      end
    end
    #2us;
    checks++;
    if (got != 198 || sent.size() != 0) begin failures++; $display("FAIL count %0d", got); end
    checks++;
    if (errs != 2) begin failures++; $display("FAIL frame errors %0d", errs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
