// mm_serial_rx: three-wire serial receiver (data, clock, strobe) for the
// photometer sample streams.
//
// The sender frames each WIDTH-bit sample with the strobe: while strobe is
// high, every rising edge of the serial clock shifts one data bit in, most
// significant bit first; when strobe falls the sample is complete. If exactly
// WIDTH bits were shifted, out_valid pulses for one system clock with the
// sample on out_data; otherwise frame_err pulses and the bits are dropped.
// The three lines come from another module and are not tied to the system
// clock, so each passes through a two-flip-flop synchroniser and the serial
// clock must run at less than a quarter of the system clock.
//
// The three wires and the 12-bit sample follow the interface description; bit
// order, edge and the meaning of the strobe are this design's own choices.
module mm_serial_rx #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             s_data,
  input  logic             s_clk,
  input  logic             s_strobe,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data,
  output logic             frame_err
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [2:0] sync1, sync2;   // {strobe, clk, data}
  logic       clk_q, stb_q;
  logic [WIDTH-1:0] shreg;
  logic [CW-1:0]    nbits;
  logic             overflow;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync1     <= '0;
      sync2     <= '0;
      clk_q     <= 1'b0;
      stb_q     <= 1'b0;
      shreg     <= '0;
      nbits     <= '0;
      overflow  <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      frame_err <= 1'b0;
    end else begin
      sync1     <= {s_strobe, s_clk, s_data};
      sync2     <= sync1;
      clk_q     <= sync2[1];
      stb_q     <= sync2[2];
      out_valid <= 1'b0;
      frame_err <= 1'b0;
      // shift on a rising serial clock inside the strobe
      if (sync2[2] && sync2[1] && !clk_q) begin
        shreg <= {shreg[WIDTH-2:0], sync2[0]};
        if (nbits == CW'(WIDTH)) overflow <= 1'b1;
        else                     nbits    <= nbits + 1'b1;
      end
      // end of frame
      if (stb_q && !sync2[2]) begin
        if (nbits == CW'(WIDTH) && !overflow) begin
          out_valid <= 1'b1;
          out_data  <= shreg;
        end else begin
          frame_err <= 1'b1;
        end
        nbits    <= '0;
        overflow <= 1'b0;
      end
    end
  end

endmodule
