// mm_memory: the Mass Memory storage array, 2^ADDR_W bytes (default 2^27,
// one gigabit).
//
// The storage is held as 32-bit rows with four byte lanes, so that a byte, a
// 16-bit word or a 32-bit double word can be read or written in one access,
// the three access sizes the memory offers. Byte order is little-endian.
// Address bits below the access size are ignored (accesses are aligned), and
// data is right-justified on both ports: a byte travels in bits [7:0], a word
// in [15:0].
//
// Timing: when en is high the access in req happens at the rising clock edge;
// a write updates the array at that edge, a read presents its data on rdata
// from that edge until the next access. One access per clock.
//
// The real module uses volatile memory chips whose type and timing are not
// fixed; this model is a plain synchronous array, which is this design's own
// choice.
module mm_memory
  import mm_pkg::*;
#(
  parameter int unsigned ADDR_W = MEM_ADDR_W
) (
  input  logic        clk,
  input  logic        en,
  input  mm_req_t     req,
  output logic [31:0] rdata
);

  localparam int unsigned ROWS = 2 ** (ADDR_W - 2);

  logic [3:0][7:0] mem [ROWS];

  logic [ADDR_W-3:0] row;
  logic [1:0]        lane;
  logic [3:0]        be;
  logic [31:0]       wlanes;

  assign row  = req.addr[ADDR_W-1:2];
  assign lane = req.addr[1:0];

  // Byte enables and lane-aligned write data.
  always_comb begin
    unique case (req.size)
      SZ_BYTE: begin
        be     = 4'b0001 << lane;
        wlanes = {4{req.wdata[7:0]}};
      end
      SZ_WORD: begin
        be     = lane[1] ? 4'b1100 : 4'b0011;
        wlanes = {2{req.wdata[15:0]}};
      end
      default: begin
        be     = 4'b1111;
        wlanes = req.wdata;
      end
    endcase
  end

  logic [31:0]    row_q;
  logic [1:0]     lane_q;
  mm_size_e       size_q;

  always_ff @(posedge clk) begin
    if (en) begin
      if (req.we) begin
        for (int b = 0; b < 4; b++)
          if (be[b]) mem[row][b] <= wlanes[8*b +: 8];
      end else begin
        row_q  <= mem[row];
        lane_q <= lane;
        size_q <= req.size;
      end
    end
  end

  // Right-justify the read data.
  always_comb begin
    unique case (size_q)
      SZ_BYTE:  rdata = {24'd0, row_q[8*lane_q +: 8]};
      SZ_WORD:  rdata = {16'd0, lane_q[1] ? row_q[31:16] : row_q[15:0]};
      default:  rdata = row_q;
    endcase
  end

endmodule
