// Synchronous FIFO between a processor and its router.
//
// A circular buffer of DEPTH entries of WIDTH bits with valid/ready handshakes
// on both sides: a word is written when in_valid && in_ready and read when
// out_valid && out_ready, both in the same clock. The head is presented
// combinationally (first-word fall-through), so a word written in one cycle can
// be read in the next. 'count' gives the fill level, used by the core to reserve
// space for results still in its pipeline.
//
// The architecture calls for synchronous FIFOs at this place; depth, handshake
// and fall-through behaviour are this design's own choices. Reset is
// synchronous, active low, and empties the FIFO.
module sync_fifo #(
  parameter int unsigned WIDTH = 34,
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [WIDTH-1:0]         in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [WIDTH-1:0]         out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign in_ready  = (cnt != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rptr];
  assign count     = cnt;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      cnt  <= '0;
    end else begin
      if (push) begin
        mem[wptr] <= in_data;
        wptr      <= next_ptr(wptr);
      end
      if (pop) rptr <= next_ptr(rptr);
      case ({push, pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  // A push is only offered to a full FIFO when the producer respects in_ready.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  32'(cnt) <= DEPTH);

endmodule
