// Dual-clock FIFO for the system's input and output interfaces.
//
// Words cross from the write clock domain (wclk) to the read clock domain
// (rclk). Each side keeps a binary pointer one bit wider than the address and
// publishes it in Gray code; the other side samples it through a two-flop
// synchroniser. Full is detected in the write domain against the synchronised
// read pointer, empty in the read domain against the synchronised write
// pointer, so both flags are conservative and never claim space or data that
// does not exist. The read data is the head word (first-word fall-through).
//
// The architecture uses asynchronous FIFOs at the system boundary; the Gray-code
// scheme, DEPTH (a power of two) and the handshake are this design's choices.
// Each side has its own active-low synchronous reset.
module async_fifo #(
  parameter int unsigned WIDTH = 34,
  parameter int unsigned DEPTH = 8
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  input  logic             rclk,
  input  logic             rrst_n,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  wire [AW:0] wbin_n = wbin + (AW+1)'(push);
  wire [AW:0] rbin_n = rbin + (AW+1)'(pop);

  // full: Gray write pointer equals read pointer with the two MSBs inverted
  assign in_ready  = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign out_valid = (rgray != wgray_r2);
  assign out_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      if (push) mem[wbin[AW-1:0]] <= in_data;
      wbin     <= wbin_n;
      wgray    <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  initial begin
    assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("async_fifo: DEPTH must be a power of two, at least 4");
  end

endmodule
