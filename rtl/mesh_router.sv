// Five-port wormhole router of the 2-D mesh.
//
// Ports: local, north, east, south, west (port_e). Each input has a small flit
// buffer. A header flit is routed dimension-ordered (first along x, then along
// y, y growing southwards) from the destination coordinates in its header word.
// Wormhole switching: when a header wins an output, that output is locked to
// the input until the packet's tail flit has passed, so the body flits of a
// packet follow the header without carrying routing information and packets
// never interleave on a link. Competing headers are served round-robin per
// output. Every output moves at most one flit per cycle, on out_valid &&
// out_ready; an input buffer accepts a flit on in_valid && in_ready.
//
// The 2-D mesh and wormhole routing are the architecture's; everything else here
// (dimension-order routing, buffer depth, round-robin arbitration, the
// valid/ready link protocol) is this design's choice. Latency: a flit written
// into an input buffer can leave the router in the next cycle. Reset is
// synchronous, active low.
module mesh_router
  import mc_pkg::*;
#(
  parameter logic [COORD_W-1:0] X = '0,
  parameter logic [COORD_W-1:0] Y = '0,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [NPORTS],
  output logic  in_ready  [NPORTS],
  input  flit_t in_flit   [NPORTS],
  output logic  out_valid [NPORTS],
  input  logic  out_ready [NPORTS],
  output flit_t out_flit  [NPORTS]
);

  localparam int unsigned PW = $clog2(NPORTS);

  logic  b_valid [NPORTS];
  logic  b_pop   [NPORTS];
  flit_t b_flit  [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    logic [$clog2(BUF_DEPTH+1)-1:0] unused_cnt;
    sync_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid (in_valid[i]),
      .in_ready (in_ready[i]),
      .in_data  (in_flit[i]),
      .out_valid(b_valid[i]),
      .out_ready(b_pop[i]),
      .out_data (b_flit[i]),
      .count    (unused_cnt)
    );
  end

  function automatic port_e xy_route(input logic [31:0] h);
    if (hdr_dst_x(h) > X)      return P_EAST;
    else if (hdr_dst_x(h) < X) return P_WEST;
    else if (hdr_dst_y(h) > Y) return P_SOUTH;
    else if (hdr_dst_y(h) < Y) return P_NORTH;
    else                       return P_LOCAL;
  endfunction

  // the output each input's head flit wants
  port_e route_q [NPORTS];
  port_e want    [NPORTS];
  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      want[i] = (b_flit[i].kind == FL_HEAD) ? xy_route(b_flit[i].data) : route_q[i];
  end

  // output allocation
  logic          locked [NPORTS];
  logic [PW-1:0] owner  [NPORTS];
  logic [PW-1:0] rr     [NPORTS];
  logic          gnt_v  [NPORTS];
  logic [PW-1:0] gnt    [NPORTS];

  always_comb begin
    int i;
    i = 0;
    for (int o = 0; o < NPORTS; o++) begin
      gnt_v[o] = 1'b0;
      gnt[o]   = '0;
      if (locked[o]) begin
        if (b_valid[owner[o]] && want[owner[o]] == port_e'(o)
            && b_flit[owner[o]].kind != FL_HEAD) begin
          gnt_v[o] = 1'b1;
          gnt[o]   = owner[o];
        end
      end else begin
        for (int k = 0; k < NPORTS; k++) begin
          i = (int'(rr[o]) + k) % NPORTS;
          if (!gnt_v[o] && b_valid[i] && b_flit[i].kind == FL_HEAD && want[i] == port_e'(o)) begin
            gnt_v[o] = 1'b1;
            gnt[o]   = PW'(i);
          end
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) b_pop[i] = 1'b0;
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = gnt_v[o];
      out_flit[o]  = b_flit[gnt[o]];
      if (gnt_v[o] && out_ready[o]) b_pop[gnt[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORTS; o++) begin
        locked[o]  <= 1'b0;
        owner[o]   <= '0;
        rr[o]      <= '0;
        route_q[o] <= P_LOCAL;
      end
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (gnt_v[o] && out_ready[o]) begin
          unique case (b_flit[gnt[o]].kind)
            FL_HEAD: begin
              locked[o]        <= 1'b1;
              owner[o]         <= gnt[o];
              route_q[gnt[o]]  <= port_e'(o);
              rr[o]            <= PW'((int'(gnt[o]) + 1) % NPORTS);
            end
            FL_TAIL: locked[o] <= 1'b0;
            default: ;
          endcase
        end
      end
    end
  end

endmodule
