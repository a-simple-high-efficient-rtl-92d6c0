// 32-core system: four clusters of eight cores and one shared memory on a 6x6
// 2-D mesh with wormhole routers.
//
// Every mesh node has a router. Cluster (cx, cy), cx, cy in {0, 1}, covers the
// 3x3 nodes x = 3cx..3cx+2, y = 3cy..3cy+2; its shared memory sits in the
// centre node (3cx+1, 3cy+1) and its eight cores on the other nodes. Cores are
// numbered 0..31 in row-major order over the non-memory nodes, memories 0..3 in
// row-major order of their clusters. A core sends a packet by writing a header
// word and its payload words to $25 once its register file maps the FIFO ports;
// the packet crosses the mesh and its payload appears at $24 of the destination.
//
// System interfaces are dual-clock FIFOs on the mesh edge, in the io_clk domain:
// packets written to io_in enter the west port of node (0,0); packets addressed
// to x = 6, y = 5 leave through the east port of node (5,5) to io_out. Other
// links on the mesh edge are not connected: a flit routed off the mesh there is
// discarded.
//
// Host access: load_* writes instruction or data memory of one core or a shared
// memory while the cores are held by run = 0; peek_* reads data memory or
// shared memory back. The 32 cores, 4 shared memories, 4 clusters and the mesh
// with wormhole routing follow the architecture; the placement, numbering, edge
// interfaces and host ports are this design's choices.
module mc_top
  import mc_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned SMEM_WORDS = 4096,
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned IO_DEPTH   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  // host load port: target 0 = instruction memory, 1 = data memory of core
  // load_id, 2 = shared memory load_id[1:0]
  input  logic        load_we,
  input  logic [1:0]  load_target,
  input  logic [4:0]  load_id,
  input  logic [15:0] load_addr,
  input  logic [31:0] load_data,
  // host read-back port: peek_shared = 0 reads core peek_id's data memory
  input  logic        peek_shared,
  input  logic [4:0]  peek_id,
  input  logic [15:0] peek_addr,
  output logic [31:0] peek_data,
  // per-core status
  output logic [31:0] halted,
  output logic [31:0] stall_rx,
  output logic [31:0] stall_tx,
  output logic [31:0] stall_dep,
  output logic [3:0]  smem_busy,
  // system I/O in the io_clk domain
  input  logic        io_clk,
  input  logic        io_rst_n,
  input  logic        io_in_valid,
  output logic        io_in_ready,
  input  flit_t       io_in_flit,
  output logic        io_out_valid,
  input  logic        io_out_ready,
  output flit_t       io_out_flit
);

  localparam int unsigned NX = 6;
  localparam int unsigned NY = 6;
  localparam int unsigned IAW = $clog2(IMEM_WORDS);
  localparam int unsigned DAW = $clog2(DMEM_WORDS);
  localparam int unsigned SAW = $clog2(SMEM_WORDS);

  function automatic bit is_mem_node(input int x, input int y);
    return (x % 3 == 1) && (y % 3 == 1);
  endfunction

  function automatic int core_index(input int x, input int y);
    int n;
    n = 0;
    for (int yy = 0; yy < NY; yy++)
      for (int xx = 0; xx < NX; xx++)
        if ((yy < y || (yy == y && xx < x)) && !is_mem_node(xx, yy)) n++;
    return n;
  endfunction

  function automatic int mem_index(input int x, input int y);
    return (y / 3) * 2 + (x / 3);
  endfunction

  // router port signals, [node][port]
  logic  r_in_valid  [NX*NY][NPORTS];
  logic  r_in_ready  [NX*NY][NPORTS];
  flit_t r_in_flit   [NX*NY][NPORTS];
  logic  r_out_valid [NX*NY][NPORTS];
  logic  r_out_ready [NX*NY][NPORTS];
  flit_t r_out_flit  [NX*NY][NPORTS];

  logic [31:0] core_peek [32];
  logic [31:0] smem_peek [4];

  // edge interfaces
  logic  ioi_valid, ioi_ready, ioo_valid, ioo_ready;
  flit_t ioi_flit, ioo_flit;

  async_fifo #(.WIDTH(FLIT_W), .DEPTH(IO_DEPTH)) u_io_in (
    .wclk(io_clk), .wrst_n(io_rst_n),
    .in_valid(io_in_valid), .in_ready(io_in_ready), .in_data(io_in_flit),
    .rclk(clk), .rrst_n(rst_n),
    .out_valid(ioi_valid), .out_ready(ioi_ready), .out_data(ioi_flit)
  );

  async_fifo #(.WIDTH(FLIT_W), .DEPTH(IO_DEPTH)) u_io_out (
    .wclk(clk), .wrst_n(rst_n),
    .in_valid(ioo_valid), .in_ready(ioo_ready), .in_data(ioo_flit),
    .rclk(io_clk), .rrst_n(io_rst_n),
    .out_valid(io_out_valid), .out_ready(io_out_ready), .out_data(io_out_flit)
  );

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int N = y * NX + x;

      mesh_router #(.X(COORD_W'(x)), .Y(COORD_W'(y))) u_router (
        .clk, .rst_n,
        .in_valid (r_in_valid[N]),
        .in_ready (r_in_ready[N]),
        .in_flit  (r_in_flit[N]),
        .out_valid(r_out_valid[N]),
        .out_ready(r_out_ready[N]),
        .out_flit (r_out_flit[N])
      );

      // ---- mesh links ----
      // north
      if (y > 0) begin : g_n
        assign r_in_valid[N][P_NORTH]  = r_out_valid[N-NX][P_SOUTH];
        assign r_in_flit[N][P_NORTH]   = r_out_flit[N-NX][P_SOUTH];
        assign r_out_ready[N][P_NORTH] = r_in_ready[N-NX][P_SOUTH];
      end else begin : g_n_edge
        assign r_in_valid[N][P_NORTH]  = 1'b0;
        assign r_in_flit[N][P_NORTH]   = '0;
        assign r_out_ready[N][P_NORTH] = 1'b1;
      end
      // south
      if (y < NY - 1) begin : g_s
        assign r_in_valid[N][P_SOUTH]  = r_out_valid[N+NX][P_NORTH];
        assign r_in_flit[N][P_SOUTH]   = r_out_flit[N+NX][P_NORTH];
        assign r_out_ready[N][P_SOUTH] = r_in_ready[N+NX][P_NORTH];
      end else begin : g_s_edge
        assign r_in_valid[N][P_SOUTH]  = 1'b0;
        assign r_in_flit[N][P_SOUTH]   = '0;
        assign r_out_ready[N][P_SOUTH] = 1'b1;
      end
      // west
      if (x > 0) begin : g_w
        assign r_in_valid[N][P_WEST]  = r_out_valid[N-1][P_EAST];
        assign r_in_flit[N][P_WEST]   = r_out_flit[N-1][P_EAST];
        assign r_out_ready[N][P_WEST] = r_in_ready[N-1][P_EAST];
      end else if (y == 0) begin : g_w_io
        assign r_in_valid[N][P_WEST]  = ioi_valid;
        assign r_in_flit[N][P_WEST]   = ioi_flit;
        assign ioi_ready              = r_in_ready[N][P_WEST];
        assign r_out_ready[N][P_WEST] = 1'b1;
      end else begin : g_w_edge
        assign r_in_valid[N][P_WEST]  = 1'b0;
        assign r_in_flit[N][P_WEST]   = '0;
        assign r_out_ready[N][P_WEST] = 1'b1;
      end
      // east
      if (x < NX - 1) begin : g_e
        assign r_in_valid[N][P_EAST]  = r_out_valid[N+1][P_WEST];
        assign r_in_flit[N][P_EAST]   = r_out_flit[N+1][P_WEST];
        assign r_out_ready[N][P_EAST] = r_in_ready[N+1][P_WEST];
      end else if (y == NY - 1) begin : g_e_io
        assign r_in_valid[N][P_EAST]  = 1'b0;
        assign r_in_flit[N][P_EAST]   = '0;
        assign ioo_valid              = r_out_valid[N][P_EAST];
        assign ioo_flit               = r_out_flit[N][P_EAST];
        assign r_out_ready[N][P_EAST] = ioo_ready;
      end else begin : g_e_edge
        assign r_in_valid[N][P_EAST]  = 1'b0;
        assign r_in_flit[N][P_EAST]   = '0;
        assign r_out_ready[N][P_EAST] = 1'b1;
      end

      // ---- node ----
      if (is_mem_node(x, y)) begin : g_mem
        localparam int M = mem_index(x, y);
        shared_mem_node #(.MEM_WORDS(SMEM_WORDS)) u_smem (
          .clk, .rst_n,
          .net_in_valid (r_out_valid[N][P_LOCAL]),
          .net_in_ready (r_out_ready[N][P_LOCAL]),
          .net_in_flit  (r_out_flit[N][P_LOCAL]),
          .net_out_valid(r_in_valid[N][P_LOCAL]),
          .net_out_ready(r_in_ready[N][P_LOCAL]),
          .net_out_flit (r_in_flit[N][P_LOCAL]),
          .ext_we   (load_we && load_target == 2'd2 && load_id[1:0] == 2'(M)),
          .ext_addr (load_we ? load_addr[SAW-1:0] : peek_addr[SAW-1:0]),
          .ext_wdata(load_data),
          .ext_rdata(smem_peek[M]),
          .busy     (smem_busy[M])
        );
      end else begin : g_core
        localparam int C = core_index(x, y);
        logic [4:0] unused_cfg;
        core_tile #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS),
                    .FIFO_DEPTH(FIFO_DEPTH)) u_tile (
          .clk, .rst_n, .run,
          .imem_we       (load_we && load_target == 2'd0 && load_id == 5'(C)),
          .imem_waddr    (load_addr[IAW-1:0]),
          .imem_wdata    (load_data),
          .dmem_ext_we   (load_we && load_target == 2'd1 && load_id == 5'(C)),
          .dmem_ext_addr (load_we ? load_addr[DAW-1:0] : peek_addr[DAW-1:0]),
          .dmem_ext_wdata(load_data),
          .dmem_ext_rdata(core_peek[C]),
          .net_out_valid (r_in_valid[N][P_LOCAL]),
          .net_out_ready (r_in_ready[N][P_LOCAL]),
          .net_out_flit  (r_in_flit[N][P_LOCAL]),
          .net_in_valid  (r_out_valid[N][P_LOCAL]),
          .net_in_ready  (r_out_ready[N][P_LOCAL]),
          .net_in_flit   (r_out_flit[N][P_LOCAL]),
          .halted        (halted[C]),
          .stall_rx      (stall_rx[C]),
          .stall_tx      (stall_tx[C]),
          .stall_dep     (stall_dep[C]),
          .rf_cfg        (unused_cfg)
        );
      end
    end
  end

  assign peek_data = peek_shared ? smem_peek[peek_id[1:0]] : core_peek[peek_id];

endmodule
