// Cluster shared memory attached to the mesh as a network node.
//
// The memory answers request packets arriving at its router's local port. A
// request's payload is a command word, a word address and, for writes, the data:
//   command [31] 1 = write, 0 = read; [18:16] reply x; [21:19] reply y;
//           [7:0] word count (0 stands for 256)
// A write stores the data words at consecutive addresses and sends no reply. A
// read sends back one packet to the reply coordinates carrying 'count' words
// read from consecutive addresses. Requests are served one at a time, one word
// per cycle. A second port (ext_*) lets a host load or inspect the memory.
//
// Four such memories, one per cluster of eight cores, share the mesh with the
// cores in the architecture. How a core reaches them is not specified there:
// the request format, the memory size and the one-request-at-a-time service are
// this design's choices. Reset is synchronous, active low.
module shared_mem_node
  import mc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  // router local port
  input  logic        net_in_valid,
  output logic        net_in_ready,
  input  flit_t       net_in_flit,
  output logic        net_out_valid,
  input  logic        net_out_ready,
  output flit_t       net_out_flit,
  // host port
  input  logic        ext_we,
  input  logic [$clog2(MEM_WORDS)-1:0] ext_addr,
  input  logic [31:0] ext_wdata,
  output logic [31:0] ext_rdata,
  // status
  output logic        busy
);

  localparam int unsigned AW = $clog2(MEM_WORDS);

  typedef enum logic [2:0] {S_CMD, S_ADDR, S_WDATA, S_SKIP, S_RHDR, S_RDATA} state_e;

  logic [31:0] mem [MEM_WORDS];
  state_e      state;
  logic        is_wr;
  logic [COORD_W-1:0] rx, ry;
  logic [8:0]  cnt;
  logic [AW-1:0] addr;

  wire take = net_in_valid && net_in_ready;

  // header flits carry nothing the memory needs; they are consumed in S_CMD
  assign net_in_ready = (state == S_CMD) || (state == S_ADDR) || (state == S_WDATA)
                        || (state == S_SKIP);

  always_comb begin
    net_out_valid = 1'b0;
    net_out_flit  = '{kind: FL_BODY, data: mem[addr]};
    if (state == S_RHDR) begin
      net_out_valid = 1'b1;
      net_out_flit  = '{kind: FL_HEAD, data: make_hdr(rx, ry, cnt[7:0])};
    end else if (state == S_RDATA) begin
      net_out_valid = 1'b1;
      net_out_flit.kind = (cnt == 9'd1) ? FL_TAIL : FL_BODY;
    end
  end

  assign busy = (state != S_CMD);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_CMD;
      is_wr <= 1'b0;
      rx    <= '0;
      ry    <= '0;
      cnt   <= '0;
      addr  <= '0;
    end else begin
      unique case (state)
        S_CMD: if (take && net_in_flit.kind != FL_HEAD) begin
          is_wr <= net_in_flit.data[31];
          rx    <= hdr_dst_x(net_in_flit.data);
          ry    <= hdr_dst_y(net_in_flit.data);
          cnt   <= (net_in_flit.data[7:0] == '0) ? 9'd256 : {1'b0, net_in_flit.data[7:0]};
          // a one-word packet has no address: drop it
          state <= (net_in_flit.kind == FL_TAIL) ? S_CMD : S_ADDR;
        end
        S_ADDR: if (take) begin
          addr <= net_in_flit.data[AW-1:0];
          if (is_wr) state <= (net_in_flit.kind == FL_TAIL) ? S_CMD : S_WDATA;
          else       state <= (net_in_flit.kind == FL_TAIL) ? S_RHDR : S_SKIP;
        end
        S_WDATA: if (take) begin
          addr <= addr + 1'b1;
          if (net_in_flit.kind == FL_TAIL) state <= S_CMD;
        end
        S_SKIP: if (take && net_in_flit.kind == FL_TAIL) state <= S_RHDR;
        S_RHDR: if (net_out_ready) state <= S_RDATA;
        S_RDATA: if (net_out_ready) begin
          addr <= addr + 1'b1;
          cnt  <= cnt - 1'b1;
          if (cnt == 9'd1) state <= S_CMD;
        end
        default: state <= S_CMD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_WDATA && take) mem[addr] <= net_in_flit.data;
    if (ext_we) mem[ext_addr] <= ext_wdata;
  end
  assign ext_rdata = mem[ext_addr];

endmodule
