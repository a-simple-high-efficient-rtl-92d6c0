// One processing tile: a core, its send and receive FIFOs and the flit tagging
// between the FIFOs and the router's local port.
//
// Send side: words the core writes to $25 (with the FIFO mapping enabled) enter
// the send FIFO tagged as flits. The first word after an idle period is the
// packet header (destination and payload length, see mc_pkg); the tagger then
// counts the payload words and marks the last one as the tail, so software only
// writes the header once per packet. A length field of 0 stands for 256 words.
// Receive side: flits from the router enter the receive FIFO; header flits are
// dropped at its output, so the core reads only payload words from $24.
//
// The FIFO pair between core and router and its mapping into the register file
// follow the architecture; the tagging, FIFO depth and header layout are this
// design's choices. Reset is synchronous, active low.
module core_tile
  import mc_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  input  logic        dmem_ext_we,
  input  logic [$clog2(DMEM_WORDS)-1:0] dmem_ext_addr,
  input  logic [31:0] dmem_ext_wdata,
  output logic [31:0] dmem_ext_rdata,
  // router local port
  output logic        net_out_valid,
  input  logic        net_out_ready,
  output flit_t       net_out_flit,
  input  logic        net_in_valid,
  output logic        net_in_ready,
  input  flit_t       net_in_flit,
  // status
  output logic        halted,
  output logic        stall_rx,
  output logic        stall_tx,
  output logic        stall_dep,
  output logic [4:0]  rf_cfg
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH+1);

  logic        rx_valid, rx_pop, tx_push;
  logic [31:0] rx_data, tx_data;
  logic [CW-1:0] tx_cnt, rx_cnt;
  logic [CW-1:0] tx_free;

  simd_core #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS), .TXCNT_W(CW)) u_core (
    .clk, .rst_n, .run,
    .imem_we, .imem_waddr, .imem_wdata,
    .dmem_ext_we, .dmem_ext_addr, .dmem_ext_wdata, .dmem_ext_rdata,
    .rx_valid, .rx_data, .rx_pop,
    .tx_push, .tx_data, .tx_free,
    .halted, .stall_rx, .stall_tx, .stall_dep, .rf_cfg
  );

  // ---- send side ----
  logic [8:0] remain;     // payload words still to come in the current packet
  flit_t      tx_flit;
  logic       tx_ready;

  always_comb begin
    tx_flit.data = tx_data;
    if (remain == '0)      tx_flit.kind = FL_HEAD;
    else if (remain == 9'd1) tx_flit.kind = FL_TAIL;
    else                   tx_flit.kind = FL_BODY;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      remain <= '0;
    end else if (tx_push) begin
      if (remain == '0) remain <= (hdr_len(tx_data) == '0) ? 9'd256 : {1'b0, hdr_len(tx_data)};
      else              remain <= remain - 1'b1;
    end
  end

  sync_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_txf (
    .clk, .rst_n,
    .in_valid (tx_push),
    .in_ready (tx_ready),
    .in_data  (tx_flit),
    .out_valid(net_out_valid),
    .out_ready(net_out_ready),
    .out_data (net_out_flit),
    .count    (tx_cnt)
  );

  assign tx_free = CW'(FIFO_DEPTH) - tx_cnt;

  // ---- receive side ----
  logic  rxf_valid, rxf_pop;
  flit_t rxf_flit;

  sync_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_rxf (
    .clk, .rst_n,
    .in_valid (net_in_valid),
    .in_ready (net_in_ready),
    .in_data  (net_in_flit),
    .out_valid(rxf_valid),
    .out_ready(rxf_pop),
    .out_data (rxf_flit),
    .count    (rx_cnt)
  );

  assign rx_valid = rxf_valid && (rxf_flit.kind != FL_HEAD);
  assign rx_data  = rxf_flit.data;
  assign rxf_pop  = (rxf_valid && rxf_flit.kind == FL_HEAD) || rx_pop;

  a_tx_space: assert property (@(posedge clk) disable iff (!rst_n) tx_push |-> tx_ready);

endmodule
