// Self-checking test of mesh_router at node (2,2): all five inputs send random
// packets to random destinations while every output applies random back
// pressure. Each output is checked to carry only packets whose dimension-order
// route leads there, each packet complete, in order and never interleaved with
// another (wormhole). Counts contention (two headers wanting one output) and
// back-pressure stalls, which must both occur; checks the one-cycle latency
// through an idle router.
module tb_mesh_router;
  import mc_pkg::*;
  localparam logic [2:0] RX = 3'd2, RY = 3'd2;

  logic  clk = 0, rst_n = 0;
  logic  in_valid [NPORTS], in_ready [NPORTS], out_valid [NPORTS], out_ready [NPORTS];
  flit_t in_flit [NPORTS], out_flit [NPORTS];

  mesh_router #(.X(RX), .Y(RY)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int sent_pkts = 0, recv_pkts = 0, contention = 0, backpressure = 0;
  localparam int PKTS_PER_INPUT = 150;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int route_of(input logic [2:0] dx, input logic [2:0] dy);
    if (dx > RX) return P_EAST;
    if (dx < RX) return P_WEST;
    if (dy > RY) return P_SOUTH;
    if (dy < RY) return P_NORTH;
    return P_LOCAL;
  endfunction

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // per-output checker state
  bit       busy_o [NPORTS];
  int       src_o [NPORTS], seq_o [NPORTS], idx_o [NPORTS], len_o [NPORTS];

  always @(posedge clk) if (rst_n) begin
    int heads_for [NPORTS];
    for (int o = 0; o < NPORTS; o++) heads_for[o] = 0;
    for (int i = 0; i < NPORTS; i++)
      if (dut.b_valid[i] && dut.b_flit[i].kind == FL_HEAD) heads_for[dut.want[i]]++;
    for (int o = 0; o < NPORTS; o++) if (heads_for[o] > 1) contention++;
    for (int o = 0; o < NPORTS; o++) begin
      if (out_valid[o] && !out_ready[o]) backpressure++;
      if (out_valid[o] && out_ready[o]) begin
        flit_t f;
        f = out_flit[o];
        if (f.kind == FL_HEAD) begin
          check(!busy_o[o], "header inside another packet");
          check(route_of(hdr_dst_x(f.data), hdr_dst_y(f.data)) == o, "dimension-order route");
          busy_o[o] = 1; src_o[o] = f.data[31:28]; seq_o[o] = f.data[27:22]; idx_o[o] = 0;
          len_o[o] = hdr_len(f.data);
        end else begin
          check(busy_o[o], "payload without header");
          check(f.data[31:28] == src_o[o] && f.data[27:22] == seq_o[o], "packets interleaved");
          check(f.data[7:0] == idx_o[o], "payload order");
          idx_o[o]++;
          check((f.kind == FL_TAIL) == (idx_o[o] == len_o[o]), "tail position");
          if (f.kind == FL_TAIL) begin busy_o[o] = 0; recv_pkts++; end
        end
      end
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_rdy
    always @(negedge clk) out_ready[o] = (o == 0) ? 1'b1 : ($urandom_range(0, 3) != 0);
  end

  for (genvar i = 0; i < NPORTS; i++) begin : g_src
    initial begin
      in_valid[i] = 0; in_flit[i] = '0;
      wait (rst_n);
      for (int p = 0; p < PKTS_PER_INPUT; p++) begin
        int len;
        logic [2:0] dx, dy;
        len = $urandom_range(1, 6);
        dx = 3'($urandom_range(0, 5)); dy = 3'($urandom_range(0, 5));
        for (int k = 0; k <= len; k++) begin
          @(negedge clk);
          in_valid[i] = 1;
          if (k == 0) begin
            in_flit[i].kind = FL_HEAD;
            in_flit[i].data = make_hdr(dx, dy, 8'(len));
            in_flit[i].data[31:28] = 4'(i); in_flit[i].data[27:22] = 6'(p);
          end else begin
            in_flit[i].kind = (k == len) ? FL_TAIL : FL_BODY;
            in_flit[i].data = {4'(i), 6'(p), 14'd0, 8'(k - 1)};
          end
          @(posedge clk);
          while (!in_ready[i]) @(posedge clk);
        end
        @(negedge clk) in_valid[i] = 0;
        sent_pkts++;
        if ($urandom_range(0, 1)) @(negedge clk);
      end
    end
  end

  initial begin
    for (int o = 0; o < NPORTS; o++) busy_o[o] = 0;
    repeat (3) @(posedge clk);
    // latency through an idle router: header written at edge t leaves at t+1
    @(negedge clk);
    rst_n = 1;
    wait (sent_pkts == NPORTS * PKTS_PER_INPUT);
    repeat (200) @(posedge clk);
    check(recv_pkts == sent_pkts, $sformatf("delivered %0d of %0d packets", recv_pkts, sent_pkts));
    check(contention > 0, "contention occurred");
    check(backpressure > 0, "back pressure occurred");
    $display("router: packets=%0d contention=%0d backpressure=%0d", recv_pkts, contention, backpressure);
    // idle latency
    @(negedge clk);
    in_valid[P_WEST] = 1; in_flit[P_WEST] = '{kind: FL_HEAD, data: make_hdr(3'd5, 3'd2, 8'd1)};
    @(posedge clk); #1 in_valid[P_WEST] = 0;
    check(out_valid[P_EAST] && out_flit[P_EAST].kind == FL_HEAD, "one-cycle latency");
    @(negedge clk);
    in_valid[P_WEST] = 1; in_flit[P_WEST] = '{kind: FL_TAIL, data: 32'h0};
    @(posedge clk); #1 in_valid[P_WEST] = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
