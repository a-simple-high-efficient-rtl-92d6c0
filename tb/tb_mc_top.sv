// End-to-end test of mc_top at its default size (32 cores, 4 shared memories,
// 6x6 mesh). Programs run on eight cores at once:
//   - a four-core pipeline: core (0,0) reads four words from shared memory 0,
//     adds a byte vector (packed add) and sends them to core (3,0), which adds
//     with unsigned byte saturation and sends to core (3,3), which shifts the
//     16-bit lanes left by one and sends to core (5,5); that core collects the
//     words in shadow registers and sends them out of the system I/O port and,
//     as a write packet, into shared memory 3;
//   - a packet entering through the system input port is summed by core (2,1);
//   - cores (0,5) and (0,4) each stream a 40-word packet to core (5,2), which
//     sums all 80 words: the second packet is held behind the first by the
//     wormhole path and its sender must wait for FIFO space.
// Every word travels core to core through the FIFOs mapped onto $24/$25. The
// results are checked against values computed here, and each mechanism
// (receive wait, send wait, shared-memory service, both clock-domain
// crossings) must have happened.
module tb_mc_top;
  import mc_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 0, rst_n = 0, run = 0, io_clk = 0, io_rst_n = 0;
  logic load_we = 0, peek_shared = 0;
  logic [1:0] load_target = 0;
  logic [4:0] load_id = 0, peek_id = 0;
  logic [15:0] load_addr = 0, peek_addr = 0;
  logic [31:0] load_data = 0, peek_data;
  logic [31:0] halted, stall_rx, stall_tx, stall_dep;
  logic [3:0] smem_busy;
  logic io_in_valid = 0, io_in_ready, io_out_valid, io_out_ready;
  flit_t io_in_flit, io_out_flit;

  mc_top dut (.*);
  always #5 clk = ~clk;
  always #7 io_clk = ~io_clk;

  int checks = 0, failures = 0;
  int n_rx = 0, n_tx = 0, n_smem = 0, n_ioin = 0, n_ioout = 0;
  flit_t io_got [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (stall_rx != 0) n_rx++;
    if (stall_tx != 0) n_tx++;
    if (smem_busy != 0) n_smem++;
  end
  always @(negedge io_clk) io_out_ready = $urandom_range(0, 1);
  always @(posedge io_clk) begin
    if (io_out_valid && io_out_ready) begin io_got.push_back(io_out_flit); n_ioout++; end
    if (io_in_valid && io_in_ready) n_ioin++;
  end

  // core numbering of the top: row-major over non-memory nodes
  function automatic int cidx(input int x, input int y);
    int n;
    n = 0;
    for (int yy = 0; yy < 6; yy++)
      for (int xx = 0; xx < 6; xx++)
        if ((yy < y || (yy == y && xx < x)) && !((xx % 3 == 1) && (yy % 3 == 1))) n++;
    return n;
  endfunction

  typedef logic [31:0] prog_t [$];

  function automatic void li(ref prog_t p, input int r, input logic [31:0] v);
    p.push_back(lui(r, v[31:16]));
    p.push_back(ori(r, r, v[15:0]));
  endfunction

  task automatic load(input int target, input int id, input int addr, input logic [31:0] d);
    @(negedge clk);
    load_we = 1; load_target = 2'(target); load_id = 5'(id); load_addr = 16'(addr); load_data = d;
    @(posedge clk); #1 load_we = 0;
  endtask

  task automatic load_prog(input int id, input prog_t p);
    foreach (p[i]) load(0, id, i, p[i]);
  endtask

  // reference lane operations
  function automatic logic [31:0] ref_padd8(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] r;
    for (int l = 0; l < 4; l++) r[8*l +: 8] = a[8*l +: 8] + b[8*l +: 8];
    return r;
  endfunction
  function automatic logic [31:0] ref_padds8u(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] r;
    for (int l = 0; l < 4; l++) begin
      int s;
      s = int'(a[8*l +: 8]) + int'(b[8*l +: 8]);
      r[8*l +: 8] = (s > 255) ? 8'hFF : 8'(s);
    end
    return r;
  endfunction
  function automatic logic [31:0] ref_psll16(input logic [31:0] a);
    return {a[30:16], 1'b0, a[14:0], 1'b0};
  endfunction

  initial begin
    prog_t pa, pb, pc, pd, pe, pf, pg, ph;
    int loop_at;
    logic [31:0] src [4], expv [4], io_words [3];
    int A, B, C, D, E, F, G, H;
    A = cidx(0, 0); B = cidx(3, 0); C = cidx(3, 3); D = cidx(5, 5);
    E = cidx(2, 1); F = cidx(0, 5); G = cidx(0, 4); H = cidx(5, 2);

    // ---- A: read shared memory 0, packed add, send to B ----
    li(pa, 8, make_hdr(3'd1, 3'd1, 8'd2));                  // request to memory (1,1)
    li(pa, 9, make_hdr(3'd0, 3'd0, 8'd4));                  // read 4 words, reply to (0,0)
    pa.push_back(addiu(10, 0, 0));                          // address 0
    li(pa, 11, 32'h0102_0304);
    li(pa, 12, make_hdr(3'd3, 3'd0, 8'd4));
    pa.push_back(cfg(5'h10));
    pa.push_back(addu(25, 8, 0)); pa.push_back(addu(25, 9, 0)); pa.push_back(addu(25, 10, 0));
    pa.push_back(addu(25, 12, 0));
    for (int k = 0; k < 4; k++) pa.push_back(simd(SF_PADD, 25, 24, 11, opt(W8)));
    pa.push_back(brk());
    // ---- B: saturating unsigned byte add, send to C ----
    li(pb, 11, 32'h1010_1010);
    li(pb, 12, make_hdr(3'd3, 3'd3, 8'd4));
    pb.push_back(cfg(5'h10)); pb.push_back(addu(25, 12, 0));
    for (int k = 0; k < 4; k++) pb.push_back(simd(SF_PADDS, 25, 24, 11, opt(W8)));
    pb.push_back(brk());
    // ---- C: 16-bit lanes shifted left by one, send to D ----
    li(pc, 12, make_hdr(3'd5, 3'd5, 8'd4));
    pc.push_back(cfg(5'h10)); pc.push_back(addu(25, 12, 0));
    for (int k = 0; k < 4; k++) pc.push_back(simd(SF_PSLL, 25, 1, 24, opt(W16)));
    pc.push_back(brk());
    // ---- D: collect in shadow $1-$4, send to the I/O port and to memory 3 ----
    li(pd, 12, make_hdr(3'd6, 3'd5, 8'd4));
    li(pd, 13, make_hdr(3'd4, 3'd4, 8'd6));
    li(pd, 14, 32'h8000_0004);                              // write 4 words
    pd.push_back(addiu(15, 0, 16));                         // at address 16
    pd.push_back(cfg(5'h11));
    for (int k = 1; k <= 4; k++) pd.push_back(addu(k, 24, 0));
    pd.push_back(addu(25, 12, 0));
    for (int k = 1; k <= 4; k++) pd.push_back(addu(25, k, 0));
    pd.push_back(addu(25, 13, 0)); pd.push_back(addu(25, 14, 0)); pd.push_back(addu(25, 15, 0));
    for (int k = 1; k <= 4; k++) pd.push_back(addu(25, k, 0));
    pd.push_back(brk());
    // ---- E: sum the three words from the system input ----
    pe.push_back(cfg(5'h10));
    pe.push_back(addu(1, 24, 0)); pe.push_back(addu(1, 1, 24)); pe.push_back(addu(1, 1, 24));
    pe.push_back(cfg(5'h00)); pe.push_back(sw(1, 0, 0)); pe.push_back(brk());
    // ---- F and G: stream 40 words each to H ----
    for (int s = 0; s < 2; s++) begin
      automatic prog_t p;
      p.delete();
      li(p, 12, make_hdr(3'd5, 3'd2, 8'd40));
      p.push_back(addiu(1, 0, s ? 1000 : 1));
      p.push_back(addiu(2, 0, 40));
      p.push_back(cfg(5'h10)); p.push_back(addu(25, 12, 0));
      loop_at = p.size();
      p.push_back(addu(25, 1, 0));
      p.push_back(addiu(1, 1, 1));
      p.push_back(addiu(2, 2, -1));
      p.push_back(bne(2, 0, p.size(), loop_at));
      p.push_back(nop());
      p.push_back(brk());
      if (s) pg = p; else pf = p;
    end
    // ---- H: sum 80 words ----
    ph.push_back(addiu(2, 0, 80)); ph.push_back(addiu(3, 0, 0)); ph.push_back(cfg(5'h10));
    loop_at = ph.size();
    ph.push_back(addu(3, 3, 24));
    ph.push_back(addiu(2, 2, -1));
    ph.push_back(bne(2, 0, ph.size(), loop_at));
    ph.push_back(nop());
    ph.push_back(cfg(5'h00)); ph.push_back(sw(3, 0, 0)); ph.push_back(brk());

    // ---- reset, load ----
    repeat (3) @(posedge clk);
    rst_n = 1; io_rst_n = 1;
    for (int c = 0; c < 32; c++) load(0, c, 0, brk());      // idle cores stop at once
    load_prog(A, pa); load_prog(B, pb); load_prog(C, pc); load_prog(D, pd);
    load_prog(E, pe); load_prog(F, pf); load_prog(G, pg); load_prog(H, ph);
    for (int k = 0; k < 4; k++) begin
      src[k] = $urandom;
      load(2, 0, k, src[k]);
      expv[k] = ref_psll16(ref_padds8u(ref_padd8(src[k], 32'h0102_0304), 32'h1010_1010));
    end
    for (int k = 0; k < 3; k++) io_words[k] = $urandom_range(0, 1 << 20);
    @(negedge clk) run = 1;

    // ---- system input packet to E, in the io_clk domain ----
    for (int k = 0; k <= 3; k++) begin
      @(negedge io_clk);
      io_in_valid = 1;
      io_in_flit = (k == 0) ? '{kind: FL_HEAD, data: make_hdr(3'd2, 3'd1, 8'd3)}
                            : '{kind: (k == 3) ? FL_TAIL : FL_BODY, data: io_words[k-1]};
      @(posedge io_clk); while (!io_in_ready) @(posedge io_clk);
    end
    @(negedge io_clk) io_in_valid = 0;

    wait (&halted);
    repeat (50) @(posedge clk);

    // ---- results ----
    check(io_got.size() == 5, $sformatf("I/O output flits: %0d", io_got.size()));
    if (io_got.size() == 5) begin
      check(io_got[0].kind == FL_HEAD, "I/O header");
      for (int k = 0; k < 4; k++)
        check(io_got[k+1].data == expv[k], $sformatf("pipeline word %0d: %h expected %h",
                                                      k, io_got[k+1].data, expv[k]));
      check(io_got[4].kind == FL_TAIL, "I/O tail");
    end
    @(negedge clk);
    peek_shared = 1; peek_id = 3;
    for (int k = 0; k < 4; k++) begin
      peek_addr = 16'(16 + k); #1;
      check(peek_data == expv[k], "shared memory 3 written by the pipeline");
    end
    peek_shared = 0; peek_addr = 0;
    peek_id = 5'(E); #1;
    check(peek_data == io_words[0] + io_words[1] + io_words[2], "sum of system input words");
    peek_id = 5'(H); #1;
    check(peek_data == 32'd820 + 32'd40780, $sformatf("sum of two streams: %0d", peek_data));
    check(n_rx > 0, "a core waited for its receive FIFO");
    check(n_tx > 0, "a core waited for space in its send FIFO");
    check(n_smem > 0, "shared memory served requests");
    check(n_ioin == 4, "system input crossing");
    check(n_ioout == 5, "system output crossing");
    $display("top: rx waits=%0d tx waits=%0d smem busy=%0d io in=%0d io out=%0d",
             n_rx, n_tx, n_smem, n_ioin, n_ioout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
