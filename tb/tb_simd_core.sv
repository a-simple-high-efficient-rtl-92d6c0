// Self-checking program test of simd_core on its own. The program exercises
// register dependences (interlock), load-use, branches with delay slot, the
// SIMD add/shift/multiply units in vector and scalar mode, 32x32 multiply,
// shadow register groups, byte and halfword loads and stores through the
// aligner, and the FIFO mapping of $24/$25. The testbench plays
// the receive FIFO (words arrive late, so the core must wait) and a send FIFO
// drained at random (so the core must wait for space). Results are checked in
// data memory and on the send side; every interlock must have happened.
module tb_simd_core;
  import mc_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 0, rst_n = 0, run = 0;
  logic imem_we = 0, dmem_ext_we = 0;
  logic [9:0] imem_waddr = 0, dmem_ext_addr = 0;
  logic [31:0] imem_wdata = 0, dmem_ext_wdata = 0, dmem_ext_rdata;
  logic rx_valid, rx_pop, tx_push;
  logic [31:0] rx_data, tx_data;
  logic [3:0] tx_free;
  logic halted, stall_rx, stall_tx, stall_dep;
  logic [4:0] rf_cfg;

  simd_core dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_rx = 0, n_tx = 0, n_dep = 0, n_shadow = 0;
  logic [31:0] prog [$];
  logic [31:0] rxq [$];
  logic [31:0] txq [$];
  int txfill = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // receive FIFO model
  assign rx_valid = rxq.size() > 0;
  assign rx_data  = rx_valid ? rxq[0] : 32'hDEAD_BEEF;
  // send FIFO model of depth 8, drained at random
  assign tx_free  = 4'(8 - txfill);
  always @(posedge clk) begin
    if (rx_pop) void'(rxq.pop_front());
    if (tx_push) begin txq.push_back(tx_data); txfill++; end
    if (txfill > 0 && $urandom_range(0, 7) == 0) txfill--;
    if (stall_rx) n_rx++;
    if (stall_tx) n_tx++;
    if (stall_dep) n_dep++;
    if (rf_cfg[3:0] != 0) n_shadow++;
  end

  task automatic emit(input logic [31:0] w); prog.push_back(w); endtask

  initial begin
    int loop_at;
    // ---- program ----
    emit(addiu(1, 0, 5));
    emit(addiu(2, 0, 7));
    emit(addu(3, 1, 2));                               // 12, waits for $2
    emit(sw(3, 0, 0));
    emit(lw(4, 0, 0));
    emit(addiu(5, 4, 1));                              // 13, load-use
    emit(sw(5, 4, 0));
    emit(lui(6, 16'h7F80)); emit(ori(6, 6, 16'h10F0)); // 7F80_10F0
    emit(lui(7, 16'h0190)); emit(ori(7, 7, 16'h2020)); // 0190_2020
    emit(simd(SF_PADDS, 8, 6, 7, opt(W8)));            // unsigned byte saturation
    emit(sw(8, 8, 0));
    emit(simd(SF_PSLL, 9, 3, 6, opt(W8)));             // psll.o by 3
    emit(sw(9, 12, 0));
    emit(simd(SF_PMUL, 0, 6, 7, int'(MUL_8X8)));       // four 8x8 products
    emit(rtype(F_MFLO, 10, 0, 0));
    emit(rtype(F_MFHI, 11, 0, 0));
    emit(sw(10, 16, 0)); emit(sw(11, 20, 0));
    emit(addiu(12, 0, -3));
    emit(lui(13, 1)); emit(ori(13, 13, 16'h86A0));     // 100000
    emit(rtype(F_MULT, 0, 12, 13));                    // -300000, two passes
    emit(rtype(F_MFLO, 14, 0, 0)); emit(rtype(F_MFHI, 15, 0, 0));
    emit(sw(14, 24, 0)); emit(sw(15, 28, 0));
    emit(simd(SF_PADD, 16, 6, 7, opt(W16, 1)));        // scalar: low half of $7 to both lanes
    emit(sw(16, 32, 0));
    // sum 10..1 with a delay-slot loop
    emit(addiu(17, 0, 0)); emit(addiu(18, 0, 10));
    loop_at = prog.size();
    emit(addu(17, 17, 18));
    emit(addiu(18, 18, -1));
    emit(bne(18, 0, prog.size(), loop_at));
    emit(addiu(19, 19, 1));                            // delay slot, runs 10 times
    emit(sw(17, 36, 0)); emit(sw(19, 40, 0));
    // shadow group of $0-$7
    emit(cfg(5'h01));
    emit(addiu(1, 0, 99));
    emit(sw(1, 44, 0));                                // 99 from the shadow $1
    emit(cfg(5'h00));
    emit(sw(1, 48, 0));                                // 5 from the standard $1
    // FIFO mapping: four received words + 7 sent out, then sent a scaled copy
    emit(cfg(5'h10));
    for (int k = 0; k < 4; k++) emit(addu(25, 24, 2));
    for (int k = 0; k < 10; k++) emit(simd(SF_PSLL, 25, 1, 2, opt(W32)));  // 14 each
    emit(addiu(24, 0, 1234));                          // $24 write goes to the register
    emit(cfg(5'h00));
    emit(sw(24, 52, 0));
    // byte and halfword accesses through the aligner
    emit(lui(20, 16'h8081)); emit(ori(20, 20, 16'h7F02));
    emit(sw(20, 60, 0));
    emit(itype(OP_LB, 21, 0, 61));  emit(sw(21, 64, 0));   // 0000007F
    emit(itype(OP_LB, 21, 0, 62));  emit(sw(21, 68, 0));   // FFFFFF81
    emit(itype(OP_LBU, 21, 0, 63)); emit(sw(21, 72, 0));   // 00000080
    emit(itype(OP_LH, 21, 0, 62));  emit(sw(21, 76, 0));   // FFFF8081
    emit(itype(OP_LHU, 21, 0, 60)); emit(sw(21, 80, 0));   // 00007F02
    emit(addiu(22, 0, 16'h00AA)); emit(itype(OP_SB, 22, 0, 61));
    emit(addiu(22, 0, 16'h1234)); emit(itype(OP_SH, 22, 0, 62));
    emit(lw(23, 60, 0)); emit(sw(23, 84, 0));              // 1234AA02
    emit(brk());
    // ---- load and run ----
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_waddr = 10'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0; run = 1;
    // receive words trickle in late
    fork
      begin
        wait (rf_cfg[4]);
        for (int k = 0; k < 4; k++) begin
          repeat (15) @(posedge clk);
          rxq.push_back(32'h100 * (k + 1));
        end
      end
    join_none
    wait (halted);
    @(negedge clk);
    begin
      logic [31:0] exp [14] = '{32'd12, 32'd13, 32'h80FF_30FF, 32'hF800_8080, 32'h0200_1E00,
                                32'h007F_4800, 32'hFFFB_6C20, 32'hFFFF_FFFF, 32'h9FA0_3110,
                                32'd55, 32'd10, 32'd99, 32'd5, 32'd1234};
      logic [31:0] exp_bh [6] = '{32'h0000_007F, 32'hFFFF_FF81, 32'h0000_0080, 32'hFFFF_8081,
                                  32'h0000_7F02, 32'h1234_AA02};
      for (int k = 0; k < 6; k++) begin
        dmem_ext_addr = 10'(16 + k); #1;
        check(dmem_ext_rdata == exp_bh[k], $sformatf("mem[%0d] = %h, expected %h", 16 + k, dmem_ext_rdata, exp_bh[k]));
      end
      for (int k = 0; k < 14; k++) begin
        dmem_ext_addr = 10'(k); #1;
        check(dmem_ext_rdata == exp[k], $sformatf("mem[%0d] = %h, expected %h", k, dmem_ext_rdata, exp[k]));
      end
    end
    check(txq.size() == 14, $sformatf("sent %0d words", txq.size()));
    for (int k = 0; k < 4 && k < txq.size(); k++)
      check(txq[k] == 32'h100 * (k + 1) + 7, "received word + 7 sent");
    for (int k = 4; k < txq.size(); k++) check(txq[k] == 32'd14, "shifted word sent");
    check(rxq.size() == 0, "all received words consumed");
    check(n_rx > 0, "core waited for the receive FIFO");
    check(n_tx > 0, "core waited for the send FIFO");
    check(n_dep > 0, "core waited for a dependence");
    check(n_shadow > 0, "shadow group was selected");
    $display("core: stalls rx=%0d tx=%0d dep=%0d", n_rx, n_tx, n_dep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
