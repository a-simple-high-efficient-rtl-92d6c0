// Self-checking test of ext_regfile: random configuration words, writes and
// reads against a model of 64 physical registers, plus the FIFO mapping of
// $24 (receive) and $25 (send) and the same-cycle write-to-read bypass.
module tb_ext_regfile;
  import mc_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        cfg_we;
  logic [4:0]  cfg_wdata, cfg_o;
  logic [4:0]  ra1, ra2, da;
  logic [31:0] rd1, rd2, wdata, rx_data, tx_data;
  logic [5:0]  ra1_phys, ra2_phys, da_phys, wa_phys;
  logic        ra1_fifo, ra2_fifo, da_fifo, we, wa_fifo, rd_commit, rx_pop, tx_push;

  ext_regfile dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] model [64];
  logic [4:0]  mcfg;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] expect_rd(input logic [4:0] a);
    if (a == 0) return 0;
    if (mcfg[4] && a == 24) return rx_data;
    return model[{mcfg[a[4:3]], a}];
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_wdata = 0; ra1 = 0; ra2 = 0; da = 0; we = 0; wa_phys = 0;
    wa_fifo = 0; wdata = 0; rx_data = 32'hC0DE_0001; rd_commit = 0;
    for (int i = 0; i < 64; i++) model[i] = 0;
    mcfg = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // every physical register gets a distinct value through every config
    for (int c = 0; c < 16; c++) begin
      @(negedge clk);
      cfg_we = 1; cfg_wdata = 5'(c);
      @(posedge clk); #1 cfg_we = 0; mcfg = 5'(c);
      for (int r = 1; r < 32; r++) begin
        @(negedge clk);
        da = 5'(r);
        #1;
        check(da_phys == {mcfg[r/8], 5'(r)} && !da_fifo, "dest translation");
        we = 1; wa_phys = da_phys; wa_fifo = 0; wdata = $urandom;
        ra1 = 5'(r); #1;
        check(rd1 == wdata, "write-to-read bypass");
        @(posedge clk); #1;
        model[wa_phys] = wdata;
        we = 0;
      end
    end
    // random reads / writes / configs
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 9) == 0) begin
        cfg_we = 1; cfg_wdata = 5'($urandom);
      end else cfg_we = 0;
      ra1 = 5'($urandom); ra2 = 5'($urandom); da = 5'($urandom);
      rx_data = $urandom;
      rd_commit = $urandom_range(0, 1);
      #1;
      check(rd1 == expect_rd(ra1), "read port 1");
      check(rd2 == expect_rd(ra2), "read port 2");
      check(ra1_fifo == (mcfg[4] && ra1 == 24), "read 1 fifo flag");
      check(rx_pop == (rd_commit && mcfg[4] && (ra1 == 24 || ra2 == 24)), "rx pop");
      check(da_fifo == (mcfg[4] && da == 25), "dest fifo flag");
      we = $urandom_range(0, 1); wa_phys = da_phys; wa_fifo = da_fifo; wdata = $urandom;
      #1;
      check(tx_push == (we && wa_fifo), "tx push");
      if (tx_push) check(tx_data == wdata, "tx data");
      @(posedge clk); #1;
      if (cfg_we) mcfg = cfg_wdata;
      if (we && !wa_fifo && wa_phys[4:0] != 0) model[wa_phys] = wdata;
      we = 0; cfg_we = 0;
      check(cfg_o == mcfg, "config register");
    end
    // $0 stays zero in both groups
    @(negedge clk);
    cfg_we = 1; cfg_wdata = 5'h01; @(posedge clk); #1 cfg_we = 0; mcfg = 5'h01;
    @(negedge clk); ra1 = 0; #1; check(rd1 == 0, "$0 reads zero with shadow group");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
