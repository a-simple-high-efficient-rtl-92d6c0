// Self-checking test of core_tile. The testbench stands in for the router: it
// checks the flits the tile sends (header tagged FL_HEAD, payload words tagged
// body/tail by the length in the header) and sends the tile a packet whose
// header must be dropped before the core reads the payload from $24. The
// program is the two-core addition exchange: send a0+a1, receive a word and add
// a2 to it.
module tb_core_tile;
  import mc_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 0, rst_n = 0, run = 0;
  logic imem_we = 0, dmem_ext_we = 0;
  logic [9:0] imem_waddr = 0, dmem_ext_addr = 0;
  logic [31:0] imem_wdata = 0, dmem_ext_wdata = 0, dmem_ext_rdata;
  logic net_out_valid, net_out_ready, net_in_valid, net_in_ready;
  flit_t net_out_flit, net_in_flit;
  logic halted, stall_rx, stall_tx, stall_dep;
  logic [4:0] rf_cfg;

  core_tile dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  flit_t got [$];
  logic [31:0] prog [$];
  localparam logic [31:0] HDR = 32'h0013_0003;   // to (3,2), three payload words

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) net_out_ready = $urandom_range(0, 1);
  always @(posedge clk) if (net_out_valid && net_out_ready) got.push_back(net_out_flit);

  initial begin
    prog.push_back(addiu(4, 0, 1000));        // a0
    prog.push_back(addiu(5, 0, 234));         // a1
    prog.push_back(addiu(7, 0, 66));          // a2
    prog.push_back(lui(8, HDR[31:16]));
    prog.push_back(ori(8, 8, HDR[15:0]));
    prog.push_back(cfg(5'h10));
    prog.push_back(addu(25, 8, 0));           // header
    prog.push_back(addu(25, 4, 5));           // a0 + a1
    prog.push_back(addu(25, 4, 0));
    prog.push_back(addu(25, 5, 0));
    prog.push_back(addu(9, 24, 7));           // received + a2
    prog.push_back(cfg(5'h00));
    prog.push_back(sw(9, 0, 0));
    prog.push_back(brk());
    net_in_valid = 0; net_in_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_waddr = 10'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0; run = 1;
    repeat (30) @(posedge clk);
    check(stall_rx, "core waits for the packet");
    @(negedge clk); net_in_valid = 1; net_in_flit = '{kind: FL_HEAD, data: 32'h0000_0001};
    @(posedge clk); while (!net_in_ready) @(posedge clk);
    @(negedge clk); net_in_flit = '{kind: FL_TAIL, data: 32'd5000};
    @(posedge clk); while (!net_in_ready) @(posedge clk);
    @(negedge clk); net_in_valid = 0;
    wait (halted);
    repeat (20) @(posedge clk);
    @(negedge clk); dmem_ext_addr = 0; #1;
    check(dmem_ext_rdata == 32'd5066, "received word plus a2");
    check(got.size() == 4, $sformatf("flits sent: %0d", got.size()));
    if (got.size() == 4) begin
      check(got[0].kind == FL_HEAD && got[0].data == HDR, "header flit");
      check(got[1].kind == FL_BODY && got[1].data == 32'd1234, "a0+a1 flit");
      check(got[2].kind == FL_BODY && got[2].data == 32'd1000, "body flit");
      check(got[3].kind == FL_TAIL && got[3].data == 32'd234, "tail flit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
