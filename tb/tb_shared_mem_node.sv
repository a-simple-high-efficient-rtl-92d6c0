// Self-checking test of shared_mem_node: write packets of random length to
// random addresses, read packets back and compare against a model memory;
// checks the reply header (destination and length), tail tagging, that the
// host port sees the written data, and random back pressure on the reply.
module tb_shared_mem_node;
  import mc_pkg::*;
  localparam int MW = 256;
  logic clk = 0, rst_n = 0;
  logic net_in_valid, net_in_ready, net_out_valid, net_out_ready, ext_we, busy;
  flit_t net_in_flit, net_out_flit;
  logic [7:0] ext_addr;
  logic [31:0] ext_wdata, ext_rdata;

  shared_mem_node #(.MEM_WORDS(MW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] model [MW];
  flit_t got [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input flit_kind_e k, input logic [31:0] d);
    @(negedge clk); net_in_valid = 1; net_in_flit = '{kind: k, data: d};
    @(posedge clk); while (!net_in_ready) @(posedge clk);
    @(negedge clk); net_in_valid = 0;
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) net_out_ready = $urandom_range(0, 2) != 0;
  always @(posedge clk) if (net_out_valid && net_out_ready) got.push_back(net_out_flit);

  initial begin
    net_in_valid = 0; net_in_flit = '0; ext_we = 0; ext_addr = 0; ext_wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // clear through the host port
    for (int i = 0; i < MW; i++) begin
      @(negedge clk); ext_we = 1; ext_addr = 8'(i); ext_wdata = 0; model[i] = 0;
    end
    @(negedge clk); ext_we = 0;
    for (int n = 0; n < 60; n++) begin
      int cnt, addr;
      cnt = $urandom_range(1, 8); addr = $urandom_range(0, MW - 9);
      if (n % 2 == 0) begin
        send(FL_HEAD, make_hdr(3'd1, 3'd1, 8'(cnt + 2)));
        send(FL_BODY, {1'b1, 23'd0, 8'(cnt)});
        send(FL_BODY, 32'(addr));
        for (int k = 0; k < cnt; k++) begin
          logic [31:0] d;
          d = $urandom; model[addr + k] = d;
          send(k == cnt - 1 ? FL_TAIL : FL_BODY, d);
        end
      end else begin
        logic [31:0] cmd;
        cmd = make_hdr(3'(n % 6), 3'(n % 5), 8'(cnt));
        got.delete();
        send(FL_HEAD, make_hdr(3'd1, 3'd1, 8'd2));
        send(FL_BODY, cmd);
        send(FL_TAIL, 32'(addr));
        wait (got.size() == cnt + 1);
        check(got[0].kind == FL_HEAD && got[0].data == make_hdr(3'(n % 6), 3'(n % 5), 8'(cnt)),
              "reply header");
        for (int k = 0; k < cnt; k++) begin
          check(got[k+1].data == model[addr + k], "read data");
          check(got[k+1].kind == ((k == cnt - 1) ? FL_TAIL : FL_BODY), "reply tagging");
        end
      end
    end
    repeat (5) @(posedge clk);
    check(!busy, "idle at the end");
    for (int i = 0; i < MW; i++) begin
      @(negedge clk); ext_addr = 8'(i); #1;
      check(ext_rdata == model[i], "host port read-back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
