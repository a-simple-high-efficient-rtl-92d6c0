// Self-checking test of sync_fifo: random pushes and pops against a queue
// model, fill to full, ready/valid flags, count, and the one-cycle
// write-to-read latency of the fall-through head.
module tb_sync_fifo;
  localparam int W = 34, D = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] count;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(!out_valid && in_ready && count == 0, "empty after reset");
    // latency: written word is readable in the next cycle
    in_valid = 1; in_data = 34'h1_2345_6789;
    @(posedge clk); #1 in_valid = 0;
    check(out_valid && out_data == 34'h1_2345_6789, "one-cycle fall-through");
    out_ready = 1; @(posedge clk); #1 out_ready = 0;
    // fill to full
    for (int i = 0; i < D; i++) begin
      @(negedge clk); in_valid = 1; in_data = W'(i + 100);
      @(posedge clk); #1 in_valid = 0;
    end
    check(!in_ready && count == D, "full");
    for (int i = 0; i < D; i++) begin
      @(negedge clk); check(out_data == W'(i + 100), "order after full");
      out_ready = 1; @(posedge clk); #1 out_ready = 0;
    end
    check(!out_valid, "empty again");
    // random traffic
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 1); in_data = {$urandom, 2'($urandom)};
      out_ready = $urandom_range(0, 1);
      #1;
      check(count == q.size(), "count");
      check(in_ready == (q.size() < D), "in_ready");
      check(out_valid == (q.size() > 0), "out_valid");
      if (out_valid) check(out_data == q[0], "head data");
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
