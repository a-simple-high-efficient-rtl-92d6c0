// Self-checking test of async_fifo: two unrelated clocks, random valid/ready on
// both sides, every word checked in order; also checks that the FIFO reports
// full after DEPTH writes with the reader stopped.
module tb_async_fifo;
  localparam int W = 34, D = 8;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int sent = 0, got = 0;
  bit stop_reader = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // writer
  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge wclk); wrst_n = 1;
    repeat (5) @(posedge wclk);
    // fill while the reader is stopped
    while (sent < D) begin
      @(negedge wclk); in_valid = 1; in_data = W'(sent);
      @(posedge wclk); if (in_ready) begin q.push_back(in_data); sent++; end
    end
    @(negedge wclk); in_valid = 0;
    repeat (6) @(posedge wclk);
    #1 check(!in_ready, "full after DEPTH writes");
    stop_reader = 0;
    while (sent < 2000) begin
      @(negedge wclk);
      in_valid = $urandom_range(0, 1); in_data = {$urandom, 2'($urandom)};
      @(posedge wclk);
      if (in_valid && in_ready) begin q.push_back(in_data); sent++; end
    end
    @(negedge wclk); in_valid = 0;
  end

  // reader
  initial begin
    out_ready = 0;
    repeat (3) @(posedge rclk); rrst_n = 1;
    wait (!stop_reader);
    while (got < 2000) begin
      @(negedge rclk);
      out_ready = $urandom_range(0, 1);
      @(posedge rclk);
      if (out_valid && out_ready) begin
        check(q.size() > 0 && out_data == q[0], "data in order");
        void'(q.pop_front());
        got++;
      end
    end
    check(got == 2000, "all words received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
