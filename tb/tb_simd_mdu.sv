// Self-checking test of simd_mdu: all four modes, signed and unsigned, random
// and corner operands, back-to-back issue; checks each product against an
// integer model and checks the latency (3 cycles, 4 for 32x32) and the busy
// cycle of the 32x32 mode.
module tb_simd_mdu;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, sgn, busy, res_valid;
  mul_mode_e mode;
  logic [31:0] a, b;
  logic [63:0] res;

  simd_mdu dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  typedef struct { logic [63:0] exp; int due; } exp_t;
  exp_t q[$];
  int n_results = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint ext(input logic [31:0] v, input int w, input logic s);
    logic [31:0] m;
    m = v & 32'((64'd1 << w) - 1);
    if (s && m[w-1]) return longint'(m) - (longint'(1) << w);
    return longint'(m);
  endfunction

  function automatic logic [63:0] model(input mul_mode_e m, input logic s,
                                        input logic [31:0] x, input logic [31:0] z);
    logic [63:0] r;
    r = 0;
    case (m)
      MUL_8X8:   for (int l = 0; l < 4; l++) r[16*l +: 16] = 16'(ext(x >> (8*l), 8, s) * ext(z >> (8*l), 8, s));
      MUL_16X16: for (int l = 0; l < 2; l++) r[32*l +: 32] = 32'(ext(x >> (16*l), 16, s) * ext(z >> (16*l), 16, s));
      MUL_32X16: r = 64'(ext(x, 32, s) * ext(z, 16, s));
      default: begin
        if (s) r = 64'($signed(64'(signed'(x))) * $signed(64'(signed'(z))));
        else   r = {32'd0, x} * {32'd0, z};
      end
    endcase
    return r;
  endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // result checker
  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      check(q.size() > 0, "unexpected result");
      if (q.size() > 0) begin
        check(res == q[0].exp, $sformatf("product %h expected %h", res, q[0].exp));
        check(cycle == q[0].due, $sformatf("latency: at %0d expected %0d", cycle, q[0].due));
        void'(q.pop_front());
        n_results++;
      end
    end
  end

  initial begin
    automatic logic [31:0] corners[5] = '{32'h0, 32'hFFFF_FFFF, 32'h8000_8080, 32'h7FFF_7F7F, 32'h0001_0001};
    start = 0; mode = MUL_8X8; sgn = 0; a = 0; b = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (busy) begin
        start = 0;
      end else begin
        start = $urandom_range(0, 3) != 0;
        mode = mul_mode_e'($urandom_range(0, 3)); sgn = $urandom_range(0, 1);
        a = (n < 100) ? corners[n % 5] : $urandom;
        b = (n < 100) ? corners[(n / 5) % 5] : $urandom;
        if (start) begin
          exp_t e;
          e.exp = model(mode, sgn, a, b);
          e.due = cycle + ((mode == MUL_32X32) ? 5 : 4);  // sampled at the edge closing the result cycle
          q.push_back(e);
        end
      end
      @(posedge clk);
      #1;
      if (start && mode == MUL_32X32) check(busy, "busy during second pass");
    end
    @(negedge clk) start = 0;
    repeat (8) @(posedge clk);
    check(q.size() == 0, "all results delivered");
    check(n_results > 1500, $sformatf("products checked: %0d", n_results));
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
