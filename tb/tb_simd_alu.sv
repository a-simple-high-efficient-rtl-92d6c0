// Self-checking test of simd_alu: every lane width with wrap-around and
// saturating (signed and unsigned) add and subtract on random and corner-case
// operands, compared with a lane-by-lane integer model; plus the scalar ops.
module tb_simd_alu;
  import mc_pkg::*;
  alu_op_e op; lane_e lane; logic sgn; logic [31:0] a, b, y;
  simd_alu dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s op=%s lane=%s sgn=%0d a=%h b=%h y=%h", what, op.name(), lane.name(), sgn, a, b, y); end
  endtask

  function automatic logic [31:0] model(input alu_op_e o, input lane_e ln, input logic s,
                                        input logic [31:0] x, input logic [31:0] z);
    int w, n;
    logic [31:0] r;
    r = 0;
    w = (ln == W4) ? 4 : (ln == W8) ? 8 : (ln == W16) ? 16 : 32;
    n = 32 / w;
    for (int l = 0; l < n; l++) begin
      longint xa, za, res, lo, hi;
      logic [31:0] xb, zb;
      xb = (x >> (l * w)) & ((64'd1 << w) - 1);
      zb = (z >> (l * w)) & ((64'd1 << w) - 1);
      if (s && (o == ALU_ADDS || o == ALU_SUBS)) begin
        xa = xb[w-1] ? longint'(xb) - (longint'(1) << w) : longint'(xb);
        za = zb[w-1] ? longint'(zb) - (longint'(1) << w) : longint'(zb);
        lo = -(longint'(1) << (w - 1)); hi = (longint'(1) << (w - 1)) - 1;
      end else begin
        xa = longint'(xb); za = longint'(zb);
        lo = 0; hi = (longint'(1) << w) - 1;
      end
      res = (o == ALU_ADD || o == ALU_ADDS) ? xa + za : xa - za;
      if (o == ALU_ADDS || o == ALU_SUBS) begin
        if (res > hi) res = hi;
        if (res < lo) res = lo;
      end
      r = r | ((32'(res) & 32'((64'd1 << w) - 1)) << (l * w));
    end
    return r;
  endfunction

  initial begin
    automatic logic [31:0] corners[6] = '{32'h0, 32'hFFFF_FFFF, 32'h7F7F_7F7F, 32'h8080_8080, 32'h7FFF_8000, 32'h0123_89AB};
    alu_op_e ops[4] = '{ALU_ADD, ALU_SUB, ALU_ADDS, ALU_SUBS};
    for (int oi = 0; oi < 4; oi++)
      for (int li = 0; li < 4; li++)
        for (int si = 0; si < 2; si++)
          for (int n = 0; n < 400; n++) begin
            op = ops[oi]; lane = lane_e'(li); sgn = si[0];
            a = (n < 36) ? corners[n % 6] : $urandom;
            b = (n < 36) ? corners[n / 6] : $urandom;
            #1 check(y == model(op, lane, sgn, a, b), "packed arithmetic");
          end
    // scalar operations
    for (int n = 0; n < 500; n++) begin
      a = $urandom; b = $urandom; lane = W32;
      if (n % 7 == 0) b = a;
      op = ALU_AND; #1 check(y == (a & b), "and");
      op = ALU_OR;  #1 check(y == (a | b), "or");
      op = ALU_XOR; #1 check(y == (a ^ b), "xor");
      op = ALU_NOR; #1 check(y == ~(a | b), "nor");
      op = ALU_SLT; sgn = 1; #1 check(y == 32'($signed(a) < $signed(b)), "slt");
      op = ALU_SLT; sgn = 0; #1 check(y == 32'(a < b), "sltu");
      op = ALU_LUI; #1 check(y == {b[15:0], 16'h0}, "lui");
    end
    // paper example-style: four 8-bit saturated adds
    op = ALU_ADDS; lane = W8; sgn = 0; a = 32'hF0_10_80_FF; b = 32'h20_10_80_01;
    #1 check(y == 32'hFF_20_FF_FF, "unsigned byte saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
