// Self-checking test of simd_shifter: SLL, SRL and SRA on 8-, 16- and 32-bit
// lanes with every shift amount, against a lane-by-lane model, including the
// four-bytes-left-by-3 example (psll.o).
module tb_simd_shifter;
  import mc_pkg::*;
  sh_op_e op; lane_e lane; logic [4:0] amt; logic [31:0] a, y;
  simd_shifter dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s op=%0d lane=%0d amt=%0d a=%h y=%h", what, op, lane, amt, a, y); end
  endtask

  function automatic logic [31:0] model(input sh_op_e o, input lane_e ln, input int s,
                                        input logic [31:0] x);
    int w;
    logic [31:0] r;
    r = 0;
    w = (ln == W32) ? 32 : (ln == W16) ? 16 : 8;
    s = s % w;
    for (int l = 0; l < 32 / w; l++) begin
      for (int k = 0; k < w; k++) begin
        int src;
        logic bitv;
        if (o == SH_SLL) begin
          src = k - s; bitv = (src >= 0) ? x[l * w + src] : 1'b0;
        end else begin
          src = k + s;
          if (src < w) bitv = x[l * w + src];
          else bitv = (o == SH_SRA) ? x[l * w + w - 1] : 1'b0;
        end
        r[l * w + k] = bitv;
      end
    end
    return r;
  endfunction

  initial begin
    for (int oi = 0; oi < 3; oi++)
      for (int li = 0; li < 3; li++)
        for (int s = 0; s < 32; s++)
          for (int n = 0; n < 20; n++) begin
            op = sh_op_e'(oi); lane = lane_e'(li); amt = 5'(s); a = $urandom;
            #1 check(y == model(op, lane, s, a), "shift");
          end
    op = SH_SLL; lane = W8; amt = 3; a = 32'h81_FF_3C_01;
    #1 check(y == 32'h08_F8_E0_08, "psll.o by 3");
    op = SH_SRA; lane = W16; amt = 4; a = 32'h8000_7FF0;
    #1 check(y == 32'hF800_07FF, "16-bit arithmetic right");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
