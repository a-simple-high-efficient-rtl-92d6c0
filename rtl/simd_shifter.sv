// SIMD shifter: logical left, logical right and arithmetic right shifts on
// four 8-bit, two 16-bit or one 32-bit lane.
//
// Every lane is shifted by the same amount; bits never cross a lane boundary,
// so e.g. shifting four bytes left by 3 (psll.o) drops the top three bits of
// each byte and fills its low three with zeros. The amount is taken modulo the
// lane width. The operations and lane widths follow the architecture; the
// modulo rule for the amount and treating W4 as W8 are this design's choices.
//
// Purely combinational.
module simd_shifter
  import mc_pkg::*;
(
  input  sh_op_e      op,
  input  lane_e       lane,
  input  logic [4:0]  amt,
  input  logic [31:0] a,
  output logic [31:0] y
);

  always_comb begin
    y = '0;
    unique case (lane)
      W32: begin
        unique case (op)
          SH_SLL:  y = a << amt;
          SH_SRL:  y = a >> amt;
          default: y = $unsigned($signed(a) >>> amt);
        endcase
      end
      W16: begin
        for (int l = 0; l < 2; l++) begin
          logic [15:0] x;
          x = a[16*l +: 16];
          unique case (op)
            SH_SLL:  y[16*l +: 16] = x << amt[3:0];
            SH_SRL:  y[16*l +: 16] = x >> amt[3:0];
            default: y[16*l +: 16] = $unsigned($signed(x) >>> amt[3:0]);
          endcase
        end
      end
      default: begin   // W8 and W4
        for (int l = 0; l < 4; l++) begin
          logic [7:0] x;
          x = a[8*l +: 8];
          unique case (op)
            SH_SLL:  y[8*l +: 8] = x << amt[2:0];
            SH_SRL:  y[8*l +: 8] = x >> amt[2:0];
            default: y[8*l +: 8] = $unsigned($signed(x) >>> amt[2:0]);
          endcase
        end
      end
    endcase
  end

endmodule
