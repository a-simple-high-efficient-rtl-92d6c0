// SIMD ALU with packed, optionally saturating, addition and subtraction.
//
// The 32-bit operands are split into eight 4-bit, four 8-bit, two 16-bit or one
// 32-bit lane (lane_e). The adder follows a carry-select structure: eight 4-bit
// propagate/generate units (Csa4_pg) compute group P and G for each nibble, a
// carry generator turns the eight (P,G) pairs into the carry entering every
// nibble, and in parallel each nibble forms its sum for carry-in 0 and 1, so the
// carry only selects between two ready results. At a lane boundary the carry
// chain is cut and the lane's own carry-in (1 for subtraction) enters instead.
// Saturating operations clamp each lane on overflow: signed lanes to the
// largest or smallest two's-complement value, unsigned lanes to all ones
// (addition) or zero (subtraction).
//
// Beyond the packed adder the unit performs the scalar MIPS operations the core
// needs (logic ops, set-less-than, load-upper-immediate), all 32 bits wide.
// Subtraction, the wrap-around forms and the carry generator's ripple-of-groups
// form are this design's choices; the 4/8/16/32-bit saturated addition and the
// P/G, carry generator and carry-select partitioning follow the architecture.
//
// Purely combinational.
module simd_alu
  import mc_pkg::*;
(
  input  alu_op_e     op,
  input  lane_e       lane,
  input  logic        sgn,     // signed saturation / signed compare
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        sub;
  logic [31:0] bx;
  logic [7:0]  gp, gg;          // group propagate / generate of each nibble
  logic [8:0]  c;               // carry into nibble i; c[8] = carry out of the top
  logic [7:0]  lane_start;      // nibble i starts a lane
  logic [31:0] sum0, sum1, sum;
  logic [7:0]  nib_cout;        // carry out of each nibble (selected)
  logic [31:0] sat;

  assign sub = (op == ALU_SUB) || (op == ALU_SUBS) || (op == ALU_SLT);
  assign bx  = sub ? ~b : b;

  // lane boundaries, in nibbles
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      unique case (lane)
        W4:  lane_start[i] = 1'b1;
        W8:  lane_start[i] = (i % 2) == 0;
        W16: lane_start[i] = (i % 4) == 0;
        default: lane_start[i] = (i == 0);
      endcase
    end
  end

  // Csa4_pg: group P/G, and both candidate sums of each nibble
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      logic [3:0] p, g;
      logic [4:0] s0, s1;
      p = a[4*i +: 4] ^ bx[4*i +: 4];
      g = a[4*i +: 4] & bx[4*i +: 4];
      gp[i] = &p;
      gg[i] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
      s0 = {1'b0, a[4*i +: 4]} + {1'b0, bx[4*i +: 4]};
      s1 = {1'b0, a[4*i +: 4]} + {1'b0, bx[4*i +: 4]} + 5'd1;
      sum0[4*i +: 4] = s0[3:0];
      sum1[4*i +: 4] = s1[3:0];
    end
  end

  // carry generator over the group signals, cut at lane boundaries
  logic [7:0] cin_n;            // carry entering each nibble
  always_comb begin
    logic carry;
    carry = sub;
    c[0]  = sub;
    for (int i = 0; i < 8; i++) begin
      cin_n[i] = lane_start[i] ? sub : carry;
      carry    = gg[i] | (gp[i] & cin_n[i]);
      c[i+1]   = carry;
    end
  end

  // carry-select adders
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      sum[4*i +: 4] = cin_n[i] ? sum1[4*i +: 4] : sum0[4*i +: 4];
      nib_cout[i]   = c[i+1];
    end
  end

  // per-lane saturation
  function automatic logic [31:0] saturate(input lane_e ln, input logic s, input logic is_sub,
                                           input logic [31:0] aa, input logic [31:0] bb,
                                           input logic [31:0] rr, input logic [7:0] co);
    logic [31:0] out;
    int w, n;
    out = rr;
    unique case (ln)
      W4:      w = 4;
      W8:      w = 8;
      W16:     w = 16;
      default: w = 32;
    endcase
    n = 32 / w;
    for (int l = 0; l < 8; l++) begin
      if (l < n) begin
        int msb, top_nib;
        logic as, bs, rs, ovf, cout;
        msb     = l * w + w - 1;
        top_nib = msb / 4;
        as   = aa[msb];
        bs   = bb[msb];       // bb is the (possibly inverted) second operand
        rs   = rr[msb];
        cout = co[top_nib];
        if (s) begin
          ovf = (as == bs) && (rs != as);
          if (ovf) begin
            for (int k = 0; k < 32; k++)
              if (k >= l * w && k <= msb) out[k] = (k == msb) ? as : ~as;
          end
        end else begin
          // unsigned: add overflows on carry out, subtract underflows on no carry
          ovf = is_sub ? !cout : cout;
          if (ovf) begin
            for (int k = 0; k < 32; k++)
              if (k >= l * w && k <= msb) out[k] = !is_sub;
          end
        end
      end
    end
    return out;
  endfunction

  assign sat = saturate(lane, sgn, sub, a, bx, sum, nib_cout);

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB:   y = sum;
      ALU_ADDS, ALU_SUBS: y = sat;
      ALU_AND:            y = a & b;
      ALU_OR:             y = a | b;
      ALU_XOR:            y = a ^ b;
      ALU_NOR:            y = ~(a | b);
      ALU_SLT: begin
        // 32-bit compare from the subtractor: signed uses sign and overflow,
        // unsigned uses the borrow
        if (sgn) y = {31'd0, (sum[31] ^ ((a[31] != b[31]) && (sum[31] != a[31])))};
        else     y = {31'd0, !c[8]};
      end
      ALU_LUI:            y = {b[15:0], 16'd0};
      default:            y = sum;
    endcase
  end

endmodule
