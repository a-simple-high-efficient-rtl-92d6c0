// Reconfigurable radix-4 Booth multiplier (MDU) with SIMD modes.
//
// Four modes share one array of nine Booth partial-product rows: four 8x8
// products, two 16x16 products, one 32x16 product, and a 32x32 product made of
// two 32x16 passes (low half of the multiplier, then the high half) whose
// results are combined, so it finishes one cycle after the others. In the SIMD
// modes every row holds the partial products of all lanes side by side, each in
// its lane's field of the 64-bit result, and the row summation cuts the carries
// at the field boundaries.
//
// Pipeline, matching the core's stages: stage 1 (E) Booth-encodes the
// multiplier and forms the partial-product rows, stage 2 (M) compresses the
// rows per field, stage 3 (A) accumulates the two passes of a 32x32 product;
// the core writes 'res' into HI/LO in its W stage. A start in cycle t gives
// res_valid in cycle t+3 (t+4 for 32x32). While the second pass of a 32x32
// product is being issued, busy is high and a new start is not accepted.
//
// Results: 8x8 puts lane i's 16-bit product in res[16i+15:16i]; 16x16 puts lane
// i's 32-bit product in res[32i+31:32i]; 32x16 and 32x32 give one 64-bit value.
// 'sgn' selects two's-complement operands for both factors.
//
// The modes, the Booth encoding, the three pipelined steps and the extra cycle
// of the 32x32 mode follow the architecture. The exact row layout, the summation
// written as per-field adders instead of an explicit Wallace tree of 3:2
// counters, and the result packing are this design's choices. Reset is
// synchronous, active low.
module simd_mdu
  import mc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  mul_mode_e   mode,
  input  logic        sgn,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        busy,
  output logic        res_valid,
  output logic [63:0] res
);

  localparam int unsigned ROWS = 9;

  // second pass of a 32x32 product
  logic        p2_pend;
  logic [31:0] p2_a, p2_b;
  logic        p2_sgn;

  // operands of the pass entering stage 1 this cycle
  logic        e_valid, e_last, e_second, e_asgn, e_bsgn;
  mul_mode_e   e_mode;
  logic [31:0] e_a;
  logic [15:0] e_bhalf;
  logic [31:0] e_b;

  always_comb begin
    e_valid  = start || p2_pend;
    e_second = p2_pend;
    e_bhalf  = '0;
    if (p2_pend) begin
      e_mode  = MUL_32X16;
      e_a     = p2_a;
      e_b     = {16'd0, p2_b[31:16]};
      e_bhalf = p2_b[31:16];
      e_asgn  = p2_sgn;
      e_bsgn  = p2_sgn;
      e_last  = 1'b1;
    end else begin
      e_a    = a;
      e_b    = b;
      e_asgn = sgn;
      e_bsgn = sgn;
      e_last = 1'b1;
      e_mode = mode;
      if (mode == MUL_32X32) begin
        e_mode  = MUL_32X16;
        e_bhalf = b[15:0];
        e_b     = {16'd0, b[15:0]};
        e_bsgn  = 1'b0;        // low half of the multiplier is unsigned
        e_last  = 1'b0;
      end else if (mode == MUL_32X16) begin
        e_bhalf = b[15:0];
      end
    end
  end

  assign busy = p2_pend;

  // ---------------- stage 1: Booth encoding, partial-product rows ----------
  // one radix-4 Booth digit applied to a 64-bit multiplicand
  function automatic logic [63:0] booth_pp(input logic [63:0] aext, input logic [2:0] trip);
    unique case (trip)
      3'b001, 3'b010: return aext;
      3'b011:         return aext << 1;
      3'b100:         return -(aext << 1);
      3'b101, 3'b110: return -aext;
      default:        return '0;
    endcase
  endfunction

  // Booth digit j of an 18-bit extended multiplier (b[-1] = 0)
  function automatic logic [2:0] booth_trip(input logic [17:0] bext, input int j);
    logic [18:0] bx;
    bx = {bext, 1'b0};
    return bx[2*j +: 3];
  endfunction

  // row j of the partial-product array for the given mode
  function automatic logic [63:0] booth_row(input mul_mode_e m, input logic [31:0] aa,
                                            input logic [31:0] bb, input logic [15:0] bh,
                                            input logic as, input logic bs, input int j);
    logic [63:0] row, aext, pp;
    logic [17:0] bext;
    row = '0;
    unique case (m)
      MUL_8X8: begin
        for (int l = 0; l < 4; l++) begin
          aext = as ? 64'($signed(aa[8*l +: 8])) : 64'(aa[8*l +: 8]);
          bext = bs ? 18'($signed(bb[8*l +: 8])) : 18'(bb[8*l +: 8]);
          pp   = (j <= 4) ? booth_pp(aext, booth_trip(bext, j)) << (2 * j) : '0;
          row[16*l +: 16] = pp[15:0];
        end
      end
      MUL_16X16: begin
        for (int l = 0; l < 2; l++) begin
          aext = as ? 64'($signed(aa[16*l +: 16])) : 64'(aa[16*l +: 16]);
          bext = bs ? 18'($signed(bb[16*l +: 16])) : 18'(bb[16*l +: 16]);
          pp   = booth_pp(aext, booth_trip(bext, j)) << (2 * j);
          row[32*l +: 32] = pp[31:0];
        end
      end
      default: begin
        aext = as ? 64'($signed(aa)) : 64'(aa);
        bext = bs ? 18'($signed(bh)) : 18'(bh);
        row  = booth_pp(aext, booth_trip(bext, j)) << (2 * j);
      end
    endcase
    return row;
  endfunction

  logic [63:0] s1_rows [ROWS];
  logic        s1_valid, s1_last, s1_second;
  mul_mode_e   s1_mode;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_last   <= 1'b0;
      s1_second <= 1'b0;
      s1_mode   <= MUL_8X8;
      p2_pend   <= 1'b0;
      p2_a      <= '0;
      p2_b      <= '0;
      p2_sgn    <= 1'b0;
      for (int j = 0; j < ROWS; j++) s1_rows[j] <= '0;
    end else begin
      s1_valid  <= e_valid;
      s1_last   <= e_last;
      s1_second <= e_second;
      s1_mode   <= e_mode;
      for (int j = 0; j < ROWS; j++)
        s1_rows[j] <= booth_row(e_mode, e_a, e_b, e_bhalf, e_asgn, e_bsgn, j);
      if (p2_pend) begin
        p2_pend <= 1'b0;
      end else if (start && mode == MUL_32X32) begin
        p2_pend <= 1'b1;
        p2_a    <= a;
        p2_b    <= b;
        p2_sgn  <= sgn;
      end
    end
  end

  // ---------------- stage 2: row compression per field ----------------
  function automatic logic [63:0] sum_rows(input mul_mode_e m, input logic [63:0] r [ROWS]);
    logic [63:0] s;
    s = '0;
    unique case (m)
      MUL_8X8: begin
        for (int l = 0; l < 4; l++) begin
          logic [15:0] f;
          f = '0;
          for (int j = 0; j < ROWS; j++) f = f + r[j][16*l +: 16];
          s[16*l +: 16] = f;
        end
      end
      MUL_16X16: begin
        for (int l = 0; l < 2; l++) begin
          logic [31:0] f;
          f = '0;
          for (int j = 0; j < ROWS; j++) f = f + r[j][32*l +: 32];
          s[32*l +: 32] = f;
        end
      end
      default: begin
        for (int j = 0; j < ROWS; j++) s = s + r[j];
      end
    endcase
    return s;
  endfunction

  logic [63:0] s2_sum;
  logic        s2_valid, s2_last, s2_second;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2_valid  <= 1'b0;
      s2_last   <= 1'b0;
      s2_second <= 1'b0;
      s2_sum    <= '0;
    end else begin
      s2_valid  <= s1_valid;
      s2_last   <= s1_last;
      s2_second <= s1_second;
      s2_sum    <= sum_rows(s1_mode, s1_rows);
    end
  end

  // ---------------- stage 3: accumulation ----------------
  logic [63:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      res       <= '0;
      res_valid <= 1'b0;
    end else begin
      res_valid <= s2_valid && s2_last;
      if (s2_valid && !s2_last) acc <= s2_sum;
      if (s2_valid && s2_last)  res <= s2_second ? acc + (s2_sum << 16) : s2_sum;
    end
  end

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                         !(start && busy));

endmodule
