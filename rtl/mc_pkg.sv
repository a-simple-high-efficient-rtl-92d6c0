// Shared types and constants of the multi-core design.
//
// Holds the network flit format, the header-word layout that software writes
// into the outgoing FIFO, the SIMD lane modes, the ALU / shifter / multiplier
// operation codes and the instruction encodings the core decodes. Everything
// here is this design's own encoding: the flit and header layout, the opcode
// chosen for the SIMD and configure instructions and the router port numbering
// are not fixed by the architecture description, which gives only the register
// mapping, the lane widths and the unit functions.
package mc_pkg;

  // ---------------- network ----------------
  localparam int unsigned COORD_W = 3;            // mesh coordinate width (6x6 mesh)
  localparam int unsigned LEN_W   = 8;            // payload length field of a header

  typedef enum logic [1:0] {
    FL_HEAD = 2'd0,   // header flit: routing information, no payload
    FL_BODY = 2'd1,   // payload flit, more follow
    FL_TAIL = 2'd2    // last payload flit, releases the wormhole path
  } flit_kind_e;

  typedef struct packed {
    flit_kind_e  kind;
    logic [31:0] data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  // Header word layout (the first word software writes for a packet):
  //   [7:0]   payload length in words (1..255)
  //   [18:16] destination x, [21:19] destination y
  //   [24:22] source x,      [27:25] source y   (informational)
  function automatic logic [COORD_W-1:0] hdr_dst_x(input logic [31:0] h);
    return h[18:16];
  endfunction
  function automatic logic [COORD_W-1:0] hdr_dst_y(input logic [31:0] h);
    return h[21:19];
  endfunction
  function automatic logic [LEN_W-1:0] hdr_len(input logic [31:0] h);
    return h[7:0];
  endfunction
  function automatic logic [31:0] make_hdr(input logic [COORD_W-1:0] dx,
                                           input logic [COORD_W-1:0] dy,
                                           input logic [LEN_W-1:0]   len);
    logic [31:0] h;
    h = '0;
    h[18:16] = dx;
    h[21:19] = dy;
    h[7:0]   = len;
    return h;
  endfunction

  // Router port numbering. y grows towards the south.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;
  localparam int unsigned NPORTS = 5;

  // ---------------- SIMD lanes ----------------
  typedef enum logic [1:0] {
    W32 = 2'd0,   // one 32-bit lane
    W16 = 2'd1,   // two 16-bit lanes
    W8  = 2'd2,   // four 8-bit lanes
    W4  = 2'd3    // eight 4-bit lanes (adder only)
  } lane_e;

  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,   // wrap-around add
    ALU_SUB  = 4'd1,   // wrap-around subtract
    ALU_ADDS = 4'd2,   // saturating add   (signed or unsigned per 'sgn')
    ALU_SUBS = 4'd3,   // saturating subtract
    ALU_AND  = 4'd4,
    ALU_OR   = 4'd5,
    ALU_XOR  = 4'd6,
    ALU_NOR  = 4'd7,
    ALU_SLT  = 4'd8,   // set on less than (signed or unsigned per 'sgn'), 32-bit only
    ALU_LUI  = 4'd9    // b << 16
  } alu_op_e;

  typedef enum logic [1:0] {
    SH_SLL = 2'd0,
    SH_SRL = 2'd1,
    SH_SRA = 2'd2
  } sh_op_e;

  typedef enum logic [1:0] {
    MUL_8X8   = 2'd0,  // four 8x8   -> four 16-bit products
    MUL_16X16 = 2'd1,  // two 16x16  -> two 32-bit products
    MUL_32X16 = 2'd2,  // one 32x16  -> 48-bit product (sign extended to 64)
    MUL_32X32 = 2'd3   // one 32x32  -> 64-bit product, two passes of 32x16
  } mul_mode_e;

  // ---------------- instruction encoding ----------------
  localparam logic [5:0] OP_SPECIAL  = 6'h00;
  localparam logic [5:0] OP_J        = 6'h02;
  localparam logic [5:0] OP_BEQ      = 6'h04;
  localparam logic [5:0] OP_BNE      = 6'h05;
  localparam logic [5:0] OP_ADDIU    = 6'h09;
  localparam logic [5:0] OP_SLTI     = 6'h0A;
  localparam logic [5:0] OP_SLTIU    = 6'h0B;
  localparam logic [5:0] OP_ANDI     = 6'h0C;
  localparam logic [5:0] OP_ORI      = 6'h0D;
  localparam logic [5:0] OP_XORI     = 6'h0E;
  localparam logic [5:0] OP_LUI      = 6'h0F;
  localparam logic [5:0] OP_SIMD     = 6'h1C;  // SPECIAL2 space: packed (SIMD) operations
  localparam logic [5:0] OP_RFCFG    = 6'h1F;  // register-file configure instruction
  localparam logic [5:0] OP_LB       = 6'h20;
  localparam logic [5:0] OP_LH       = 6'h21;
  localparam logic [5:0] OP_LW       = 6'h23;
  localparam logic [5:0] OP_LBU      = 6'h24;
  localparam logic [5:0] OP_LHU      = 6'h25;
  localparam logic [5:0] OP_SB       = 6'h28;
  localparam logic [5:0] OP_SH       = 6'h29;
  localparam logic [5:0] OP_SW       = 6'h2B;

  // SPECIAL funct
  localparam logic [5:0] F_SLL   = 6'h00;
  localparam logic [5:0] F_SRL   = 6'h02;
  localparam logic [5:0] F_SRA   = 6'h03;
  localparam logic [5:0] F_SLLV  = 6'h04;
  localparam logic [5:0] F_SRLV  = 6'h06;
  localparam logic [5:0] F_SRAV  = 6'h07;
  localparam logic [5:0] F_JR    = 6'h08;
  localparam logic [5:0] F_BREAK = 6'h0D;
  localparam logic [5:0] F_MFHI  = 6'h10;
  localparam logic [5:0] F_MFLO  = 6'h12;
  localparam logic [5:0] F_MULT  = 6'h18;
  localparam logic [5:0] F_MULTU = 6'h19;
  localparam logic [5:0] F_ADDU  = 6'h21;
  localparam logic [5:0] F_SUBU  = 6'h23;
  localparam logic [5:0] F_AND   = 6'h24;
  localparam logic [5:0] F_OR    = 6'h25;
  localparam logic [5:0] F_XOR   = 6'h26;
  localparam logic [5:0] F_NOR   = 6'h27;
  localparam logic [5:0] F_SLT   = 6'h2A;
  localparam logic [5:0] F_SLTU  = 6'h2B;

  // SIMD (OP_SIMD) funct; the sa field carries the lane options:
  //   sa[1:0] lane width (lane_e), sa[2] scalar mode (lane 0 of rt used by
  //   every lane), sa[3] signed, and for immediate shifts rs holds the amount.
  localparam logic [5:0] SF_PADD  = 6'h00;  // wrap-around packed add
  localparam logic [5:0] SF_PSUB  = 6'h01;
  localparam logic [5:0] SF_PADDS = 6'h02;  // saturated packed add
  localparam logic [5:0] SF_PSUBS = 6'h03;
  localparam logic [5:0] SF_PSLL  = 6'h04;  // packed shifts, amount in rs field
  localparam logic [5:0] SF_PSRL  = 6'h05;
  localparam logic [5:0] SF_PSRA  = 6'h06;
  localparam logic [5:0] SF_PMUL  = 6'h08;  // packed multiply into HI/LO, sa[1:0] = mul_mode_e

endpackage
