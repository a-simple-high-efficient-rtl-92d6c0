// MIPS-like five-stage processor with the extended register file and SIMD units.
//
// Stages: I fetches from the local instruction memory; E decodes, reads the
// register file, executes in the SIMD ALU or SIMD shifter, resolves branches
// (one delay slot, as in MIPS) and starts the multiplier; M accesses the local
// data memory (byte and halfword stores merge into the addressed word); A
// extracts and sign- or zero-extends byte and halfword load data; W writes the
// register file. The multiplier
// runs its three steps alongside E, M and A and writes HI/LO at W.
//
// Inter-core communication goes through the register file: after the configure
// instruction sets bit 4 of the register-file configuration, reading $24 takes
// the next word from the receive FIFO and writing $25 sends the result to the
// send FIFO, so a computed value leaves the core without a store and arrives as
// an operand without a load. Bits 3:0 of the configuration swap register groups
// with their shadow groups.
//
// Interlocks rather than forwarding: an instruction waits in E while
//   - a source register is written by an instruction still in M or A,
//   - it reads $24 (mapped) and the receive FIFO is empty,
//   - it writes $25 (mapped) and the send FIFO has no slot left after the
//     pushes already in the pipeline,
//   - it reads HI/LO while a multiplication is outstanding, or starts one while
//     the multiplier issues the second pass of a 32x32 product.
// W writes through to E's read in the same cycle (register-file bypass).
//
// Instructions: addu subu and or xor nor slt sltu sll srl sra sllv srlv srav jr
// mult multu mfhi mflo break, addiu slti sltiu andi ori xori lui lb lbu lh lhu lw
// sb sh sw beq bne j
// jal, the SIMD group (opcode 0x1C: padd psub padds psubs psll psrl psra pmul,
// lane options in the sa field, see mc_pkg) and the register-file configure
// instruction (opcode 0x1F, configuration in bits 4:0). Accesses are assumed
// naturally aligned. 'break' halts the core once the pipeline has drained.
//
// The stage names and functions, the register file, FIFO mapping and the SIMD
// units follow the architecture. The instruction encodings of the added
// instructions, the interlocks, the memory sizes and the load port used to fill
// the memories are this design's choices. Reset is synchronous, active low; the
// core fetches from address 0 once 'run' is high.
module simd_core
  import mc_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned TXCNT_W    = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  // instruction memory load port
  input  logic        imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  // data memory external port (load/inspect), word addressed
  input  logic        dmem_ext_we,
  input  logic [$clog2(DMEM_WORDS)-1:0] dmem_ext_addr,
  input  logic [31:0] dmem_ext_wdata,
  output logic [31:0] dmem_ext_rdata,
  // receive FIFO (words from the network)
  input  logic        rx_valid,
  input  logic [31:0] rx_data,
  output logic        rx_pop,
  // send FIFO (words to the network)
  output logic        tx_push,
  output logic [31:0] tx_data,
  input  logic [TXCNT_W-1:0] tx_free,
  // status
  output logic        halted,
  output logic        stall_rx,     // E waits for the receive FIFO
  output logic        stall_tx,     // E waits for the send FIFO
  output logic        stall_dep,    // E waits for a register or HI/LO result
  output logic [4:0]  rf_cfg
);

  localparam int unsigned IAW = $clog2(IMEM_WORDS);
  localparam int unsigned DAW = $clog2(DMEM_WORDS);

  typedef enum logic [2:0] {RS_ALU, RS_SHIFT, RS_HI, RS_LO, RS_LOAD, RS_LINK} res_src_e;

  logic [31:0] imem [IMEM_WORDS];
  logic [31:0] dmem [DMEM_WORDS];

  // decode results of the instruction in E
  logic       uses_rs, uses_rt, wr_reg, is_load, is_store, is_mul, reads_hilo;
  logic       is_cfg, ie_is_break, use_imm_z, use_imm_s, sh_var;
  logic [4:0] dest;
  res_src_e   rsrc;
  alu_op_e    aop;
  lane_e      alane, slane;
  logic       asgn, scalar;
  sh_op_e     shop;
  mul_mode_e  mmode;
  logic       msgn;
  logic       is_beq, is_bne, is_j, is_jr;
  logic [1:0] msize;          // memory access size: 0 word, 1 halfword, 2 byte
  logic       muns;           // zero-extending load

  // ---------------- I stage ----------------
  logic [31:0] pc;
  logic        ie_valid;
  logic [31:0] ie_instr, ie_pc;
  logic        halting;
  logic        e_stall, e_go;
  logic        br_taken;
  logic [31:0] br_target;

  wire fetch = run && !halting;

  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_waddr] <= imem_wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc       <= '0;
      ie_valid <= 1'b0;
      ie_instr <= '0;
      ie_pc    <= '0;
    end else if (!e_stall) begin
      if (fetch && !(e_go && ie_is_break)) begin
        ie_valid <= 1'b1;
        ie_instr <= imem[pc[IAW+1:2]];
        ie_pc    <= pc;
        pc       <= br_taken ? br_target : pc + 32'd4;
      end else begin
        ie_valid <= 1'b0;
      end
    end
  end

  // ---------------- E stage: decode ----------------
  wire [5:0]  opc   = ie_instr[31:26];
  wire [4:0]  f_rs  = ie_instr[25:21];
  wire [4:0]  f_rt  = ie_instr[20:16];
  wire [4:0]  f_rd  = ie_instr[15:11];
  wire [4:0]  f_sa  = ie_instr[10:6];
  wire [5:0]  funct = ie_instr[5:0];
  wire [15:0] imm   = ie_instr[15:0];
  wire [31:0] simm  = {{16{imm[15]}}, imm};
  wire [31:0] zimm  = {16'd0, imm};

  always_comb begin
    uses_rs = 1'b0; uses_rt = 1'b0; wr_reg = 1'b0; is_load = 1'b0; is_store = 1'b0;
    is_mul = 1'b0; reads_hilo = 1'b0; is_cfg = 1'b0; ie_is_break = 1'b0;
    use_imm_z = 1'b0; use_imm_s = 1'b0; sh_var = 1'b0;
    dest = f_rd; rsrc = RS_ALU; aop = ALU_ADD; alane = W32; slane = W32; asgn = 1'b0;
    scalar = 1'b0; shop = SH_SLL; mmode = MUL_32X32; msgn = 1'b0;
    is_beq = 1'b0; is_bne = 1'b0; is_j = 1'b0; is_jr = 1'b0; msize = 2'd0; muns = 1'b0;
    if (ie_valid) begin
      unique case (opc)
        OP_SPECIAL: begin
          unique case (funct)
            F_SLL, F_SRL, F_SRA: begin
              uses_rt = 1'b1; wr_reg = 1'b1; rsrc = RS_SHIFT;
              shop = (funct == F_SLL) ? SH_SLL : (funct == F_SRL) ? SH_SRL : SH_SRA;
            end
            F_SLLV, F_SRLV, F_SRAV: begin
              uses_rs = 1'b1; uses_rt = 1'b1; wr_reg = 1'b1; sh_var = 1'b1;
              rsrc = RS_SHIFT;
              shop = (funct == F_SLLV) ? SH_SLL : (funct == F_SRLV) ? SH_SRL : SH_SRA;
            end
            F_JR:    begin uses_rs = 1'b1; is_jr = 1'b1; end
            F_BREAK: ie_is_break = 1'b1;
            F_MFHI:  begin wr_reg = 1'b1; reads_hilo = 1'b1; rsrc = RS_HI; end
            F_MFLO:  begin wr_reg = 1'b1; reads_hilo = 1'b1; rsrc = RS_LO; end
            F_MULT, F_MULTU: begin
              uses_rs = 1'b1; uses_rt = 1'b1; is_mul = 1'b1;
              mmode = MUL_32X32; msgn = (funct == F_MULT);
            end
            F_ADDU: begin uses_rs = 1'b1; uses_rt = 1'b1; wr_reg = 1'b1; aop = ALU_ADD; end
            F_SUBU: begin uses_rs = 1'b1; uses_rt = 1'b1; wr_reg = 1'b1; aop = ALU_SUB; end
            F_AND:  begin uses_rs = 1'b1; uses_rt = 1'b1; wr_reg = 1'b1; aop = ALU_AND; end
            F_OR:   begin uses_rs = 1'b1; uses_rt = 1'b1; wr_reg = 1'b1; aop = ALU_OR;  end
            F_XOR:  begin uses_rs = 1'b1; uses_rt = 1'b1; wr_reg = 1'b1; aop = ALU_XOR; end
            F_NOR:  begin uses_rs = 1'b1; uses_rt = 1'b1; wr_reg = 1'b1; aop = ALU_NOR; end
            F_SLT:  begin uses_rs = 1'b1; uses_rt = 1'b1; wr_reg = 1'b1; aop = ALU_SLT; asgn = 1'b1; end
            F_SLTU: begin uses_rs = 1'b1; uses_rt = 1'b1; wr_reg = 1'b1; aop = ALU_SLT; end
            default: ;
          endcase
        end
        OP_J:     is_j = 1'b1;
        6'h03: begin is_j = 1'b1; wr_reg = 1'b1; dest = 5'd31; rsrc = RS_LINK; end  // jal
        OP_BEQ:   begin uses_rs = 1'b1; uses_rt = 1'b1; is_beq = 1'b1; end
        OP_BNE:   begin uses_rs = 1'b1; uses_rt = 1'b1; is_bne = 1'b1; end
        OP_ADDIU: begin uses_rs = 1'b1; wr_reg = 1'b1; dest = f_rt; use_imm_s = 1'b1; aop = ALU_ADD; end
        OP_SLTI:  begin uses_rs = 1'b1; wr_reg = 1'b1; dest = f_rt; use_imm_s = 1'b1; aop = ALU_SLT; asgn = 1'b1; end
        OP_SLTIU: begin uses_rs = 1'b1; wr_reg = 1'b1; dest = f_rt; use_imm_s = 1'b1; aop = ALU_SLT; end
        OP_ANDI:  begin uses_rs = 1'b1; wr_reg = 1'b1; dest = f_rt; use_imm_z = 1'b1; aop = ALU_AND; end
        OP_ORI:   begin uses_rs = 1'b1; wr_reg = 1'b1; dest = f_rt; use_imm_z = 1'b1; aop = ALU_OR;  end
        OP_XORI:  begin uses_rs = 1'b1; wr_reg = 1'b1; dest = f_rt; use_imm_z = 1'b1; aop = ALU_XOR; end
        OP_LUI:   begin wr_reg = 1'b1; dest = f_rt; use_imm_z = 1'b1; aop = ALU_LUI; end
        OP_LW:    begin uses_rs = 1'b1; wr_reg = 1'b1; dest = f_rt; use_imm_s = 1'b1; is_load = 1'b1; rsrc = RS_LOAD; end
        OP_LB, OP_LBU, OP_LH, OP_LHU: begin
          uses_rs = 1'b1; wr_reg = 1'b1; dest = f_rt; use_imm_s = 1'b1; is_load = 1'b1; rsrc = RS_LOAD;
          msize = (opc == OP_LB || opc == OP_LBU) ? 2'd2 : 2'd1;
          muns  = (opc == OP_LBU || opc == OP_LHU);
        end
        OP_SW:    begin uses_rs = 1'b1; uses_rt = 1'b1; use_imm_s = 1'b1; is_store = 1'b1; end
        OP_SB, OP_SH: begin
          uses_rs = 1'b1; uses_rt = 1'b1; use_imm_s = 1'b1; is_store = 1'b1;
          msize = (opc == OP_SB) ? 2'd2 : 2'd1;
        end
        OP_RFCFG: is_cfg = 1'b1;
        OP_SIMD: begin
          alane  = lane_e'(f_sa[1:0]);
          slane  = lane_e'(f_sa[1:0]);
          scalar = f_sa[2];
          asgn   = f_sa[3];
          unique case (funct)
            SF_PADD:  begin uses_rs = 1'b1; uses_rt = 1'b1; wr_reg = 1'b1; aop = ALU_ADD;  end
            SF_PSUB:  begin uses_rs = 1'b1; uses_rt = 1'b1; wr_reg = 1'b1; aop = ALU_SUB;  end
            SF_PADDS: begin uses_rs = 1'b1; uses_rt = 1'b1; wr_reg = 1'b1; aop = ALU_ADDS; end
            SF_PSUBS: begin uses_rs = 1'b1; uses_rt = 1'b1; wr_reg = 1'b1; aop = ALU_SUBS; end
            SF_PSLL, SF_PSRL, SF_PSRA: begin
              uses_rt = 1'b1; wr_reg = 1'b1; rsrc = RS_SHIFT;
              shop = (funct == SF_PSLL) ? SH_SLL : (funct == SF_PSRL) ? SH_SRL : SH_SRA;
            end
            SF_PMUL: begin
              uses_rs = 1'b1; uses_rt = 1'b1; is_mul = 1'b1;
              mmode = mul_mode_e'(f_sa[1:0]); msgn = f_sa[3];
            end
            default: ;
          endcase
        end
        default: ;
      endcase
    end
  end

  // ---------------- E stage: register file ----------------
  logic [31:0] rs_val, rt_val;
  logic [5:0]  rs_phys, rt_phys, d_phys;
  logic        rs_fifo, rt_fifo, d_fifo;
  logic        rf_we;
  logic [5:0]  rf_wa;
  logic        rf_wfifo;
  logic [31:0] rf_wd;

  ext_regfile u_rf (
    .clk, .rst_n,
    .cfg_we   (e_go && is_cfg),
    .cfg_wdata(ie_instr[4:0]),
    .cfg_o    (rf_cfg),
    .ra1      (f_rs),
    .ra2      (f_rt),
    .rd1      (rs_val),
    .rd2      (rt_val),
    .ra1_phys (rs_phys),
    .ra2_phys (rt_phys),
    .ra1_fifo (rs_fifo),
    .ra2_fifo (rt_fifo),
    .rd_commit(e_go && ((uses_rs && rs_fifo) || (uses_rt && rt_fifo))),
    .da       (dest),
    .da_phys  (d_phys),
    .da_fifo  (d_fifo),
    .we       (rf_we),
    .wa_phys  (rf_wa),
    .wa_fifo  (rf_wfifo),
    .wdata    (rf_wd),
    .rx_data,
    .rx_pop,
    .tx_push,
    .tx_data
  );

  // ---------------- E stage: execute ----------------
  logic [31:0] opb, alu_y, sh_y, e_result;
  logic [4:0]  sh_amt;
  logic [31:0] hi, lo;

  function automatic logic [31:0] broadcast(input lane_e ln, input logic [31:0] v);
    unique case (ln)
      W16:     return {2{v[15:0]}};
      W8:      return {4{v[7:0]}};
      W4:      return {8{v[3:0]}};
      default: return v;
    endcase
  endfunction

  // scalar mode of the SIMD group: lane 0 of rt is used by every lane
  function automatic lane_e mul_lane(input mul_mode_e m);
    unique case (m)
      MUL_8X8:   return W8;
      MUL_16X16: return W16;
      default:   return W32;
    endcase
  endfunction

  always_comb begin
    if (use_imm_s)      opb = simm;
    else if (use_imm_z) opb = zimm;
    else if (scalar)    opb = broadcast(is_mul ? mul_lane(mmode) : alane, rt_val);
    else                opb = rt_val;
  end

  assign sh_amt = sh_var ? rs_val[4:0] : (opc == OP_SIMD) ? f_rs : f_sa;

  simd_alu u_alu (.op(aop), .lane(alane), .sgn(asgn), .a(rs_val), .b(opb), .y(alu_y));
  simd_shifter u_sh (.op(shop), .lane(slane), .amt(sh_amt), .a(rt_val), .y(sh_y));

  always_comb begin
    unique case (rsrc)
      RS_SHIFT: e_result = sh_y;
      RS_HI:    e_result = hi;
      RS_LO:    e_result = lo;
      RS_LINK:  e_result = ie_pc + 32'd8;
      default:  e_result = alu_y;
    endcase
  end

  // branches
  always_comb begin
    br_taken  = 1'b0;
    br_target = ie_pc + 32'd4 + {simm[29:0], 2'b00};
    if (e_go) begin
      if (is_beq && rs_val == rt_val) br_taken = 1'b1;
      if (is_bne && rs_val != rt_val) br_taken = 1'b1;
      if (is_j) begin
        br_taken  = 1'b1;
        br_target = {ie_pc[31:28], ie_instr[25:0], 2'b00};
      end
      if (is_jr) begin
        br_taken  = 1'b1;
        br_target = rs_val;
      end
    end
  end

  // ---------------- multiplier ----------------
  logic        mdu_busy, mdu_valid;
  logic [63:0] mdu_res;
  logic [1:0]  mdu_out;   // products started but not yet written to HI/LO

  simd_mdu u_mdu (
    .clk, .rst_n,
    .start    (e_go && is_mul),
    .mode     (mmode),
    .sgn      (msgn),
    .a        (rs_val),
    .b        (opb),
    .busy     (mdu_busy),
    .res_valid(mdu_valid),
    .res      (mdu_res)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hi <= '0;
      lo <= '0;
      mdu_out <= '0;
    end else begin
      if (mdu_valid) {hi, lo} <= mdu_res;
      mdu_out <= mdu_out + 2'((e_go && is_mul)) - 2'(mdu_valid);
    end
  end

  // ---------------- pipeline registers ----------------
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [5:0]  wa;
    logic        wfifo;
    logic        load;
    logic        store;
    logic [1:0]  size;
    logic        uns;
    logic [1:0]  off;      // byte offset of a load, for the aligner
    logic [31:0] value;
    logic [31:0] sdata;
  } pipe_t;

  pipe_t em, ma, aw;

  // interlocks
  function automatic logic hits(input pipe_t p, input logic [5:0] ph);
    return p.valid && p.we && !p.wfifo && (p.wa == ph);
  endfunction

  logic dep_rs, dep_rt, need_rx, tx_wait, hilo_wait;
  logic [1:0] tx_inflight;

  always_comb begin
    dep_rs = uses_rs && (f_rs != 5'd0) && !rs_fifo && (hits(em, rs_phys) || hits(ma, rs_phys));
    dep_rt = uses_rt && (f_rt != 5'd0) && !rt_fifo && (hits(em, rt_phys) || hits(ma, rt_phys));
    need_rx = ((uses_rs && rs_fifo) || (uses_rt && rt_fifo)) && !rx_valid;
    tx_inflight = 2'(em.valid && em.we && em.wfifo) + 2'(ma.valid && ma.we && ma.wfifo)
                + 2'(aw.valid && aw.we && aw.wfifo);
    tx_wait = wr_reg && d_fifo && (tx_free <= TXCNT_W'(tx_inflight));
    hilo_wait = (reads_hilo && (mdu_out != 2'd0)) || (is_mul && mdu_busy);
  end

  assign stall_rx  = ie_valid && need_rx;
  assign stall_tx  = ie_valid && tx_wait;
  assign stall_dep = ie_valid && (dep_rs || dep_rt || hilo_wait);
  assign e_stall   = stall_rx || stall_tx || stall_dep;
  assign e_go      = ie_valid && !e_stall;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      halting <= 1'b0;
    end else if (e_go && ie_is_break) begin
      halting <= 1'b1;
    end
  end

  // E -> M
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      em <= '0;
    end else begin
      em.valid <= e_go;
      em.we    <= e_go && wr_reg && (dest != 5'd0 || d_fifo);
      em.wa    <= d_phys;
      em.wfifo <= d_fifo;
      em.load  <= is_load;
      em.store <= e_go && is_store;
      em.size  <= msize;
      em.uns   <= muns;
      em.off   <= '0;
      em.value <= e_result;
      em.sdata <= rt_val;
    end
  end

  // M stage: local data memory; byte and halfword stores merge into the word
  wire [DAW-1:0] m_addr = em.value[DAW+1:2];
  logic [31:0]   m_word, m_merged;

  assign m_word = dmem[m_addr];
  always_comb begin
    m_merged = em.sdata;
    if (em.size == 2'd2) begin
      m_merged = m_word;
      m_merged[8*em.value[1:0] +: 8] = em.sdata[7:0];
    end else if (em.size == 2'd1) begin
      m_merged = m_word;
      m_merged[16*em.value[1] +: 16] = em.sdata[15:0];
    end
  end

  always_ff @(posedge clk) begin
    if (em.valid && em.store) dmem[m_addr] <= m_merged;
    if (dmem_ext_we) dmem[dmem_ext_addr] <= dmem_ext_wdata;
  end
  assign dmem_ext_rdata = dmem[dmem_ext_addr];

  // M -> A
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ma <= '0;
    end else begin
      ma       <= em;
      ma.value <= em.load ? m_word : em.value;
      ma.off   <= em.value[1:0];
    end
  end

  // A stage: data aligner, extracts and extends bytes and halfwords of loads
  logic [31:0] a_aligned;
  always_comb begin
    logic [7:0]  b8;
    logic [15:0] h16;
    b8  = ma.value[8*ma.off +: 8];
    h16 = ma.value[16*ma.off[1] +: 16];
    unique case (ma.size)
      2'd2:    a_aligned = ma.uns ? {24'd0, b8}  : {{24{b8[7]}}, b8};
      2'd1:    a_aligned = ma.uns ? {16'd0, h16} : {{16{h16[15]}}, h16};
      default: a_aligned = ma.value;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw <= '0;
    end else begin
      aw       <= ma;
      aw.value <= ma.load ? a_aligned : ma.value;
    end
  end

  // W stage
  assign rf_we    = aw.valid && aw.we;
  assign rf_wa    = aw.wa;
  assign rf_wfifo = aw.wfifo;
  assign rf_wd    = aw.value;

  assign halted = halting && !ie_valid && !em.valid && !ma.valid && !aw.valid
                  && (mdu_out == 2'd0);

  a_tx_never_overflows: assert property (@(posedge clk) disable iff (!rst_n)
                                         tx_push |-> tx_free != '0);

endmodule
