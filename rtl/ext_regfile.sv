// Extended, configurable register file.
//
// The 32 architectural registers are backed by 64 physical ones: the standard
// file and a shadow file of the same size, organised as four pairs of groups of
// eight 32-bit registers, (#1,#5) for $0-$7 up to (#4,#8) for $24-$31. A 5-bit
// configuration word, loaded by the configure instruction, steers every access:
// bit g (g = 0..3) selects the shadow group for logical registers 8g..8g+7, and
// bit 4 maps the FIFO ports into the register space. While bit 4 is set, a read
// of $24 returns the word at the head of the receive FIFO (and pops it when the
// reading instruction commits) and a write to $25 pushes the word into the send
// FIFO instead of the register file. The 5-bit register fields of the
// instruction are unchanged: the extra space costs no instruction bits.
//
// This much follows the architecture. This design's own choices: which of $24/$25
// is the receive and which the send port, $0 reading zero in either group, the
// encoding of a physical index as {shadow, logical}, and a write-to-read bypass
// so a value written back in a cycle can be read in that same cycle.
//
// Timing: reads and address translation are combinational; register writes and
// configuration loads take effect at the rising clock edge. Reset (rst_n, active
// low, synchronous) clears every register and the configuration.
module ext_regfile
  import mc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // configuration word from the configure instruction
  input  logic        cfg_we,
  input  logic [4:0]  cfg_wdata,
  output logic [4:0]  cfg_o,
  // two read ports, logical register numbers
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  output logic [5:0]  ra1_phys,   // physical register read, for hazard checks
  output logic [5:0]  ra2_phys,
  output logic        ra1_fifo,   // the read is served by the receive FIFO
  output logic        ra2_fifo,
  input  logic        rd_commit,  // the reading instruction leaves decode this cycle
  // destination translation for the instruction being decoded
  input  logic [4:0]  da,
  output logic [5:0]  da_phys,
  output logic        da_fifo,    // the result goes to the send FIFO
  // write port, physical index as produced by the destination translation
  input  logic        we,
  input  logic [5:0]  wa_phys,
  input  logic        wa_fifo,
  input  logic [31:0] wdata,
  // receive FIFO read side
  input  logic [31:0] rx_data,
  output logic        rx_pop,
  // send FIFO write side
  output logic        tx_push,
  output logic [31:0] tx_data
);

  localparam logic [4:0] FIFO_RD_REG = 5'd24;
  localparam logic [4:0] FIFO_WR_REG = 5'd25;

  logic [31:0] regs [64];
  logic [4:0]  cfg;

  assign cfg_o = cfg;

  function automatic logic [5:0] to_phys(input logic [4:0] a, input logic [4:0] c);
    return {c[{1'b0, a[4:3]}], a};
  endfunction

  always_comb begin
    ra1_phys = to_phys(ra1, cfg);
    ra2_phys = to_phys(ra2, cfg);
    ra1_fifo = cfg[4] && (ra1 == FIFO_RD_REG);
    ra2_fifo = cfg[4] && (ra2 == FIFO_RD_REG);
    da_phys  = to_phys(da, cfg);
    da_fifo  = cfg[4] && (da == FIFO_WR_REG);
  end

  function automatic logic [31:0] read_port(input logic [4:0] a, input logic [5:0] p,
                                            input logic is_fifo);
    if (a == 5'd0)                              return '0;
    else if (is_fifo)                           return rx_data;
    else if (we && !wa_fifo && (wa_phys == p))  return wdata;
    else                                        return regs[p];
  endfunction

  assign rd1 = read_port(ra1, ra1_phys, ra1_fifo);
  assign rd2 = read_port(ra2, ra2_phys, ra2_fifo);

  assign rx_pop  = rd_commit && (ra1_fifo || ra2_fifo);
  assign tx_push = we && wa_fifo;
  assign tx_data = wdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg <= '0;
      for (int i = 0; i < 64; i++) regs[i] <= '0;
    end else begin
      if (cfg_we) cfg <= cfg_wdata;
      if (we && !wa_fifo && (wa_phys[4:0] != 5'd0)) regs[wa_phys] <= wdata;
    end
  end

endmodule
