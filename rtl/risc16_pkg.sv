// risc16_pkg: types, constants and helper functions shared by the RiSC-16
// single-cycle processor.
//
// The RiSC-16 is an 8-register, 16-bit machine with word (16-bit) addressing.
// Every instruction carries a 3-bit opcode in bits [15:13]; rA sits in
// [12:10], rB in [9:7], rC in [2:0], the signed 7-bit immediate in [6:0] and
// the 10-bit LUI immediate in [9:0]. The opcode values follow the ISA
// (add 000 ... jalr 111). The control-signal names (FUNC_alu, MUX_alu1,
// MUX_alu2, MUX_pc, MUX_rf, MUX_tgt, WE_rf, WE_dmem) are the architecture's own;
// the binary codes given to the mux selects and ALU functions are this
// design's choice.
package risc16_pkg;

  localparam int unsigned XLEN = 16;  // data path and address width
  localparam int unsigned NREGS = 8;  // architectural registers r0..r7
  localparam int unsigned RIDX = 3;   // register specifier width

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RIDX-1:0] reg_idx_t;

  typedef enum logic [2:0] {
    OP_ADD  = 3'b000,
    OP_ADDI = 3'b001,
    OP_NAND = 3'b010,
    OP_LUI  = 3'b011,
    OP_SW   = 3'b100,
    OP_LW   = 3'b101,
    OP_BNE  = 3'b110,
    OP_JALR = 3'b111
  } opcode_e;

  // ALU functions named in the datapath description.
  typedef enum logic [1:0] {
    ALU_ADD   = 2'd0,  // SRC1 + SRC2
    ALU_NAND  = 2'd1,  // ~(SRC1 & SRC2)
    ALU_PASS1 = 2'd2,  // SRC1 unchanged
    ALU_EQ    = 2'd3   // equality test, reported on EQ!
  } alu_func_e;

  // MUX_alu1: register SRC1 or the left-shifted (LUI) immediate.
  typedef enum logic {
    ALU1_REG  = 1'b0,
    ALU1_LUI  = 1'b1
  } mux_alu1_e;

  // MUX_alu2: register SRC2 or the sign-extended 7-bit immediate.
  typedef enum logic {
    ALU2_REG  = 1'b0,
    ALU2_SIMM = 1'b1
  } mux_alu2_e;

  // MUX_pc: PC+1, PC+1+simm (branch adder) or the ALU output (JALR).
  typedef enum logic [1:0] {
    PC_PLUS1  = 2'd0,
    PC_BRANCH = 2'd1,
    PC_ALU    = 2'd2
  } mux_pc_e;

  // MUX_rf: which instruction field drives the SRC2 read specifier.
  typedef enum logic {
    RF_RC = 1'b0,
    RF_RA = 1'b1
  } mux_rf_e;

  // MUX_tgt: data written to the register file.
  typedef enum logic [1:0] {
    TGT_ALU   = 2'd0,
    TGT_DMEM  = 2'd1,
    TGT_PC1   = 2'd2
  } mux_tgt_e;

  // Everything the CONTROL decoder drives.
  typedef struct packed {
    alu_func_e func_alu;
    mux_alu1_e mux_alu1;
    mux_alu2_e mux_alu2;
    mux_pc_e   mux_pc;
    mux_rf_e   mux_rf;
    mux_tgt_e  mux_tgt;
    logic      we_rf;
    logic      we_dmem;
  } ctrl_t;

  // Instruction word split into the fields of the three formats.
  typedef struct packed {
    opcode_e  op;   // [15:13]
    reg_idx_t ra;   // [12:10]
    reg_idx_t rb;   // [9:7]
    logic [3:0] pad;// [6:3]
    reg_idx_t rc;   // [2:0]
  } instr_rrr_t;

  // Sign-Extend-7: bit 6 of the immediate is copied into bits 15..7.
  function automatic word_t sext7(input logic [6:0] imm);
    return {{(XLEN-7){imm[6]}}, imm};
  endfunction

  // Left-Shift-6: the 10-bit immediate lands in bits 15..6, bits 5..0 are zero.
  function automatic word_t lshift6(input logic [9:0] imm);
    return {imm, 6'b000000};
  endfunction

endpackage
