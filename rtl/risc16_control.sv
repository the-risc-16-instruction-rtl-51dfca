// risc16_control: the CONTROL decoder of the RiSC-16 single-cycle datapath.
//
// Combinational. Its only inputs are the 3-bit opcode and the EQ! flag from
// the ALU; it drives FUNC_alu, the five datapath mux selects and the two write
// enables, packed in a ctrl_t. Per opcode (from the per-instruction data-flow
// description of the architecture):
//   add   ADD,   SRC1=reg, SRC2=reg,  SRC2 spec=rC, TGT=ALU,  WE_rf
//   addi  ADD,   SRC1=reg, SRC2=simm,               TGT=ALU,  WE_rf
//   nand  NAND,  SRC1=reg, SRC2=reg,  SRC2 spec=rC, TGT=ALU,  WE_rf
//   lui   PASS1, SRC1=imm<<6,                       TGT=ALU,  WE_rf
//   sw    ADD,   SRC1=reg, SRC2=simm, SRC2 spec=rA,           WE_dmem
//   lw    ADD,   SRC1=reg, SRC2=simm,               TGT=DMEM, WE_rf
//   bne   EQ,    SRC1=reg, SRC2=reg,  SRC2 spec=rA; PC=PC+1+simm when !EQ!
//   jalr  PASS1, SRC1=reg, PC=ALU,                  TGT=PC+1, WE_rf
// Every other instruction takes PC+1. Where a select is unused by an
// instruction this decoder still drives a fixed value; those values, and the
// binary codes of the selects, are this design's choice.
module risc16_control
  import risc16_pkg::*;
(
  input  opcode_e op,
  input  logic    eq,
  output ctrl_t   ctrl
);

  always_comb begin
    ctrl.func_alu = ALU_ADD;
    ctrl.mux_alu1 = ALU1_REG;
    ctrl.mux_alu2 = ALU2_REG;
    ctrl.mux_pc   = PC_PLUS1;
    ctrl.mux_rf   = RF_RC;
    ctrl.mux_tgt  = TGT_ALU;
    ctrl.we_rf    = 1'b0;
    ctrl.we_dmem  = 1'b0;
    unique case (op)
      OP_ADD: begin
        ctrl.we_rf    = 1'b1;
      end
      OP_ADDI: begin
        ctrl.mux_alu2 = ALU2_SIMM;
        ctrl.we_rf    = 1'b1;
      end
      OP_NAND: begin
        ctrl.func_alu = ALU_NAND;
        ctrl.we_rf    = 1'b1;
      end
      OP_LUI: begin
        ctrl.func_alu = ALU_PASS1;
        ctrl.mux_alu1 = ALU1_LUI;
        ctrl.we_rf    = 1'b1;
      end
      OP_SW: begin
        ctrl.mux_alu2 = ALU2_SIMM;
        ctrl.mux_rf   = RF_RA;
        ctrl.we_dmem  = 1'b1;
      end
      OP_LW: begin
        ctrl.mux_alu2 = ALU2_SIMM;
        ctrl.mux_tgt  = TGT_DMEM;
        ctrl.we_rf    = 1'b1;
      end
      OP_BNE: begin
        ctrl.func_alu = ALU_EQ;
        ctrl.mux_rf   = RF_RA;
        // Conditional branch AND NOT EQ! selects the branch adder.
        ctrl.mux_pc   = eq ? PC_PLUS1 : PC_BRANCH;
      end
      OP_JALR: begin
        ctrl.func_alu = ALU_PASS1;
        ctrl.mux_pc   = PC_ALU;
        ctrl.mux_tgt  = TGT_PC1;
        ctrl.we_rf    = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
