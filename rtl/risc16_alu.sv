// risc16_alu: the 16-bit ALU of the RiSC-16 single-cycle datapath.
//
// Four functions, selected by FUNC_alu from the control decoder:
//   ALU_ADD   result = src1 + src2 (add, addi, sw/lw address)
//   ALU_NAND  result = ~(src1 & src2)
//   ALU_PASS1 result = src1 (lui sends the shifted immediate through, jalr
//             sends R[rB] through to the PC)
//   ALU_EQ    equality test for bne; result holds the test as a 0/1 word
// The EQ! output is high whenever the two operands are equal; the control
// decoder only looks at it for bne. The four functions, PASS1 and the EQ!
// output come from the architecture's datapath description; the result word
// produced for ALU_EQ is this design's choice. Purely combinational.
module risc16_alu
  import risc16_pkg::*;
(
  input  alu_func_e func,
  input  word_t     src1,
  input  word_t     src2,
  output word_t     result,
  output logic      eq
);

  always_comb begin
    eq = (src1 == src2);
    unique case (func)
      ALU_ADD:   result = src1 + src2;
      ALU_NAND:  result = ~(src1 & src2);
      ALU_PASS1: result = src1;
      ALU_EQ:    result = word_t'(eq);
      default:   result = '0;
    endcase
  end

endmodule
