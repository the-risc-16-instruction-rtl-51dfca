// risc16_pc: program-counter unit of the RiSC-16 single-cycle datapath.
//
// Holds the Program Counter register together with the logic that feeds it:
// the +1 adder that forms PC+1 every cycle, the branch adder that forms
// PC+1+simm (simm is the sign-extended 7-bit bne offset), and the 3-input PC
// mux steered by MUX_pc (PC+1, branch target, or the ALU output for jalr).
// These parts and their connections are the architecture's; the synchronous
// active-high reset to address 0 and the hold input en (low while the machine
// is halted) are this design's choices. The selected value is latched at the
// rising clock edge; pc and pc_plus1 are available throughout the cycle
// (pc_plus1 also feeds the register file's TGT mux for jalr).
module risc16_pc
  import risc16_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  input  mux_pc_e mux_pc,
  input  word_t   simm,
  input  word_t   alu_result,
  output word_t   pc,
  output word_t   pc_plus1
);

  word_t pc_branch;
  word_t pc_next;

  assign pc_plus1  = pc + word_t'(1);
  assign pc_branch = pc_plus1 + simm;

  always_comb begin
    unique case (mux_pc)
      PC_PLUS1:  pc_next = pc_plus1;
      PC_BRANCH: pc_next = pc_branch;
      PC_ALU:    pc_next = alu_result;
      default:   pc_next = pc_plus1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)     pc <= '0;
    else if (en) pc <= pc_next;
  end

endmodule
