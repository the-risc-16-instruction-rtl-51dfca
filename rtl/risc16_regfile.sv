// risc16_regfile: the RiSC-16 register file, eight 16-bit registers with two
// read ports (SRC1, SRC2) and one write port (TGT).
//
// Reads are combinational: the 3-bit specifier on src1_idx/src2_idx selects
// the word driven on src1_data/src2_data within the same cycle. A write
// happens on the rising clock edge when we is high, storing tgt_data into
// register tgt_idx. Register 0 always reads as zero, whatever has been written
// to it (the architecture requires this). Port structure and the r0 rule follow
// the architecture; the synchronous active-high reset that clears every
// register is this design's choice, so that programs start from a known state.
module risc16_regfile
  import risc16_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  reg_idx_t src1_idx,
  output word_t    src1_data,
  input  reg_idx_t src2_idx,
  output word_t    src2_data,
  input  logic     we,
  input  reg_idx_t tgt_idx,
  input  word_t    tgt_data
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[tgt_idx] <= tgt_data;
    end
  end

  assign src1_data = (src1_idx == '0) ? '0 : regs[src1_idx];
  assign src2_data = (src2_idx == '0) ? '0 : regs[src2_idx];

endmodule
