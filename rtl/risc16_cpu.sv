// risc16_cpu: single-cycle RiSC-16 processor (top level).
//
// One instruction completes per clock cycle. The PC addresses the instruction
// memory; the instruction's opcode goes to the CONTROL decoder while its
// register fields address the register file. Operands pass through two ALU
// input muxes (MUX_alu1: register SRC1 or Left-Shift-6 of the 10-bit
// immediate; MUX_alu2: register SRC2 or Sign-Extend-7 of the 7-bit immediate)
// into the ALU, whose output addresses the data memory, feeds the register
// file's TGT mux and, for jalr, the PC. MUX_rf picks rC or rA as the SRC2
// specifier (rA for sw and bne), MUX_tgt picks the ALU, data memory or PC+1 as
// the value written to rA. At the rising clock edge the PC, register file and
// data memory latch their new values. This structure is the architecture's
// single-cycle datapath.
//
// This design's own choices: a synchronous active-high reset (PC and all
// registers to 0); "halt" is encoded as a jalr whose low seven bits are not
// all zero, and a halt freezes the machine (no PC update, no writes; the
// halted output stays high until reset); the instruction memory has a load
// port (imem_we/imem_waddr/imem_wdata) and the data memory a second port
// (dmem_ext_*) for loading data and reading results; both memories span the
// full 16-bit word address space by default, and the PC and ALU address are
// truncated to IMEM_AW/DMEM_AW bits if a smaller memory is chosen.
module risc16_cpu
  import risc16_pkg::*;
#(
  parameter int unsigned IMEM_AW = 16,
  parameter int unsigned DMEM_AW = 16
) (
  input  logic               clk,
  input  logic               rst,
  // program load port of the instruction memory
  input  logic               imem_we,
  input  logic [IMEM_AW-1:0] imem_waddr,
  input  word_t              imem_wdata,
  // second data-memory port: preload data and read back results
  input  logic [DMEM_AW-1:0] dmem_ext_addr,
  input  logic               dmem_ext_we,
  input  word_t              dmem_ext_wdata,
  output word_t              dmem_ext_rdata,
  // status
  output word_t              pc,
  output word_t              instr,
  output logic               halted
);

  instr_rrr_t f;
  ctrl_t      ctrl;
  logic       alu_eq;
  logic       is_halt;

  word_t      pc_plus1;
  word_t      simm;
  word_t      limm;
  reg_idx_t   src2_idx;
  word_t      src1_data, src2_data;
  word_t      alu_a, alu_b, alu_y;
  word_t      dmem_rdata;
  word_t      tgt_data;

  // ---------------------------------------------------------------- fetch
  risc16_pc u_pc (
    .clk        (clk),
    .rst        (rst),
    .en         (!is_halt),
    .mux_pc     (ctrl.mux_pc),
    .simm       (simm),
    .alu_result (alu_y),
    .pc         (pc),
    .pc_plus1   (pc_plus1)
  );

  risc16_imem #(.AW(IMEM_AW)) u_imem (
    .clk   (clk),
    .addr  (pc[IMEM_AW-1:0]),
    .rdata (instr),
    .we    (imem_we),
    .waddr (imem_waddr),
    .wdata (imem_wdata)
  );

  // ---------------------------------------------------------------- decode
  assign f       = instr_rrr_t'(instr);
  assign simm    = sext7(instr[6:0]);   // Sign-Extend-7
  assign limm    = lshift6(instr[9:0]); // Left-Shift-6
  assign is_halt = (f.op == OP_JALR) && ({f.pad, f.rc} != '0);  // bits [6:0]
  assign halted  = is_halt;

  risc16_control u_ctrl (
    .op   (f.op),
    .eq   (alu_eq),
    .ctrl (ctrl)
  );

  // MUX_rf: SRC2 specifier is rC (add, nand) or rA (sw, bne)
  assign src2_idx = (ctrl.mux_rf == RF_RA) ? f.ra : f.rc;

  risc16_regfile u_rf (
    .clk       (clk),
    .rst       (rst),
    .src1_idx  (f.rb),
    .src1_data (src1_data),
    .src2_idx  (src2_idx),
    .src2_data (src2_data),
    .we        (ctrl.we_rf && !is_halt),
    .tgt_idx   (f.ra),
    .tgt_data  (tgt_data)
  );

  // ---------------------------------------------------------------- execute
  assign alu_a = (ctrl.mux_alu1 == ALU1_LUI)  ? limm : src1_data;  // MUX_alu1
  assign alu_b = (ctrl.mux_alu2 == ALU2_SIMM) ? simm : src2_data;  // MUX_alu2

  risc16_alu u_alu (
    .func   (ctrl.func_alu),
    .src1   (alu_a),
    .src2   (alu_b),
    .result (alu_y),
    .eq     (alu_eq)
  );

  // ---------------------------------------------------------------- memory
  risc16_dmem #(.AW(DMEM_AW)) u_dmem (
    .clk     (clk),
    .a_addr  (alu_y[DMEM_AW-1:0]),
    .a_rdata (dmem_rdata),
    .a_we    (ctrl.we_dmem && !is_halt && !rst),
    .a_wdata (src2_data),
    .b_addr  (dmem_ext_addr),
    .b_rdata (dmem_ext_rdata),
    .b_we    (dmem_ext_we),
    .b_wdata (dmem_ext_wdata)
  );

  // ---------------------------------------------------------------- write back
  always_comb begin
    unique case (ctrl.mux_tgt)                                     // MUX_tgt
      TGT_ALU:  tgt_data = alu_y;
      TGT_DMEM: tgt_data = dmem_rdata;
      TGT_PC1:  tgt_data = pc_plus1;
      default:  tgt_data = alu_y;
    endcase
  end

  // ---------------------------------------------------------------- checks
  // No instruction writes both the register file and the data memory.
  a_one_write: assert property (@(posedge clk) disable iff (rst)
                                !(ctrl.we_rf && ctrl.we_dmem));
  // A halted machine keeps its PC.
  a_halt_holds: assert property (@(posedge clk) disable iff (rst)
                                 halted |=> $stable(pc));

endmodule
