// risc16_imem: instruction memory of the RiSC-16 processor.
//
// 2**AW words of 16 bits, word addressed. The program counter drives addr and
// the instruction word appears on rdata in the same cycle (combinational
// read), as the single-cycle datapath requires: a new PC selects a new
// instruction, and everything settles before the next clock edge. The
// architecture gives only the read side; the load port (we, waddr, wdata,
// written on the rising clock edge) is this design's way of placing a program
// in the memory before the processor runs. The default size covers the full
// 16-bit address space.
module risc16_imem
  import risc16_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output word_t         rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  word_t         wdata
);

  word_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
