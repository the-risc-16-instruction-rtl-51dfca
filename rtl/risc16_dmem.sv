// risc16_dmem: data memory of the RiSC-16 processor.
//
// 2**AW words of 16 bits, word addressed. Port A is the processor's: the ALU
// result drives a_addr, a_rdata returns the addressed word combinationally
// (lw), and a_we writes a_wdata at the rising clock edge (sw), as in the
// architecture's single-cycle datapath. Port B is this design's addition for
// loading data before a run and reading results afterwards: also a
// combinational read and a clocked write. If both ports write the same word in
// one cycle, port A (the processor) wins. The default size covers the full
// 16-bit address space.
module risc16_dmem
  import risc16_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  output word_t         a_rdata,
  input  logic          a_we,
  input  word_t         a_wdata,
  input  logic [AW-1:0] b_addr,
  output word_t         b_rdata,
  input  logic          b_we,
  input  word_t         b_wdata
);

  word_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    if (a_we) mem[a_addr] <= a_wdata;
  end

  assign a_rdata = mem[a_addr];
  assign b_rdata = mem[b_addr];

endmodule
