// inst_memory: instruction memory of the single-cycle processor.
//
// Read side: Instruction = mem[Adr], combinational, word-addressed by
// Adr<AW+1:2> (the two low bits of a byte address are always 0 for an
// instruction; higher bits wrap). Load side: a program is written one word
// at a time through prog_we / prog_addr / prog_data at the rising clock
// edge. The memory size and the load port are this design's choices; the
// design only requires that the instruction at PC be available within the
// cycle.
module inst_memory #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] adr,
  output logic [31:0] instr,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr[AW+1:2]] <= prog_data;
  end

  always_comb instr = mem[adr[AW+1:2]];

endmodule
