// ifetch: the instruction fetch unit.
//
// Holds the PC and computes the next one every cycle:
//   sequential : PC <- PC + 4
//   branch     : PC <- PC + 4 + SignExt(imm16) * 4, when nPC_sel = 1 and the
//                ALU's Zero = 1 (the mux select is nPC_sel AND Zero)
//   jump       : PC <- {(PC+4)<31:28>, target<25:0>, 00}
// The branch target adder takes the PC+4 adder's output, as in the design.
// The design draws no jump path in its fetch unit even though its control
// produces a Jump signal; the MIPS pseudo-direct jump used here is this
// design's choice, as is the synchronous reset to address 0. PC<1:0> stay 0.
// The instruction memory is read at PC combinationally; the PC updates at
// the rising clock edge.
module ifetch #(
  parameter int unsigned IMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        npc_sel,
  input  logic        zero,
  input  logic        jump,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  output logic [31:0] pc,
  output logic [31:0] instr
);

  logic [31:0] pc_plus4, br_target, j_target, pc_next, pc_ext;

  inst_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk       (clk),
    .adr       (pc),
    .instr     (instr),
    .prog_we   (prog_we),
    .prog_addr (prog_addr),
    .prog_data (prog_data)
  );

  always_comb begin
    pc_plus4  = pc + 32'd4;
    pc_ext    = {{14{instr[15]}}, instr[15:0], 2'b00};   // "PC Ext"
    br_target = pc_plus4 + pc_ext;
    j_target  = {pc_plus4[31:28], instr[25:0], 2'b00};
    if (jump)                pc_next = j_target;
    else if (npc_sel & zero) pc_next = br_target;
    else                     pc_next = pc_plus4;
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= {pc_next[31:2], 2'b00};
  end

endmodule
