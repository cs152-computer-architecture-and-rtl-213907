// sc_pkg: opcodes, function codes, ALU operation codes and the control-point
// bundle shared by the single-cycle MIPS-subset processor.
//
// The instruction subset is add, sub, ori, lw, sw, beq and j. Opcode and
// function values are the standard MIPS encodings. The ALU operation codes
// (ALUctr) and the 3-bit ALUop encoding passed from the main control to the
// local ALU control follow the control tables of the design; the ALUop value
// used for jump (a don't-care) is fixed to "add" here.
package sc_pkg;

  // Primary opcodes, instruction<31:26>
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_ORI   = 6'b001101;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_J     = 6'b000010;

  // R-type function codes, instruction<5:0>
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;
  localparam logic [5:0] FN_AND = 6'b100100;
  localparam logic [5:0] FN_OR  = 6'b100101;
  localparam logic [5:0] FN_SLT = 6'b101010;

  // ALU operation selected by ALUctr<2:0>
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } aluctr_e;

  // ALUop<2:0> from the main control to the local ALU control
  localparam logic [2:0] ALUOP_ADD   = 3'b000;
  localparam logic [2:0] ALUOP_SUB   = 3'b001;
  localparam logic [2:0] ALUOP_OR    = 3'b010;
  localparam logic [2:0] ALUOP_RTYPE = 3'b100;

  // Control points driven by the main control into the datapath
  typedef struct packed {
    logic       reg_dst;    // 1: write rd, 0: write rt
    logic       alu_src;    // 1: ALU B = extended immediate, 0: busB
    logic       mem_to_reg; // 1: busW = data memory, 0: ALU result
    logic       reg_write;  // register file write enable
    logic       mem_write;  // data memory write enable
    logic       npc_sel;    // 1: branch instruction (taken when Zero)
    logic       jump;       // 1: jump instruction
    logic       ext_op;     // 1: sign extend imm16, 0: zero extend
    logic [2:0] alu_op;     // ALUop to the local ALU control
  } ctrl_t;

endpackage
