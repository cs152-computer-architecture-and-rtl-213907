// datapath: the single-cycle datapath.
//
// Every instruction flows through it in one clock cycle:
//   fetch    : the fetch unit presents Instruction = mem[PC]
//   operands : rs<25:21> and rt<20:16> read busA and busB; imm16<15:0> goes
//              through the extender (ExtOp)
//   execute  : the ALU combines busA with busB or the extended immediate
//              (ALUSrc 0 / 1) under ALUctr and reports Zero
//   memory   : the ALU result addresses the data memory; busB is its Data In
//              and MemWr writes it
//   writeback: busW is the ALU result or the memory output (MemtoReg 0 / 1),
//              written to rd or rt (RegDst 1 / 0) when RegWr is set
//   next PC  : the fetch unit uses nPC_sel, Zero and Jump
// All state (PC, registers, data memory) changes only at the rising clock
// edge that ends the cycle. The control points come from outside (the
// control unit). The observation outputs show the register and memory
// writes of the current cycle; they are this design's addition.
module datapath
  import sc_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  input  logic [2:0]  aluctr,
  output logic [31:0] instr,
  output logic        zero,
  // instruction memory load port
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  // observation
  output logic [31:0] pc,
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);

  logic [4:0]  rs, rt, rd, rw;
  logic [15:0] imm16;
  logic [31:0] busa, busb, busw, imm32, alu_b, alu_out, dmem_out;

  ifetch #(.IMEM_WORDS(IMEM_WORDS)) u_ifu (
    .clk       (clk),
    .rst       (rst),
    .npc_sel   (ctrl.npc_sel),
    .zero      (zero),
    .jump      (ctrl.jump),
    .prog_we   (prog_we),
    .prog_addr (prog_addr),
    .prog_data (prog_data),
    .pc        (pc),
    .instr     (instr)
  );

  always_comb begin
    rs    = instr[25:21];
    rt    = instr[20:16];
    rd    = instr[15:11];
    imm16 = instr[15:0];
    rw    = ctrl.reg_dst ? rd : rt;
  end

  register_file #(.WIDTH(32), .DEPTH(32)) u_rf (
    .clk  (clk),
    .rst  (rst),
    .we   (ctrl.reg_write),
    .rw   (rw),
    .busw (busw),
    .ra   (rs),
    .rb   (rt),
    .busa (busa),
    .busb (busb)
  );

  extender u_ext (
    .imm16 (imm16),
    .extop (ctrl.ext_op),
    .imm32 (imm32)
  );

  always_comb alu_b = ctrl.alu_src ? imm32 : busb;

  alu #(.WIDTH(32)) u_alu (
    .a      (busa),
    .b      (alu_b),
    .aluctr (aluctr),
    .result (alu_out),
    .zero   (zero)
  );

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk      (clk),
    .wren     (ctrl.mem_write),
    .adr      (alu_out),
    .data_in  (busb),
    .data_out (dmem_out)
  );

  always_comb busw = ctrl.mem_to_reg ? dmem_out : alu_out;

  always_comb begin
    reg_we    = ctrl.reg_write;
    reg_waddr = rw;
    reg_wdata = busw;
    mem_we    = ctrl.mem_write;
    mem_addr  = alu_out;
    mem_wdata = busb;
  end

endmodule
