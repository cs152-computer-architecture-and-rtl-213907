// single_cycle_cpu: a single-cycle processor for a MIPS subset.
//
// Executes add, sub (and the R-type and, or, slt the ALU control also
// decodes), ori, lw, sw, beq and j, one instruction per clock cycle (CPI=1):
// the cycle must be long enough for the slowest instruction, a load, whose
// path runs PC -> instruction memory -> register file -> ALU -> data memory
// -> register file. The processor is the control unit (main control plus
// local ALU control) driving the datapath's control points from the current
// instruction.
//
// Interface: clk; rst (synchronous, PC <- 0, registers <- 0); a load port
// that writes the instruction memory word at prog_addr while prog_we is
// high (hold rst during loading); observation outputs giving the PC, the
// instruction, and the register write and memory write of the current
// cycle, each taking effect at the next rising edge. Memory sizes, the load
// port, the reset and the observation outputs are this design's choices.
module single_cycle_cpu
  import sc_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);

  ctrl_t      ctrl;
  logic [2:0] aluctr;
  logic       zero;

  control u_ctl (
    .op     (instr[31:26]),
    .func   (instr[5:0]),
    .ctrl   (ctrl),
    .aluctr (aluctr)
  );

  datapath #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk       (clk),
    .rst       (rst),
    .ctrl      (ctrl),
    .aluctr    (aluctr),
    .instr     (instr),
    .zero      (zero),
    .prog_we   (prog_we),
    .prog_addr (prog_addr),
    .prog_data (prog_data),
    .pc        (pc),
    .reg_we    (reg_we),
    .reg_waddr (reg_waddr),
    .reg_wdata (reg_wdata),
    .mem_we    (mem_we),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata)
  );

endmodule
