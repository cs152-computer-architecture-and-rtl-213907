// control: the control unit of the single-cycle processor.
//
// Two-level decoding as the design prescribes: the main control turns the
// opcode (instruction<31:26>) into the datapath control points and a 3-bit
// ALUop; the local ALU control combines ALUop with the function field
// (instruction<5:0>) into the 3-bit ALUctr. Purely combinational; all
// outputs are valid one decode delay after the instruction word settles.
module control
  import sc_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] func,
  output ctrl_t      ctrl,
  output logic [2:0] aluctr
);

  main_control u_main (
    .op   (op),
    .ctrl (ctrl)
  );

  alu_control u_aluctl (
    .aluop  (ctrl.alu_op),
    .func   (func),
    .aluctr (aluctr)
  );

endmodule
