// main_control: the main decoder of the single-cycle processor.
//
// It looks only at the 6-bit opcode and produces every datapath control
// point plus the 3-bit ALUop for the local ALU control. It is written the way
// the design builds it, as a PLA: an AND plane with one product term per
// supported instruction (a full 6-bit opcode match: R-type, ori, lw, sw, beq,
// jump) and an OR plane that combines the terms:
//   RegWrite = R-type + ori + lw      ALUSrc = ori + lw + sw
//   RegDst   = R-type                 MemtoReg = lw      MemWrite = sw
//   nPC_sel  = beq (Branch)           Jump = jump        ExtOp = lw + sw
//   ALUop<2> = R-type   ALUop<1> = ori   ALUop<0> = beq
// Don't-care entries of the control truth table therefore resolve to 0. An
// opcode outside the subset fires no product term, so it writes nothing and
// the PC simply advances: that behaviour is this design's choice.
// Purely combinational.
module main_control
  import sc_pkg::*;
(
  input  logic [5:0] op,
  output ctrl_t      ctrl
);

  // AND plane
  logic is_rtype, is_ori, is_lw, is_sw, is_beq, is_j;

  always_comb begin
    is_rtype = (op == OP_RTYPE);
    is_ori   = (op == OP_ORI);
    is_lw    = (op == OP_LW);
    is_sw    = (op == OP_SW);
    is_beq   = (op == OP_BEQ);
    is_j     = (op == OP_J);
  end

  // OR plane
  always_comb begin
    ctrl.reg_write  = is_rtype | is_ori | is_lw;
    ctrl.alu_src    = is_ori | is_lw | is_sw;
    ctrl.reg_dst    = is_rtype;
    ctrl.mem_to_reg = is_lw;
    ctrl.mem_write  = is_sw;
    ctrl.npc_sel    = is_beq;
    ctrl.jump       = is_j;
    ctrl.ext_op     = is_lw | is_sw;
    ctrl.alu_op     = {is_rtype, is_ori, is_beq};
  end

endmodule
