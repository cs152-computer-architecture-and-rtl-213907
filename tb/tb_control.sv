// tb_control: checks the two-level control unit against the per-instruction
// summary of control signals: for add, sub, and, or, slt, ori, lw, sw and beq
// the ALU operation code and the defined control points must match, e.g.
// lw: ALUSrc=Im, ExtOp=sign, ALUctr=add, MemtoReg, RegDst=rt, RegWr.
module tb_control;
  import sc_pkg::*;
  logic [5:0] op, func;
  ctrl_t      c;
  logic [2:0] aluctr;
  int checks = 0, failures = 0;

  control dut (.op(op), .func(func), .ctrl(c), .aluctr(aluctr));

  task automatic chk(string name, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (op=%b func=%b)", name, op, func); end
  endtask

  task automatic rtype(logic [5:0] fn, logic [2:0] code, string name);
    op = 6'b000000; func = fn; #1;
    chk({name, " aluctr"}, aluctr == code);
    chk({name, " regdst/regwr/alusrc"}, c.reg_dst && c.reg_write && !c.alu_src);
    chk({name, " no mem/branch"}, !c.mem_write && !c.mem_to_reg && !c.npc_sel && !c.jump);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rtype(6'b100000, 3'b010, "add");
    rtype(6'b100010, 3'b110, "sub");
    rtype(6'b100100, 3'b000, "and");
    rtype(6'b100101, 3'b001, "or");
    rtype(6'b101010, 3'b111, "slt");
    for (int k = 0; k < 20; k++) begin
      func = 6'($urandom);
      op = 6'b001101; #1;
      chk("ori", aluctr == 3'b001 && c.alu_src && !c.ext_op && !c.reg_dst && c.reg_write && !c.mem_to_reg && !c.mem_write && !c.npc_sel);
      op = 6'b100011; #1;
      chk("lw", aluctr == 3'b010 && c.alu_src && c.ext_op && c.mem_to_reg && !c.reg_dst && c.reg_write && !c.mem_write && !c.npc_sel);
      op = 6'b101011; #1;
      chk("sw", aluctr == 3'b010 && c.alu_src && c.ext_op && c.mem_write && !c.reg_write && !c.npc_sel);
      op = 6'b000100; #1;
      chk("beq", aluctr == 3'b110 && !c.alu_src && c.npc_sel && !c.reg_write && !c.mem_write && !c.jump);
      op = 6'b000010; #1;
      chk("jump", c.jump && !c.reg_write && !c.mem_write && !c.npc_sel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
