// tb_main_control: checks the main decoder against the control truth table.
// Every defined entry of the table is checked for R-type, ori, lw, sw, beq
// and jump (don't-care entries are skipped); for every other opcode the
// decoder must request no register write, no memory write, no branch and no
// jump.
module tb_main_control;
  import sc_pkg::*;
  logic [5:0] op;
  ctrl_t      c;
  int checks = 0, failures = 0;

  main_control dut (.op(op), .ctrl(c));

  // expected value string per signal: '0', '1' or 'x' (don't care), in the
  // order RegDst ALUSrc MemtoReg RegWrite MemWrite nPC_sel Jump ExtOp ALUop<2:0>
  task automatic check_row(logic [5:0] opc, string exp, string name);
    logic [10:0] got;
    op = opc;
    #1;
    got = {c.reg_dst, c.alu_src, c.mem_to_reg, c.reg_write, c.mem_write,
           c.npc_sel, c.jump, c.ext_op, c.alu_op};
    for (int i = 0; i < 11; i++) begin
      if (exp[i] == "x") continue;
      checks++;
      if (got[10-i] !== (exp[i] == "1")) begin
        failures++;
        $display("FAIL %s: signal %0d got %b expected %s", name, i, got[10-i], exp.substr(i, i));
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    //                      RAMRMnJEaaa
    check_row(6'b000000, "10010000100", "R-type");
    check_row(6'b001101, "01010000010", "ori");
    check_row(6'b100011, "01110001000", "lw");
    check_row(6'b101011, "x1x01001000", "sw");
    check_row(6'b000100, "x0x0010x001", "beq");
    check_row(6'b000010, "xxx0001xxxx", "jump");
    for (int o = 0; o < 64; o++) begin
      if (o inside {6'o00, 6'o15, 6'o43, 6'o53, 6'o04, 6'o02}) continue;
      check_row(6'(o), "xxx0000xxxx", "undefined opcode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
