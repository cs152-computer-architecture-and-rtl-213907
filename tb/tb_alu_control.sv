// tb_alu_control: exhaustive check of the local ALU decoder.
// For ALUop 000 (add), 001 (subtract) and 010 (or) every func value is
// applied and the func field must be ignored; for ALUop 1xx (R-type) the five
// function codes must select add, subtract, and, or and set-on-less-than.
// Expected codes come from the ALU operation table: add 010, sub 110,
// and 000, or 001, slt 111.
module tb_alu_control;
  logic [2:0] aluop, aluctr;
  logic [5:0] func;
  int checks = 0, failures = 0;

  alu_control dut (.aluop(aluop), .func(func), .aluctr(aluctr));

  task automatic expect_code(logic [2:0] exp, string what);
    #1;
    checks++;
    if (aluctr !== exp) begin
      failures++;
      $display("FAIL %s: aluop=%b func=%b aluctr=%b expected %b", what, aluop, func, aluctr, exp);
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
    for (int f = 0; f < 64; f++) begin
      func = 6'(f);
      aluop = 3'b000; expect_code(3'b010, "lw/sw add");
      aluop = 3'b001; expect_code(3'b110, "beq subtract");
      aluop = 3'b010; expect_code(3'b001, "ori or");
    end
    for (int hi = 4; hi < 8; hi++) begin
      aluop = 3'(hi);
      func = 6'b100000; expect_code(3'b010, "R add");
      func = 6'b100010; expect_code(3'b110, "R sub");
      func = 6'b100100; expect_code(3'b000, "R and");
      func = 6'b100101; expect_code(3'b001, "R or");
      func = 6'b101010; expect_code(3'b111, "R slt");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
