// tb_alu: random and corner operands for all five ALU operations, compared
// with arithmetic worked out in the testbench; Zero must be set exactly when
// the result is zero (checked in particular for a - a, the branch-equal case).
module tb_alu;
  logic [31:0] a, b, r;
  logic [2:0]  ctr;
  logic        z;
  int checks = 0, failures = 0;

  alu #(.WIDTH(32)) dut (.a(a), .b(b), .aluctr(ctr), .result(r), .zero(z));

  task automatic one(logic [31:0] x, logic [31:0] y);
    logic [31:0] exp [5];
    logic [2:0]  codes [5] = '{3'b010, 3'b110, 3'b000, 3'b001, 3'b111};
    exp[0] = x + y; exp[1] = x - y; exp[2] = x & y; exp[3] = x | y;
    exp[4] = (int'(x) < int'(y)) ? 1 : 0;
    a = x; b = y;
    for (int k = 0; k < 5; k++) begin
      ctr = codes[k]; #1;
      checks++;
      if (r !== exp[k] || z !== (exp[k] == 0)) begin
        failures++;
        $display("FAIL ctr=%b a=%h b=%h r=%h z=%b exp=%h", ctr, x, y, r, z, exp[k]);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    one(0, 0); one(32'h7fffffff, 32'h80000000); one(32'h80000000, 32'h7fffffff);
    one(32'hffffffff, 1); one(5, 5); one(32'hffffffff, 32'hffffffff);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] x;
      x = $urandom;
      one(x, (i % 4 == 0) ? x : $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
