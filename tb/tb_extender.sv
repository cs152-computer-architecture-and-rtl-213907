// tb_extender: random immediates through both extension modes.
module tb_extender;
  logic [15:0] imm;
  logic        op;
  logic [31:0] out;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm), .extop(op), .imm32(out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      imm = (i == 0) ? 16'h8000 : (i == 1) ? 16'h7fff : 16'($urandom);
      op = 1; #1;
      checks++;
      if (out !== 32'(signed'(imm))) begin failures++; $display("FAIL sign %h -> %h", imm, out); end
      op = 0; #1;
      checks++;
      if (out !== {16'h0, imm}) begin failures++; $display("FAIL zero %h -> %h", imm, out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
