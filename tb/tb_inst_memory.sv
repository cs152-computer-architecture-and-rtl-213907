// tb_inst_memory: loads random words through the load port, then reads them
// back at their byte addresses in random order.
module tb_inst_memory;
  localparam int W = 1024;
  logic        clk = 0, pwe;
  logic [31:0] adr, ins, paddr, pdata;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  inst_memory #(.WORDS(W)) dut (.clk(clk), .adr(adr), .instr(ins), .prog_we(pwe), .prog_addr(paddr), .prog_data(pdata));

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pwe = 1; adr = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); paddr = 32'(i * 4); pdata = $urandom; model[i] = pdata;
    end
    @(negedge clk); pwe = 0; paddr = 0;
    for (int i = 0; i < 4000; i++) begin
      int idx;
      idx = int'($urandom % W);
      adr = 32'(idx * 4); #1;
      checks++;
      if (ins !== model[idx]) begin failures++; $display("FAIL %0d: %h exp %h", idx, ins, model[idx]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
