// tb_ifetch: drives the fetch unit's control inputs at random for a random
// instruction image and checks, every cycle, the instruction read at PC and
// the next PC: PC+4, PC+4+SignExt(imm16)*4 when nPC_sel and Zero are both 1,
// and {PC+4<31:28>, target, 00} for a jump. Every case must occur.
module tb_ifetch;
  localparam int W = 1024;
  logic        clk = 0, rst, npc_sel, zero, jump, pwe;
  logic [31:0] paddr, pdata, pc, ins;
  logic [31:0] image [W];
  logic [31:0] exp_pc, pc4;
  int checks = 0, failures = 0, n_seq = 0, n_br = 0, n_nobr = 0, n_j = 0;

  ifetch #(.IMEM_WORDS(W)) dut (.clk(clk), .rst(rst), .npc_sel(npc_sel), .zero(zero), .jump(jump),
                                .prog_we(pwe), .prog_addr(paddr), .prog_data(pdata), .pc(pc), .instr(ins));

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; npc_sel = 0; zero = 0; jump = 0; pwe = 1;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); paddr = 32'(i * 4); pdata = $urandom; image[i] = pdata;
    end
    @(negedge clk); pwe = 0;
    @(negedge clk); rst = 0;
    checks++;
    if (pc !== 0) begin failures++; $display("FAIL reset pc=%h", pc); end
    exp_pc = 0;
    for (int i = 0; i < 5000; i++) begin
      int sel;
      sel = int'($urandom % 4);
      npc_sel = (sel == 1 || sel == 2); zero = (sel == 1) || (sel == 3 && $urandom % 2 == 1);
      jump = (sel == 3);
      #1;
      checks++;
      if (ins !== image[pc[11:2]]) begin failures++; $display("FAIL instr at %h", pc); end
      pc4 = exp_pc + 4;
      if (jump) begin exp_pc = {pc4[31:28], image[exp_pc[11:2]][25:0], 2'b00}; n_j++; end
      else if (npc_sel && zero) begin exp_pc = pc4 + {{14{image[exp_pc[11:2]][15]}}, image[exp_pc[11:2]][15:0], 2'b00}; n_br++; end
      else begin exp_pc = pc4; if (npc_sel) n_nobr++; else n_seq++; end
      @(negedge clk);
      checks++;
      if (pc !== exp_pc) begin failures++; $display("FAIL pc=%h exp %h", pc, exp_pc); exp_pc = pc; end
    end
    checks++;
    if (n_seq == 0 || n_br == 0 || n_nobr == 0 || n_j == 0) failures++;
    $display("seq=%0d branch_taken=%0d branch_not_taken=%0d jump=%0d", n_seq, n_br, n_nobr, n_j);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
