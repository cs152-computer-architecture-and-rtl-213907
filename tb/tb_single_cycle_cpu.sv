// tb_single_cycle_cpu: end-to-end test of the single-cycle processor at its
// default sizes.
//
// The testbench generates random programs over the whole instruction subset,
// loads each through the instruction-memory load port, and runs it to its
// final "j ." instruction while an instruction-level reference model
// (mips_ref_pkg) executes the same program. Every cycle it compares the PC,
// the register write (destination and value) and the memory write (address
// and data) with the model, so every cycle must retire exactly one
// instruction (CPI = 1). Each program has
//   - a prologue that fills the data words the program uses,
//   - a random body of R-type add/sub/and/or/slt, ori, lw, sw (with positive
//     and negative offsets from two base registers), forward beq (taken and
//     not taken), forward j, and writes aimed at register 0,
//   - a counted loop closed by a backward beq.
// Each of those events is counted and must occur at least once.
module tb_single_cycle_cpu;
  import mips_ref_pkg::*;

  localparam int IMEM_WORDS = 1024;   // defaults of single_cycle_cpu
  localparam int DMEM_WORDS = 1024;
  localparam int BODY       = 600;
  localparam int PROGRAMS   = 4;

  logic        clk = 0, rst = 1, prog_we = 0;
  logic [31:0] prog_addr = 0, prog_data = 0;
  logic [31:0] pc, instr, reg_wdata, mem_addr, mem_wdata;
  logic        reg_we, mem_we;
  logic [4:0]  reg_waddr;

  single_cycle_cpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  logic running = 0;
  logic [31:0] last_store;

  // clock edges seen while a program runs, counted apart from the model
  always @(posedge clk) if (running) cycles++;
  int n_add, n_sub, n_and, n_or, n_slt, n_ori, n_lw, n_sw, n_beq_t, n_beq_nt, n_beq_back, n_j, n_r0;
  logic [31:0] prog [IMEM_WORDS];
  int len;

  function automatic logic [4:0] rnd_src();
    return 5'($urandom % 30);
  endfunction
  function automatic logic [4:0] rnd_dst();
    return ($urandom % 25 == 0) ? 5'd0 : 5'(1 + $urandom % 26);   // never 27..30
  endfunction

  task automatic emit(logic [31:0] w);
    prog[len] = w;
    len++;
  endtask

  task automatic gen_program();
    int loop_top;
    len = 0;
    // prologue: base registers and 64 initialised data words at 0..252
    emit(enc_i(ORI_OP, 5'd30, 5'd0, 16'd64));
    for (int k = 0; k < 64; k++) begin
      emit(enc_i(ORI_OP, 5'd1, 5'd0, 16'($urandom)));
      emit(enc_i(SW_OP, 5'd1, 5'd0, 16'(k * 4)));
    end
    // random body
    for (int i = 0; i < BODY; i++) begin
      int kind = int'($urandom % 16);
      logic [4:0] base;
      logic [15:0] off;
      base = ($urandom % 2 == 0) ? 5'd0 : 5'd30;
      off = 16'(int'($urandom % 64) * 4 - ((base == 5'd30) ? 64 : 0));
      case (kind)
        0, 1:  emit(enc_r(ADD_FN, rnd_dst(), rnd_src(), rnd_src()));
        2, 3:  emit(enc_r(SUB_FN, rnd_dst(), rnd_src(), rnd_src()));
        4:     emit(enc_r(AND_FN, rnd_dst(), rnd_src(), rnd_src()));
        5:     emit(enc_r(OR_FN,  rnd_dst(), rnd_src(), rnd_src()));
        6:     emit(enc_r(SLT_FN, rnd_dst(), rnd_src(), rnd_src()));
        7, 8:  emit(enc_i(ORI_OP, rnd_dst(), rnd_src(), 16'($urandom)));
        9, 10: emit(enc_i(LW_OP, rnd_dst(), base, off));
        11:    emit(enc_i(SW_OP, rnd_src(), base, off));
        12:    emit(enc_i(BEQ_OP, rnd_src(), rnd_src(), 16'($urandom % 4)));
        13:    begin
                 logic [4:0] r;
                 r = rnd_src();
                 emit(enc_i(BEQ_OP, r, r, 16'($urandom % 4)));     // always taken
               end
        14:    emit(enc_j(26'(len + 1 + int'($urandom % 4))));
        default: emit(enc_i(LW_OP, rnd_dst(), base, off));
      endcase
    end
    for (int i = 0; i < 4; i++) emit(enc_r(ADD_FN, 5'd26, 5'd26, 5'd0));  // landing pad
    // counted loop: r29 from 5 down to 0, closed by a backward beq
    emit(enc_i(ORI_OP, 5'd29, 5'd0, 16'd5));
    emit(enc_i(ORI_OP, 5'd28, 5'd0, 16'd1));
    loop_top = len;
    emit(enc_r(SUB_FN, 5'd29, 5'd29, 5'd28));
    emit(enc_r(ADD_FN, 5'd27, 5'd27, 5'd29));
    emit(enc_i(BEQ_OP, 5'd29, 5'd0, 16'd1));                  // exit when r29 == 0
    emit(enc_i(BEQ_OP, 5'd0, 5'd0, 16'(loop_top - (len + 1)))); // back to loop_top
    emit(enc_i(SW_OP, 5'd27, 5'd0, 16'd0));
    emit(enc_j(26'(len)));                                    // halt: j .
  endtask

  task automatic count(logic [31:0] ins, effect_t e, logic [31:0] pc_now);
    case (ins[31:26])
      R_OP: case (ins[5:0])
              ADD_FN: n_add++;
              SUB_FN: n_sub++;
              AND_FN: n_and++;
              OR_FN:  n_or++;
              SLT_FN: n_slt++;
              default: ;
            endcase
      ORI_OP: n_ori++;
      LW_OP:  n_lw++;
      SW_OP:  n_sw++;
      BEQ_OP: if (e.next_pc != pc_now + 4) begin
                n_beq_t++;
                if (e.next_pc < pc_now) n_beq_back++;
              end else n_beq_nt++;
      J_OP:   n_j++;
      default: ;
    endcase
    if (e.reg_we && e.reg_addr == 0 && ins[31:26] != R_OP) n_r0++;
    if (e.reg_we && e.reg_addr == 0 && ins[31:26] == R_OP && ins[5:0] != 0) n_r0++;
  endtask

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d pc=%h", what, cycles, pc);
    end
  endtask

  task automatic run_program(int p);
    int steps;
    effect_t e;
    logic [31:0] ins, pc_now;
    gen_program();
    rst = 1;
    for (int i = 0; i < IMEM_WORDS; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 32'(i * 4); prog_data = (i < len) ? prog[i] : 32'h0;
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); rst = 0;
    ref_reset();
    steps = 0;
    cycles = 0;
    running = 1;
    forever begin
      #1;
      pc_now = m_pc;
      ins = prog[pc_now[11:2]];
      check("pc", pc === pc_now);
      check("instruction", instr === ins);
      e = ref_step(ins, DMEM_WORDS);
      count(ins, e, pc_now);
      if (e.reg_we && e.reg_addr != 0)
        check("register write", reg_we === 1'b1 && reg_waddr === e.reg_addr && reg_wdata === e.reg_data);
      else
        check("no register write", !(reg_we && reg_waddr != 0));
      if (e.mem_we)
        check("memory write", mem_we === 1'b1 && mem_addr === e.mem_addr && mem_wdata === e.mem_data);
      else
        check("no memory write", mem_we === 1'b0);
      if (mem_we) last_store = mem_wdata;
      steps++;
      if (e.next_pc == pc_now) break;      // reached "j ."
      if (steps > 20 * IMEM_WORDS) begin check("program terminates", 0); break; end
      @(negedge clk);
    end
    running = 0;
    // one instruction per clock: the last one issues steps-1 edges after the first
    check("one instruction per cycle", cycles == steps - 1);
    // the counted loop sums 4+3+2+1+0 into r27 and the program stores it
    check("loop result stored", last_store == 32'd10);
    $display("program %0d: %0d instructions, first to last in %0d cycles", p, steps, cycles);
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {n_add, n_sub, n_and, n_or, n_slt, n_ori, n_lw, n_sw, n_beq_t, n_beq_nt, n_beq_back, n_j, n_r0} = '0;
    for (int p = 0; p < PROGRAMS; p++) run_program(p);
    $display("add=%0d sub=%0d and=%0d or=%0d slt=%0d ori=%0d lw=%0d sw=%0d", n_add, n_sub, n_and, n_or, n_slt, n_ori, n_lw, n_sw);
    $display("beq_taken=%0d beq_not_taken=%0d beq_backward=%0d jump=%0d r0_write=%0d", n_beq_t, n_beq_nt, n_beq_back, n_j, n_r0);
    check("add seen", n_add > 0);   check("sub seen", n_sub > 0);
    check("and seen", n_and > 0);   check("or seen", n_or > 0);
    check("slt seen", n_slt > 0);   check("ori seen", n_ori > 0);
    check("lw seen", n_lw > 0);     check("sw seen", n_sw > 0);
    check("beq taken seen", n_beq_t > 0);
    check("beq not taken seen", n_beq_nt > 0);
    check("backward beq seen", n_beq_back > 0);
    check("jump seen", n_j > 0);
    check("write to r0 seen", n_r0 > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
