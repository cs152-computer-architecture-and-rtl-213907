// mips_ref_pkg: testbench-only reference for the MIPS subset.
//
// Instruction encoders (R, I and J formats) and an instruction-level model of
// the architecture: 32 registers with register 0 fixed at zero, a word
// memory, and the PC. ref_step() executes one instruction and returns what
// the hardware must do in that cycle (register write, memory write, next
// PC). The model is written from the instruction definitions, not from the
// RTL, so the testbenches can compare the two.
package mips_ref_pkg;

  localparam logic [5:0] R_OP = 6'h00, ORI_OP = 6'h0d, LW_OP = 6'h23,
                         SW_OP = 6'h2b, BEQ_OP = 6'h04, J_OP = 6'h02;
  localparam logic [5:0] ADD_FN = 6'h20, SUB_FN = 6'h22, AND_FN = 6'h24,
                         OR_FN = 6'h25, SLT_FN = 6'h2a;

  function automatic logic [31:0] enc_r(logic [5:0] fn, logic [4:0] rd, logic [4:0] rs, logic [4:0] rt);
    return {R_OP, rs, rt, rd, 5'd0, fn};
  endfunction

  function automatic logic [31:0] enc_i(logic [5:0] op, logic [4:0] rt, logic [4:0] rs, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic logic [31:0] enc_j(logic [25:0] target);
    return {J_OP, target};
  endfunction

  typedef struct {
    bit          reg_we;
    logic [4:0]  reg_addr;
    logic [31:0] reg_data;
    bit          mem_we;
    logic [31:0] mem_addr;
    logic [31:0] mem_data;
    logic [31:0] next_pc;
  } effect_t;

  // Architectural state of the model
  logic [31:0] m_regs [32];
  logic [31:0] m_dmem [int];
  logic [31:0] m_pc;

  function automatic void ref_reset();
    foreach (m_regs[i]) m_regs[i] = '0;
    m_dmem.delete();
    m_pc = '0;
  endfunction

  function automatic logic [31:0] mem_rd(logic [31:0] a, int words);
    int idx = int'(a[31:2]) % words;
    if (m_dmem.exists(idx)) return m_dmem[idx];
    return 32'hdead_beef;   // never read in a well-formed test
  endfunction

  // Execute one instruction at m_pc; dmem_words is the hardware memory size
  // (addresses wrap at it).
  function automatic effect_t ref_step(logic [31:0] ins, int dmem_words);
    effect_t e;
    logic [5:0]  op = ins[31:26];
    logic [4:0]  rs = ins[25:21], rt = ins[20:16], rd = ins[15:11];
    logic [31:0] a = m_regs[rs], b = m_regs[rt];
    logic [31:0] sx = {{16{ins[15]}}, ins[15:0]};
    logic [31:0] zx = {16'h0, ins[15:0]};
    logic [31:0] pc4 = m_pc + 4;
    e.reg_we = 0; e.reg_addr = '0; e.reg_data = '0;
    e.mem_we = 0; e.mem_addr = '0; e.mem_data = '0;
    e.next_pc = pc4;
    case (op)
      R_OP: begin
        e.reg_we = 1; e.reg_addr = rd;
        case (ins[5:0])
          ADD_FN: e.reg_data = a + b;
          SUB_FN: e.reg_data = a - b;
          AND_FN: e.reg_data = a & b;
          OR_FN:  e.reg_data = a | b;
          SLT_FN: e.reg_data = ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
          default: e.reg_we = 0;
        endcase
      end
      ORI_OP: begin e.reg_we = 1; e.reg_addr = rt; e.reg_data = a | zx; end
      LW_OP:  begin e.reg_we = 1; e.reg_addr = rt; e.reg_data = mem_rd(a + sx, dmem_words); end
      SW_OP:  begin e.mem_we = 1; e.mem_addr = a + sx; e.mem_data = b; end
      BEQ_OP: if (a == b) e.next_pc = pc4 + {sx[29:0], 2'b00};
      J_OP:   e.next_pc = {pc4[31:28], ins[25:0], 2'b00};
      default: ;
    endcase
    if (e.reg_we && e.reg_addr != 0) m_regs[e.reg_addr] = e.reg_data;
    if (e.mem_we) m_dmem[int'(e.mem_addr[31:2]) % dmem_words] = e.mem_data;
    m_pc = e.next_pc;
    return e;
  endfunction

endpackage
