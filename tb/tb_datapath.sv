// tb_datapath: runs a short hand-written program through the datapath with
// the control points supplied by the testbench itself, looked up from the
// per-instruction control table (not from the control RTL). An instruction
// model checks the PC, register writes and memory writes every cycle. The
// program covers add, sub, and, or, slt, ori, lw and sw with positive and
// negative offsets, beq taken forwards, not taken and taken backwards, and j.
module tb_datapath;
  import sc_pkg::*;
  import mips_ref_pkg::*;

  logic        clk = 0, rst = 1, prog_we = 0, zero;
  logic [31:0] prog_addr = 0, prog_data = 0;
  logic [31:0] pc, instr, reg_wdata, mem_addr, mem_wdata;
  logic        reg_we, mem_we;
  logic [4:0]  reg_waddr;
  ctrl_t       ctrl;
  logic [2:0]  aluctr;

  datapath #(.IMEM_WORDS(64), .DMEM_WORDS(64)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] prog [64];
  int len = 0;

  task automatic emit(logic [31:0] w);
    prog[len] = w;
    len++;
  endtask

  // control table: RegDst ALUSrc MemtoReg RegWrite MemWrite nPC_sel Jump ExtOp, ALUctr
  always_comb begin
    ctrl = '0;
    aluctr = 3'b010;
    case (instr[31:26])
      6'h00: begin
        ctrl.reg_dst = 1; ctrl.reg_write = 1;
        case (instr[5:0])
          6'h20: aluctr = 3'b010;
          6'h22: aluctr = 3'b110;
          6'h24: aluctr = 3'b000;
          6'h25: aluctr = 3'b001;
          6'h2a: aluctr = 3'b111;
          default: ;
        endcase
      end
      6'h0d: begin ctrl.alu_src = 1; ctrl.reg_write = 1; aluctr = 3'b001; end
      6'h23: begin ctrl.alu_src = 1; ctrl.mem_to_reg = 1; ctrl.reg_write = 1; ctrl.ext_op = 1; end
      6'h2b: begin ctrl.alu_src = 1; ctrl.mem_write = 1; ctrl.ext_op = 1; end
      6'h04: begin ctrl.npc_sel = 1; aluctr = 3'b110; end
      6'h02: ctrl.jump = 1;
      default: ;
    endcase
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    effect_t e;
    logic [31:0] pc_now, ins;
    int steps = 0, taken = 0, back = 0, jumps = 0;
    emit(enc_i(ORI_OP, 5'd1, 5'd0, 16'h8001));     //  0 r1 = 0x8001 (zero-extended)
    emit(enc_i(ORI_OP, 5'd2, 5'd0, 16'h0030));     //  1 r2 = 48
    emit(enc_r(ADD_FN, 5'd3, 5'd1, 5'd2));         //  2 r3 = r1 + r2
    emit(enc_r(SUB_FN, 5'd4, 5'd2, 5'd1));         //  3 r4 = r2 - r1 (negative)
    emit(enc_r(AND_FN, 5'd5, 5'd3, 5'd1));         //  4
    emit(enc_r(OR_FN,  5'd6, 5'd4, 5'd2));         //  5
    emit(enc_r(SLT_FN, 5'd7, 5'd4, 5'd2));         //  6 r7 = 1 (signed)
    emit(enc_i(SW_OP,  5'd3, 5'd2, 16'hfffc));     //  7 mem[44] = r3 (negative offset)
    emit(enc_i(SW_OP,  5'd4, 5'd0, 16'h0008));     //  8 mem[8]  = r4
    emit(enc_i(LW_OP,  5'd8, 5'd0, 16'd44));       //  9 r8 = mem[44]
    emit(enc_i(LW_OP,  5'd9, 5'd2, 16'hffd8));     // 10 r9 = mem[8]
    emit(enc_i(BEQ_OP, 5'd8, 5'd3, 16'd1));        // 11 taken, skips 12
    emit(enc_i(ORI_OP, 5'd10, 5'd0, 16'hdead));    // 12 skipped
    emit(enc_i(BEQ_OP, 5'd8, 5'd9, 16'd5));        // 13 not taken
    emit(enc_i(ORI_OP, 5'd11, 5'd0, 16'd2));       // 14 r11 = 2
    emit(enc_i(ORI_OP, 5'd12, 5'd0, 16'd1));       // 15 r12 = 1
    emit(enc_r(SUB_FN, 5'd11, 5'd11, 5'd12));      // 16 loop: r11--
    emit(enc_i(BEQ_OP, 5'd11, 5'd0, 16'd1));       // 17 exit when 0
    emit(enc_i(BEQ_OP, 5'd0, 5'd0, 16'hfffd));     // 18 back to 16
    emit(enc_j(26'd21));                           // 19 jump over 20
    emit(enc_i(ORI_OP, 5'd13, 5'd0, 16'hbad0));    // 20 skipped
    emit(enc_r(ADD_FN, 5'd0, 5'd1, 5'd1));         // 21 write to r0 ignored
    emit(enc_r(ADD_FN, 5'd14, 5'd0, 5'd9));        // 22 r14 = r0 + r9
    emit(enc_i(SW_OP,  5'd14, 5'd0, 16'd0));       // 23
    emit(enc_j(26'd24));                           // 24 j .
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 32'(i * 4); prog_data = (i < len) ? prog[i] : 32'h0;
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); rst = 0;
    ref_reset();
    forever begin
      #1;
      pc_now = m_pc;
      ins = prog[pc_now[7:2]];
      checks++;
      if (pc !== pc_now) begin failures++; $display("FAIL pc %h exp %h", pc, pc_now); end
      e = ref_step(ins, 64);
      checks++;
      if (e.reg_we && e.reg_addr != 0) begin
        if (!(reg_we && reg_waddr == e.reg_addr && reg_wdata == e.reg_data)) begin
          failures++; $display("FAIL regwrite at %h: r%0d=%h exp r%0d=%h", pc_now, reg_waddr, reg_wdata, e.reg_addr, e.reg_data);
        end
      end else if (reg_we && reg_waddr != 0) begin
        failures++; $display("FAIL unexpected regwrite at %h", pc_now);
      end
      checks++;
      if (e.mem_we !== mem_we || (e.mem_we && (mem_addr != e.mem_addr || mem_wdata != e.mem_data))) begin
        failures++; $display("FAIL memwrite at %h", pc_now);
      end
      if (ins[31:26] == BEQ_OP && e.next_pc != pc_now + 4) begin taken++; if (e.next_pc < pc_now) back++; end
      if (ins[31:26] == J_OP) jumps++;
      steps++;
      if (e.next_pc == pc_now || steps > 200) break;
      @(negedge clk);
    end
    checks++;
    if (steps != 25 || taken != 3 || back != 1 || jumps != 2 || m_regs[14] != 32'hffff802f) begin
      failures++;
      $display("FAIL path: steps=%0d taken=%0d back=%0d jumps=%0d r14=%h", steps, taken, back, jumps, m_regs[14]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
