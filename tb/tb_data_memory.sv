// tb_data_memory: random word writes and combinational reads against a
// model; a write takes effect at the clock edge, not before, and WrEn low
// leaves the memory unchanged. Byte addresses are word aligned.
module tb_data_memory;
  localparam int W = 1024;
  logic        clk = 0, wren;
  logic [31:0] adr, din, dout;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  data_memory #(.WORDS(W)) dut (.clk(clk), .wren(wren), .adr(adr), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wren = 1;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); adr = 32'(i * 4); din = $urandom; model[i] = din;
    end
    @(negedge clk); wren = 0;
    for (int i = 0; i < 6000; i++) begin
      int idx;
      idx = int'($urandom % W);
      @(negedge clk);
      adr = 32'(idx * 4); din = $urandom; wren = $urandom % 2;
      #1 checks++;
      if (dout !== model[idx]) begin failures++; $display("FAIL pre  %0d: %h exp %h", idx, dout, model[idx]); end
      @(posedge clk);
      if (wren) model[idx] = din;
      #1 checks++;
      if (dout !== model[idx]) begin failures++; $display("FAIL post %0d: %h exp %h", idx, dout, model[idx]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
