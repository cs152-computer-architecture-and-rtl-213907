// tb_register_file: random writes and reads against a model array.
// Checks that reads are combinational (a value is visible right after the
// write edge, not before), that two ports read independently, that register
// 0 stays zero, that RegWr low blocks a write and that reset clears all.
module tb_register_file;
  logic        clk = 0, rst, we;
  logic [4:0]  rw, ra, rb;
  logic [31:0] busw, busa, busb;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  register_file #(.WIDTH(32), .DEPTH(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk_read();
    #1;
    checks++;
    if (busa !== model[ra] || busb !== model[rb]) begin
      failures++;
      $display("FAIL read ra=%0d busa=%h exp %h, rb=%0d busb=%h exp %h", ra, busa, model[ra], rb, busb, model[rb]);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; rw = 0; busw = 0; ra = 0; rb = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 32; i++) begin ra = 5'(i); rb = 5'(31 - i); chk_read(); end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0; rw = 5'($urandom); busw = $urandom;
      ra = rw; rb = 5'($urandom);
      chk_read();                       // before the edge: old value
      @(posedge clk);
      if (we && rw != 0) model[rw] = busw;
      chk_read();                       // after the edge: new value
    end
    @(negedge clk); we = 0; rst = 1;
    @(posedge clk); #1 rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 32; i++) begin ra = 5'(i); rb = 5'(i); chk_read(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
