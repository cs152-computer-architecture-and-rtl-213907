// register_file: the 32 x 32-bit general register file.
//
// Two read ports and one write port. Ra and Rb address busA and busB
// combinationally, so an instruction reads its operands in the same cycle it
// is fetched. When RegWr is high, busW is written to register Rw at the
// rising clock edge that ends the cycle. Register 0 always reads as zero and
// ignores writes (the MIPS convention). A synchronous reset clears all
// registers; the reset is this design's addition for a known start state.
module register_file #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    rw,
  input  logic [WIDTH-1:0] busw,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  output logic [WIDTH-1:0] busa,
  output logic [WIDTH-1:0] busb
);

  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= busw;
    end
  end

  always_comb begin
    busa = (ra == '0) ? '0 : regs[ra];
    busb = (rb == '0) ? '0 : regs[rb];
  end

endmodule
