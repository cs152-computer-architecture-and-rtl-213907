// extender: widens the 16-bit immediate field to 32 bits.
//
// ExtOp = 1 sign-extends (copies imm16<15> into the upper half; used by lw
// and sw address arithmetic), ExtOp = 0 zero-extends (used by ori).
// Combinational.
module extender (
  input  logic [15:0] imm16,
  input  logic        extop,
  output logic [31:0] imm32
);

  always_comb imm32 = {{16{extop & imm16[15]}}, imm16};

endmodule
