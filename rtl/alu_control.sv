// alu_control: the local ALU decoder.
//
// The main control only tells it the class of operation through ALUop<2:0>
// (100 R-type, 010 or, 000 add, 001 subtract); for R-type instructions the
// operation comes from func<3:0>. ALUctr<2:0> selects the ALU operation:
// 010 add, 110 subtract, 000 and, 001 or, 111 set-on-less-than. Each output
// bit is the minimal sum of products of the design's truth table:
//   ALUctr<2> = !ALUop<2>&ALUop<0> + ALUop<2>&!f<2>&f<1>&!f<0>
//   ALUctr<1> = !ALUop<2>&!ALUop<1> + ALUop<2>&!f<2>&!f<0>
//   ALUctr<0> = !ALUop<2>&ALUop<1> + ALUop<2>&!f<3>&f<2>&!f<1>&f<0>
//                                  + ALUop<2>&f<3>&!f<2>&f<1>&!f<0>
// func<5:4> are not looked at, and R-type function codes outside add, sub,
// and, or, slt give whatever these equations produce.
// Purely combinational.
module alu_control (
  input  logic [2:0] aluop,
  input  logic [5:0] func,
  output logic [2:0] aluctr
);

  always_comb begin
    aluctr[2] = (!aluop[2] &  aluop[0])
              | ( aluop[2] & !func[2] & func[1] & !func[0]);
    aluctr[1] = (!aluop[2] & !aluop[1])
              | ( aluop[2] & !func[2] & !func[0]);
    aluctr[0] = (!aluop[2] &  aluop[1])
              | ( aluop[2] & !func[3] &  func[2] & !func[1] &  func[0])
              | ( aluop[2] &  func[3] & !func[2] &  func[1] & !func[0]);
  end

endmodule
