// data_memory: data memory of the single-cycle processor.
//
// Adr is the byte address computed by the ALU; the memory is word-addressed
// by Adr<AW+1:2> (higher bits wrap). Data Out is read combinationally so a
// load completes within its cycle; when WrEn (MemWr) is high, Data In (busB,
// i.e. R[rt]) is written at the rising clock edge. The size is this design's
// choice; contents are not reset.
module data_memory #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        wren,
  input  logic [31:0] adr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wren) mem[adr[AW+1:2]] <= data_in;
  end

  always_comb data_out = mem[adr[AW+1:2]];

endmodule
