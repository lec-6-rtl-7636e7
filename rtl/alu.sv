// alu: the processor's arithmetic logic unit.
//
// All function units work on the operands in parallel and a control mux picks
// the result selected by op:
//   - one adder computes A + B (carry in 0) or A + ~B + 1 = A - B (inverted B
//     selected, carry in 1);
//   - a bitwise AND and a bitwise OR, plus NOR as the inverted OR;
//   - a shifter moves B left or right (logical) by shamt;
//   - set-less-than gives 1 when A < B as signed numbers, taken from the
//     adder's subtraction with the overflow case corrected.
// Purely combinational.
//
// The adder with a B / inverted-B mux and carry in, the AND, OR and shifter
// units and the output mux follow the specification. NOR, right shift and
// set-less-than are needed by the instruction set and are this design's
// additions to that structure. The shift amount is a separate input
// (the instruction's shamt field).
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [4:0]       shamt,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] y
);

  // adder with inverted-B mux and carry in
  logic             sub;
  logic [WIDTH-1:0] b_mux, sum;
  assign sub   = (op == ALU_SUB) || (op == ALU_SLT);
  assign b_mux = sub ? ~b : b;
  assign sum   = a + b_mux + {{(WIDTH-1){1'b0}}, sub};

  // signed less-than: sign of A - B, flipped when the subtraction overflows
  logic ovf, lt;
  assign ovf = (a[WIDTH-1] != b[WIDTH-1]) && (sum[WIDTH-1] != a[WIDTH-1]);
  assign lt  = sum[WIDTH-1] ^ ovf;

  logic [WIDTH-1:0] and_y, or_y, sll_y, srl_y;
  assign and_y = a & b;
  assign or_y  = a | b;
  assign sll_y = b << shamt;
  assign srl_y = b >> shamt;

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB: y = sum;
      ALU_AND:          y = and_y;
      ALU_OR:           y = or_y;
      ALU_NOR:          y = ~or_y;
      ALU_SLL:          y = sll_y;
      ALU_SRL:          y = srl_y;
      ALU_SLT:          y = {{(WIDTH-1){1'b0}}, lt};
    endcase
  end

endmodule
