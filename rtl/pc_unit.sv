// pc_unit: program counter and new-pc calculation.
//
// The pc register holds the byte address of the current instruction and
// drives the instruction memory address. Every rising clock edge it loads the
// new pc: pc + 4 for sequential execution, or, for an absolute jump (j, jal),
// the upper 4 bits of the current pc followed by the 26-bit target and two
// zero bits. pc_plus4 is also brought out as the return address for jal.
//
// The pc + 4 adder and the absolute-jump rule follow the specification. The
// asynchronous active-low reset to RESET_PC is this design's choice. Whether
// "current pc" in the jump rule means pc or pc + 4 is left open there; this
// design uses pc (the two differ only for a jump in the last word of a
// 256 MiB region).
module pc_unit #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        jump,
  input  logic [25:0] target,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4
);

  logic [31:0] pc_next;

  assign pc_plus4 = pc + 32'd4;
  assign pc_next  = jump ? {pc[31:28], target, 2'b00} : pc_plus4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc <= RESET_PC;
    else        pc <= pc_next;
  end

endmodule
