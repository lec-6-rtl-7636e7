// sign_extend: widens the 16-bit immediate field of an instruction to 32 bits.
//
// With sign = 1 the upper 16 bits are copies of bit 15, so a small signed
// value keeps its value (-1 stays all ones). With sign = 0 the upper bits are
// zero, as the logical immediates (ANDI, ORI) need. Purely combinational.
//
// Sign extension by replicating the sign bit is the specified behaviour; the
// zero-extension mode, selected by the control unit, is this design's way of
// giving ANDI/ORI their unsigned immediate.
module sign_extend #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  imm,
  input  logic             sign,
  output logic [OUT_W-1:0] ext
);

  assign ext = {{(OUT_W-IN_W){sign & imm[IN_W-1]}}, imm};

endmodule
