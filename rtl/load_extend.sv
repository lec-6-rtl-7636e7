// load_extend: turns the word read from data memory into the value a load
// instruction writes to its register.
//
// For lw the word passes unchanged. For lb/lbu the byte chosen by addr[1:0]
// is extracted; for lh/lhu the halfword chosen by addr[1]. The signed loads
// (lb, lh) replicate the sign bit of the extracted value into the upper bits,
// the unsigned ones (lbu, lhu) fill them with zeros. Purely combinational.
//
// The five load kinds and sign extension by replicating the sign bit follow
// the specification; the little-endian lane selection matches the memory
// block and is this design's choice.
module load_extend
  import mips_pkg::*;
(
  input  logic [31:0] word,
  input  logic [1:0]  addr,
  input  load_e       ld,
  output logic [31:0] value
);

  logic [7:0]  byte_v;
  logic [15:0] half_v;
  assign byte_v = word[8*addr +: 8];
  assign half_v = word[16*addr[1] +: 16];

  always_comb begin
    unique case (ld)
      LD_W:    value = word;
      LD_B:    value = {{24{byte_v[7]}}, byte_v};
      LD_BU:   value = {24'b0, byte_v};
      LD_H:    value = {{16{half_v[15]}}, half_v};
      LD_HU:   value = {16'b0, half_v};
      default: value = word;
    endcase
  end

endmodule
