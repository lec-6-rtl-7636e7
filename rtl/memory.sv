// memory: byte-addressed memory with a 32-bit address, 32-bit data in and
// out, and a 2-bit control input mc.
//
//   mc = 00  read          (no write)
//   mc = 01  write byte    data_in[7:0]  -> byte at addr
//   mc = 10  write halfword data_in[15:0] -> halfword at addr (addr[0] ignored)
//   mc = 11  write word    data_in       -> word at addr (addr[1:0] ignored)
//
// data_out is combinational and always shows the whole aligned word that holds
// addr, so the processor can fetch an instruction or read load data in the
// same cycle. Writes take effect on the rising edge of clk. Words are stored
// little-endian: byte address 4k+i is bits [8i+7:8i] of word k.
//
// The port widths and the mc encoding follow the specification. The storage
// size (2**DEPTH_LOG2 words, upper address bits ignored so the contents repeat
// through the address space), the little-endian byte order, the rising-edge
// write, the combinational read and the lack of reset are this design's
// choices; the contents are loaded by the user before reset is released.
module memory
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH_LOG2 = 12
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] data_in,
  input  mem_ctl_e    mc,
  output logic [31:0] data_out
);

  logic [31:0] mem [2**DEPTH_LOG2];

  logic [DEPTH_LOG2-1:0] widx;
  assign widx = addr[DEPTH_LOG2+1:2];

  always_ff @(posedge clk) begin
    unique case (mc)
      MC_READ: ;
      MC_BYTE: mem[widx][8*addr[1:0] +: 8] <= data_in[7:0];
      MC_HALF: mem[widx][16*addr[1] +: 16] <= data_in[15:0];
      MC_WORD: mem[widx]                   <= data_in;
    endcase
  end

  assign data_out = mem[widx];

endmodule
