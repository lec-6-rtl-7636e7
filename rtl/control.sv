// control: instruction decoder of the single-cycle processor.
//
// Looks at the opcode (bits 31:26) and, for R-type instructions, the function
// code (bits 5:0) and produces every control signal of the datapath as one
// ctrl_t word: the three 5-bit register selects, register write enable, ALU
// operation, immediate extension mode, ALU B-mux select (register or
// immediate), data memory control mc, load kind, write-back source and jump.
// Purely combinational.
//
// Implemented instructions:
//   R-type  ADD ADDU SUB AND NOR SLL SRL SLT, with func 0x23 = AND and
//           func 0x25 = NOR as specified
//   I-type  ADDI ADDIU (sign-extended), ANDI ORI (zero-extended)
//   memory  LB LBU LH LHU LW, SB SH SW (address = R[rs] + sign-extended imm)
//   jump    J, JAL (JAL writes pc + 4 to r31)
// The meanings of op 0, 8 and 12 and of func 0x21, 0x23 and 0x25 follow the
// specification; the remaining codes come from the standard MIPS encoding and
// are this design's choice, as is the link register of JAL and treating any
// other code as a no-op (illegal = 1, nothing written). In I-type
// instructions the register in bits 20:16 is the destination (loads and ALU
// immediates) or the store data source.
module control
  import mips_pkg::*;
(
  input  logic [31:0] inst,
  output ctrl_t       ctrl
);

  logic [5:0] op, func;
  logic [4:0] rs, rt, rd;
  assign op   = inst[31:26];
  assign rs   = inst[25:21];
  assign rt   = inst[20:16];
  assign rd   = inst[15:11];
  assign func = inst[5:0];

  always_comb begin
    // defaults: I-type register selects, nothing written
    ctrl          = '0;
    ctrl.ra       = rs;
    ctrl.rb       = rt;
    ctrl.rw       = rt;
    ctrl.we       = 1'b0;
    ctrl.alu_op   = ALU_ADD;
    ctrl.alu_src  = 1'b1;
    ctrl.ext_sign = 1'b1;
    ctrl.mc       = MC_READ;
    ctrl.ld       = LD_W;
    ctrl.wb_sel   = WB_ALU;
    ctrl.jump     = 1'b0;
    ctrl.illegal  = 1'b0;

    unique case (op)
      OP_RTYPE: begin
        ctrl.rw      = rd;
        ctrl.we      = 1'b1;
        ctrl.alu_src = 1'b0;
        unique case (func)
          FN_ADD, FN_ADDU:  ctrl.alu_op = ALU_ADD;
          FN_SUB:           ctrl.alu_op = ALU_SUB;
          FN_AND, FN_AND_S: ctrl.alu_op = ALU_AND;
          FN_NOR, FN_NOR_S: ctrl.alu_op = ALU_NOR;
          FN_SLL:           ctrl.alu_op = ALU_SLL;
          FN_SRL:           ctrl.alu_op = ALU_SRL;
          FN_SLT:           ctrl.alu_op = ALU_SLT;
          default: begin
            ctrl.we      = 1'b0;
            ctrl.illegal = 1'b1;
          end
        endcase
      end
      OP_ADDI, OP_ADDIU: ctrl.we = 1'b1;
      OP_ANDI: begin
        ctrl.we       = 1'b1;
        ctrl.alu_op   = ALU_AND;
        ctrl.ext_sign = 1'b0;
      end
      OP_ORI: begin
        ctrl.we       = 1'b1;
        ctrl.alu_op   = ALU_OR;
        ctrl.ext_sign = 1'b0;
      end
      OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW: begin
        ctrl.we     = 1'b1;
        ctrl.wb_sel = WB_MEM;
        unique case (op)
          OP_LB:   ctrl.ld = LD_B;
          OP_LBU:  ctrl.ld = LD_BU;
          OP_LH:   ctrl.ld = LD_H;
          OP_LHU:  ctrl.ld = LD_HU;
          default: ctrl.ld = LD_W;
        endcase
      end
      OP_SB: ctrl.mc = MC_BYTE;
      OP_SH: ctrl.mc = MC_HALF;
      OP_SW: ctrl.mc = MC_WORD;
      OP_J:  ctrl.jump = 1'b1;
      OP_JAL: begin
        ctrl.jump   = 1'b1;
        ctrl.we     = 1'b1;
        ctrl.rw     = 5'd31;
        ctrl.wb_sel = WB_LINK;
      end
      default: ctrl.illegal = 1'b1;
    endcase
  end

endmodule
