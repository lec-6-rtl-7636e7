// mips_pkg: types and constants shared by the single-cycle MIPS-subset
// processor.
//
// Instruction fields follow the three 32-bit formats of the processor:
//   R-type  op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] func[5:0]
//   I-type  op[31:26] rs[25:21] rd[20:16] immediate[15:0]
//   J-type  op[31:26] target[25:0]
// The opcode values 0 (R-type), 8 (ADDI) and 12 (ANDI) and the function
// codes 0x21, 0x23 and 0x25 are the ones the processor is specified with.
// All other codes are taken from the standard MIPS encoding and are this
// design's choice. Note that function codes 0x23 and 0x25 are specified here
// as AND and NOR (not the standard MIPS SUBU and OR); this design follows
// that specification, so an R-type OR has no code and OR is reached
// through ORI only.
package mips_pkg;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_JAL   = 6'h03,
    OP_ADDI  = 6'h08,   // specified: op == 8
    OP_ADDIU = 6'h09,
    OP_ANDI  = 6'h0C,   // specified: op == 12
    OP_ORI   = 6'h0D,
    OP_LB    = 6'h20,
    OP_LH    = 6'h21,
    OP_LW    = 6'h23,
    OP_LBU   = 6'h24,
    OP_LHU   = 6'h25,
    OP_SB    = 6'h28,
    OP_SH    = 6'h29,
    OP_SW    = 6'h2B
  } opcode_e;

  // ------------------------------------------------------ R-type functions
  typedef enum logic [5:0] {
    FN_SLL   = 6'h00,
    FN_SRL   = 6'h02,
    FN_ADD   = 6'h20,
    FN_ADDU  = 6'h21,   // specified: R[rd] = R[rs] + R[rt]
    FN_SUB   = 6'h22,
    FN_AND_S = 6'h23,   // specified: R[rd] = R[rs] & R[rt]
    FN_AND   = 6'h24,
    FN_NOR_S = 6'h25,   // specified: R[rd] = ~(R[rs] | R[rt])
    FN_NOR   = 6'h27,
    FN_SLT   = 6'h2A
  } func_e;

  // ------------------------------------------------------- ALU operations
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_NOR = 3'd4,
    ALU_SLL = 3'd5,
    ALU_SRL = 3'd6,
    ALU_SLT = 3'd7
  } alu_op_e;

  // ------------------------------------------- memory control input (mc)
  typedef enum logic [1:0] {
    MC_READ  = 2'b00,
    MC_BYTE  = 2'b01,
    MC_HALF  = 2'b10,
    MC_WORD  = 2'b11
  } mem_ctl_e;

  // ----------------------------------------------------- load data size
  typedef enum logic [2:0] {
    LD_W  = 3'd0,
    LD_B  = 3'd1,
    LD_BU = 3'd2,
    LD_H  = 3'd3,
    LD_HU = 3'd4
  } load_e;

  // ------------------------------------------------- write-back source
  typedef enum logic [1:0] {
    WB_ALU  = 2'd0,
    WB_MEM  = 2'd1,
    WB_LINK = 2'd2
  } wb_sel_e;

  // ---------------------------------------------- decoded control word
  typedef struct packed {
    logic [4:0] ra;        // register read port A select (rs)
    logic [4:0] rb;        // register read port B select (rt / rd of I-type)
    logic [4:0] rw;        // register write select
    logic       we;        // register write enable
    alu_op_e    alu_op;
    logic       alu_src;   // 0: B from register file, 1: extended immediate
    logic       ext_sign;  // 1: sign-extend immediate, 0: zero-extend
    mem_ctl_e   mc;        // data memory control
    load_e      ld;        // load size / signedness
    wb_sel_e    wb_sel;
    logic       jump;      // absolute jump (j, jal)
    logic       illegal;   // opcode/function not implemented
  } ctrl_t;

endpackage
