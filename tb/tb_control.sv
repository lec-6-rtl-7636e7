// tb_control: self-checking testbench for the instruction decoder.
//
// Builds one instruction of every implemented kind with random register
// fields and compares each field of the control word with the expected
// value from an independent table; also checks that unknown opcodes and
// function codes write nothing.
module tb_control;
  import mips_pkg::*;

  logic [31:0] inst;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  control dut (.inst, .ctrl);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected control word from a textual description
  task automatic expect_ctrl(input string what, input ctrl_t exp);
    #1;
    checks++;
    if (ctrl !== exp) begin
      failures++;
      $display("FAIL %s inst=%h", what, inst);
      $display("  got %p", ctrl);
      $display("  exp %p", exp);
    end
  endtask

  function automatic ctrl_t base(input logic [4:0] rs, input logic [4:0] rt);
    ctrl_t c = '0;
    c.ra = rs; c.rb = rt; c.rw = rt;
    c.alu_op = ALU_ADD; c.alu_src = 1; c.ext_sign = 1;
    c.mc = MC_READ; c.ld = LD_W; c.wb_sel = WB_ALU;
    return c;
  endfunction

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [4:0]  rs, rt, rd, sh;
      logic [15:0] imm;
      ctrl_t       e;
      rs = 5'($urandom); rt = 5'($urandom); rd = 5'($urandom); sh = 5'($urandom);
      imm = 16'($urandom);

      // R-type
      begin
        logic [5:0] fns [10] = '{6'h00, 6'h02, 6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h27, 6'h2A};
        alu_op_e    ops [10] = '{ALU_SLL, ALU_SRL, ALU_ADD, ALU_ADD, ALU_SUB, ALU_AND, ALU_AND,
                                 ALU_NOR, ALU_NOR, ALU_SLT};
        for (int k = 0; k < 10; k++) begin
          inst = {6'h00, rs, rt, rd, sh, fns[k]};
          e = base(rs, rt); e.rw = rd; e.we = 1; e.alu_src = 0; e.alu_op = ops[k];
          expect_ctrl($sformatf("R func %h", fns[k]), e);
        end
        inst = {6'h00, rs, rt, rd, sh, 6'h3F};
        e = base(rs, rt); e.rw = rd; e.alu_src = 0; e.illegal = 1;
        expect_ctrl("R unknown func", e);
      end
      // ALU immediates
      inst = {6'd8, rs, rt, imm};  e = base(rs, rt); e.we = 1; expect_ctrl("ADDI", e);
      inst = {6'd9, rs, rt, imm};  e = base(rs, rt); e.we = 1; expect_ctrl("ADDIU", e);
      inst = {6'd12, rs, rt, imm}; e = base(rs, rt); e.we = 1; e.alu_op = ALU_AND; e.ext_sign = 0;
      expect_ctrl("ANDI", e);
      inst = {6'd13, rs, rt, imm}; e = base(rs, rt); e.we = 1; e.alu_op = ALU_OR; e.ext_sign = 0;
      expect_ctrl("ORI", e);
      // loads
      inst = {6'h20, rs, rt, imm}; e = base(rs, rt); e.we = 1; e.wb_sel = WB_MEM; e.ld = LD_B;  expect_ctrl("LB", e);
      inst = {6'h24, rs, rt, imm}; e = base(rs, rt); e.we = 1; e.wb_sel = WB_MEM; e.ld = LD_BU; expect_ctrl("LBU", e);
      inst = {6'h21, rs, rt, imm}; e = base(rs, rt); e.we = 1; e.wb_sel = WB_MEM; e.ld = LD_H;  expect_ctrl("LH", e);
      inst = {6'h25, rs, rt, imm}; e = base(rs, rt); e.we = 1; e.wb_sel = WB_MEM; e.ld = LD_HU; expect_ctrl("LHU", e);
      inst = {6'h23, rs, rt, imm}; e = base(rs, rt); e.we = 1; e.wb_sel = WB_MEM; e.ld = LD_W;  expect_ctrl("LW", e);
      // stores
      inst = {6'h28, rs, rt, imm}; e = base(rs, rt); e.mc = MC_BYTE; expect_ctrl("SB", e);
      inst = {6'h29, rs, rt, imm}; e = base(rs, rt); e.mc = MC_HALF; expect_ctrl("SH", e);
      inst = {6'h2B, rs, rt, imm}; e = base(rs, rt); e.mc = MC_WORD; expect_ctrl("SW", e);
      // jumps
      inst = {6'h02, rs, rt, imm}; e = base(rs, rt); e.jump = 1; expect_ctrl("J", e);
      inst = {6'h03, rs, rt, imm}; e = base(rs, rt); e.jump = 1; e.we = 1; e.rw = 5'd31;
      e.wb_sel = WB_LINK; expect_ctrl("JAL", e);
      // unknown opcode
      inst = {6'h3F, rs, rt, imm}; e = base(rs, rt); e.illegal = 1; expect_ctrl("unknown op", e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
