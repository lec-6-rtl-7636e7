// tb_mips_cpu: end-to-end testbench for the single-cycle processor.
//
// The testbench assembles a program into the instruction memory: a directed
// part that uses every implemented instruction with chosen operands (negative
// immediates, sign- and zero-extended loads, stores of every size, writes to
// r0, j and jal, an unknown opcode), followed by a long random part, and a
// final "j to itself" that stops the run. The data memory is filled with
// random words. An instruction-level reference model, written independently
// of the RTL, runs the same program: every cycle the testbench compares the
// processor's pc, its register write and its data memory write with the
// model, and at the end it compares the whole register file and data memory.
// Single-cycle timing is checked too: one instruction retires per clock, so
// the run must take exactly as many cycles as the model executes
// instructions. The processor runs with its default parameters.
module tb_mips_cpu;
  import mips_pkg::*;

  localparam int unsigned DDEPTH = 2**12;   // default data memory words
  localparam int unsigned N_RANDOM = 3000;  // random instructions
  localparam logic [4:0]  BASE = 5'd29;     // data pointer register

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [31:0] pc_o, inst_o, rf_w_o, dmem_addr_o, dmem_wdata_o;
  logic        rf_we_o, illegal_o;
  logic        imem_load_en = 1'b0;
  logic [31:0] imem_load_addr = '0, imem_load_data = '0;
  logic [4:0]  rf_rw_o;
  mem_ctl_e    dmem_mc_o;

  mips_cpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @pc=%h: %s", pc_o, what);
    end
  endtask

  // ------------------------------------------------------------ assembler
  function automatic logic [31:0] rtype(input logic [5:0] fn, input logic [4:0] rd,
                                        input logic [4:0] rs, input logic [4:0] rt,
                                        input logic [4:0] sh = 5'd0);
    return {6'h00, rs, rt, rd, sh, fn};
  endfunction
  function automatic logic [31:0] itype(input logic [5:0] op, input logic [4:0] rd,
                                        input logic [4:0] rs, input logic [15:0] imm);
    return {op, rs, rd, imm};
  endfunction
  function automatic logic [31:0] jtype(input logic [5:0] op, input logic [31:0] dest);
    return {op, dest[27:2]};
  endfunction

  logic [31:0] prog [$];
  function automatic logic [31:0] here();
    return 32'(4 * prog.size());
  endfunction

  // ------------------------------------------------------ reference model
  logic [31:0] m_regs [32];
  logic [31:0] m_mem  [DDEPTH];
  logic [31:0] m_pc;
  int          m_count = 0;

  // mechanism counters
  int n_rtype = 0, n_imm = 0, n_load = 0, n_store_b = 0, n_store_h = 0, n_store_w = 0;
  int n_jump = 0, n_jal = 0, n_r0_write = 0, n_neg_ext = 0, n_zero_ext = 0, n_illegal = 0;
  int n_alias = 0;

  function automatic logic [31:0] m_read(input logic [31:0] ad);
    return m_mem[ad[13:2]];
  endfunction

  // One instruction of the model. Returns the expected register write and
  // data memory write so that the caller can compare them with the RTL.
  task automatic m_step(input logic [31:0] ins,
                        output logic wen, output logic [4:0] wr, output logic [31:0] wv,
                        output logic [1:0] sk, output logic [31:0] sa, output logic [31:0] sd);
    logic [5:0]  op, fn;
    logic [4:0]  rs, rt, rd, sh;
    logic [31:0] x, z, simm, zimm, ea, wd;
    op = ins[31:26]; rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
    sh = ins[10:6];  fn = ins[5:0];
    x = m_regs[rs]; z = m_regs[rt];
    simm = {{16{ins[15]}}, ins[15:0]};
    zimm = {16'h0, ins[15:0]};
    ea = x + simm;
    wen = 0; wr = 0; wv = 0; sk = 0; sa = ea; sd = z;
    m_pc = m_pc + 4;
    case (op)
      6'h00: begin
        wen = 1; wr = rd;
        case (fn)
          6'h00: wv = z << sh;
          6'h02: wv = z >> sh;
          6'h20, 6'h21: wv = x + z;
          6'h22: wv = x - z;
          6'h23, 6'h24: wv = x & z;
          6'h25, 6'h27: wv = ~(x | z);
          6'h2A: wv = ($signed(x) < $signed(z)) ? 1 : 0;
          default: begin wen = 0; n_illegal++; end
        endcase
        if (wen) n_rtype++;
      end
      6'h08, 6'h09: begin wen = 1; wr = rt; wv = x + simm; n_imm++; if (ins[15]) n_neg_ext++; end
      6'h0C: begin wen = 1; wr = rt; wv = x & zimm; n_imm++; if (ins[15]) n_zero_ext++; end
      6'h0D: begin wen = 1; wr = rt; wv = x | zimm; n_imm++; if (ins[15]) n_zero_ext++; end
      6'h20, 6'h24: begin
        logic [7:0] bv;
        wd = m_read(ea); bv = wd[8*ea[1:0] +: 8];
        wen = 1; wr = rt; n_load++;
        wv = (op == 6'h20) ? {{24{bv[7]}}, bv} : {24'h0, bv};
        if (bv[7]) begin if (op == 6'h20) n_neg_ext++; else n_zero_ext++; end
      end
      6'h21, 6'h25: begin
        logic [15:0] hv;
        wd = m_read(ea); hv = ea[1] ? wd[31:16] : wd[15:0];
        wen = 1; wr = rt; n_load++;
        wv = (op == 6'h21) ? {{16{hv[15]}}, hv} : {16'h0, hv};
        if (hv[15]) begin if (op == 6'h21) n_neg_ext++; else n_zero_ext++; end
      end
      6'h23: begin wen = 1; wr = rt; wv = m_read(ea); n_load++; end
      6'h28: begin sk = 1; wd = m_read(ea); wd[8*ea[1:0] +: 8] = z[7:0];
                   m_mem[ea[13:2]] = wd; n_store_b++; if (ea[31:14] != 0) n_alias++; end
      6'h29: begin sk = 2; wd = m_read(ea);
                   if (ea[1]) wd[31:16] = z[15:0]; else wd[15:0] = z[15:0];
                   m_mem[ea[13:2]] = wd; n_store_h++; end
      6'h2B: begin sk = 3; m_mem[ea[13:2]] = z; n_store_w++; end
      6'h02: begin m_pc = {m_pc[31:28] & 4'hF, ins[25:0], 2'b00}; n_jump++; end
      6'h03: begin wen = 1; wr = 31; wv = m_pc; m_pc = {m_pc[31:28], ins[25:0], 2'b00}; n_jal++; end
      default: n_illegal++;
    endcase
    if (wen && wr == 0) begin n_r0_write++; end
    if (wen && wr != 0) m_regs[wr] = wv;
    m_count++;
  endtask

  // --------------------------------------------------------- program
  task automatic build_program();
    logic [31:0] halt;
    // directed part
    prog.push_back(itype(6'h0D, BASE, 0, 16'h0100));          // ori  r29, r0, 0x100
    prog.push_back(itype(6'h08, 5'd2, 0, 16'd10));            // addi r2, r0, 10   (li r2, 10)
    prog.push_back(itype(6'h08, 5'd1, 0, 16'd0));             // addi r1, r0, 0    (li r1, 0)
    prog.push_back(rtype(6'h2A, 5'd3, 5'd1, 5'd2));           // slt  r3, r1, r2
    prog.push_back(itype(6'h08, 5'd4, 0, 16'hFFFF));          // addi r4, r0, -1
    prog.push_back(itype(6'h09, 5'd5, 5'd4, 16'h8000));       // addiu r5, r4, -32768
    prog.push_back(itype(6'h0C, 5'd6, 5'd4, 16'hF0F0));       // andi r6, r4, 0xF0F0 (zero-ext)
    prog.push_back(itype(6'h0D, 5'd7, 5'd3, 16'h8001));       // ori  r7, r3, 0x8001 (zero-ext)
    prog.push_back(rtype(6'h21, 5'd8, 5'd2, 5'd4));           // addu r8, r2, r4
    prog.push_back(rtype(6'h20, 5'd9, 5'd5, 5'd5));           // add  r9, r5, r5
    prog.push_back(rtype(6'h22, 5'd10, 5'd1, 5'd2));          // sub  r10, r1, r2
    prog.push_back(rtype(6'h23, 5'd11, 5'd4, 5'd6));          // func 0x23: and
    prog.push_back(rtype(6'h25, 5'd12, 5'd6, 5'd7));          // func 0x25: nor
    prog.push_back(rtype(6'h24, 5'd13, 5'd7, 5'd4));          // and
    prog.push_back(rtype(6'h27, 5'd14, 5'd0, 5'd0));          // nor  r14, r0, r0
    prog.push_back(rtype(6'h00, 5'd15, 0, 5'd2, 5'd28));      // sll  r15, r2, 28
    prog.push_back(rtype(6'h02, 5'd16, 0, 5'd4, 5'd4));       // srl  r16, r4, 4
    prog.push_back(rtype(6'h2A, 5'd17, 5'd4, 5'd2));          // slt  r17, -1, 10 -> 1
    prog.push_back(itype(6'h08, 5'd0, 5'd2, 16'd5));          // addi r0, r2, 5   (discarded)
    prog.push_back(rtype(6'h21, 5'd0, 5'd2, 5'd2));           // addu r0 ...      (discarded)
    prog.push_back(itype(6'h2B, 5'd15, BASE, 16'd0));         // sw   r15, 0(r29)
    prog.push_back(itype(6'h29, 5'd4, BASE, 16'd6));          // sh   r4, 6(r29)
    prog.push_back(itype(6'h28, 5'd7, BASE, 16'd9));          // sb   r7, 9(r29)
    prog.push_back(itype(6'h23, 5'd18, BASE, 16'd0));         // lw   r18, 0(r29)
    prog.push_back(itype(6'h21, 5'd19, BASE, 16'd6));         // lh   r19, 6(r29)
    prog.push_back(itype(6'h25, 5'd20, BASE, 16'd6));         // lhu  r20, 6(r29)
    prog.push_back(itype(6'h20, 5'd21, BASE, 16'd9));         // lb   r21, 9(r29)
    prog.push_back(itype(6'h24, 5'd22, BASE, 16'd9));         // lbu  r22, 9(r29)
    prog.push_back(itype(6'h23, 5'd23, BASE, 16'hFFFC));      // lw   r23, -4(r29)
    prog.push_back(itype(6'h28, 5'd2, 5'd15, 16'd3));         // sb   to 0xA0000003 (aliases)
    prog.push_back(jtype(6'h02, here() + 12));                // j    over two words
    prog.push_back(itype(6'h08, 5'd1, 0, 16'h0BAD));          //  (skipped)
    prog.push_back(itype(6'h08, 5'd2, 0, 16'h0BAD));          //  (skipped)
    prog.push_back(jtype(6'h03, here() + 8));                 // jal  over one word, r31 = pc+4
    prog.push_back(itype(6'h08, 5'd3, 0, 16'h0BAD));          //  (skipped)
    prog.push_back(32'hFC00_0000);                            // unknown opcode: no-op
    directed_end = here();
    // random part
    for (int n = 0; n < N_RANDOM; n++) begin
      logic [4:0] rd, rs, rt, sh;
      int kind;
      rd = 5'($urandom); rs = 5'($urandom); rt = 5'($urandom); sh = 5'($urandom);
      if (rd == BASE) rd = 5'd0;
      kind = $urandom % 100;
      if (kind < 35) begin
        logic [5:0] fns [10] = '{6'h00, 6'h02, 6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h27, 6'h2A};
        prog.push_back(rtype(fns[$urandom % 10], rd, rs, rt, sh));
      end else if (kind < 60) begin
        logic [5:0] ops [4] = '{6'h08, 6'h09, 6'h0C, 6'h0D};
        prog.push_back(itype(ops[$urandom % 4], rd, rs, 16'($urandom)));
      end else if (kind < 78) begin
        logic [5:0] ops [5] = '{6'h20, 6'h24, 6'h21, 6'h25, 6'h23};
        int k = $urandom % 5;
        logic [15:0] off = 16'($urandom % 1024);
        if (k >= 2) off[0] = 1'b0;
        if (k == 4) off[1] = 1'b0;
        prog.push_back(itype(ops[k], rd, BASE, off));
      end else if (kind < 94) begin
        logic [5:0] ops [3] = '{6'h28, 6'h29, 6'h2B};
        int k = $urandom % 3;
        logic [15:0] off = 16'($urandom % 1024);
        if (k >= 1) off[0] = 1'b0;
        if (k == 2) off[1] = 1'b0;
        prog.push_back(itype(ops[k], rt, BASE, off));
      end else if (kind < 97) begin
        prog.push_back(jtype(6'h02, here() + 8));
        prog.push_back(rtype(6'h21, 5'd1, 5'd1, 5'd1));       // skipped
      end else begin
        prog.push_back(jtype(6'h03, here() + 8));
        prog.push_back(rtype(6'h21, 5'd2, 5'd2, 5'd2));       // skipped
      end
    end
    halt = here();
    prog.push_back(jtype(6'h02, halt));                       // j halt
  endtask

  // ----------------------------------------------------------- run
  logic [31:0] halt_pc;
  logic [31:0] directed_end;

  // results of the directed part, worked out by hand, read from the
  // processor's register file when the random part begins
  task automatic check_directed();
    logic [31:0] r [32];
    for (int i = 1; i < 32; i++) r[i] = dut.u_rf.regs[i];
    check(r[29] == 32'h0000_0100, "ori r29");
    check(r[3]  == 32'd1,         "slt 0 < 10");
    check(r[4]  == 32'hFFFF_FFFF, "addi -1");
    check(r[5]  == 32'hFFFF_7FFF, "addiu sign-extends");
    check(r[6]  == 32'h0000_F0F0, "andi zero-extends");
    check(r[7]  == 32'h0000_8001, "ori zero-extends");
    check(r[8]  == 32'd9,         "addu 10 + -1");
    check(r[9]  == 32'hFFFE_FFFE, "add wraps");
    check(r[10] == 32'hFFFF_FFF6, "sub 0 - 10");
    check(r[11] == 32'h0000_F0F0, "func 0x23 is and");
    check(r[12] == 32'hFFFF_0F0E, "func 0x25 is nor");
    check(r[13] == 32'h0000_8001, "and");
    check(r[14] == 32'hFFFF_FFFF, "nor r0, r0");
    check(r[15] == 32'hA000_0000, "sll 28");
    check(r[16] == 32'h0FFF_FFFF, "srl 4");
    check(r[17] == 32'd1,         "slt -1 < 10 (signed)");
    check(r[18] == 32'hA000_0000, "lw after sw");
    check(r[19] == 32'hFFFF_FFFF, "lh sign-extends");
    check(r[20] == 32'h0000_FFFF, "lhu zero-extends");
    check(r[21] == 32'h0000_0001, "lb of 0x01");
    check(r[22] == 32'h0000_0001, "lbu of 0x01");
    check(r[1]  == 32'd0 && r[2] == 32'd10, "skipped words not executed");
    check(r[31] == 32'h0000_0088, "jal links pc + 4");
  endtask

  initial begin
    logic        e_we;
    logic [4:0]  e_rw;
    logic [31:0] e_w, e_sa, e_sd;
    logic [1:0]  e_sk;
    bit          seen_halt;

    build_program();
    halt_pc = 32'(4 * (prog.size() - 1));
    for (int i = 0; i < DDEPTH; i++) begin
      m_mem[i] = $urandom;
      dut.u_dmem.mem[i] = m_mem[i];
    end
    foreach (m_regs[i]) m_regs[i] = '0;
    m_pc = 0;

    // load the program through the loading port while reset is held
    foreach (prog[i]) begin
      @(negedge clk);
      imem_load_en   = 1'b1;
      imem_load_addr = 32'(4 * i);
      imem_load_data = prog[i];
    end
    @(negedge clk);
    imem_load_en = 1'b0;
    // the program words read back through the fetch path's memory
    foreach (prog[i]) check(dut.u_imem.mem[i] == prog[i], "program loaded");

    // reset is held through falling edges and released just after a rising
    // edge, so the first instruction gets its falling edge for the register
    // write before the next rising edge
    @(posedge clk);
    #1 rst_n = 1'b1;
    check(pc_o == 32'h0, "pc starts at 0");
    seen_halt = 0;
    #1;
    while (!seen_halt) begin
      // sampled between the rising edge that started this instruction and
      // the falling edge that writes its register
      if (pc_o == directed_end) check_directed();
      if (pc_o == halt_pc) begin
        seen_halt = 1;
      end else begin
        check(pc_o == m_pc, $sformatf("pc %h expected %h", pc_o, m_pc));
        m_step(inst_o, e_we, e_rw, e_w, e_sk, e_sa, e_sd);
        check(rf_we_o == e_we && (!e_we || (rf_rw_o == e_rw && (e_rw == 0 || rf_w_o == e_w))),
              $sformatf("reg write %b r%0d=%h expected %b r%0d=%h",
                        rf_we_o, rf_rw_o, rf_w_o, e_we, e_rw, e_w));
        check(dmem_mc_o == mem_ctl_e'(e_sk) &&
              (e_sk == 0 || (dmem_addr_o == e_sa && dmem_wdata_o == e_sd)),
              $sformatf("store mc=%0d @%h=%h expected mc=%0d @%h=%h",
                        dmem_mc_o, dmem_addr_o, dmem_wdata_o, e_sk, e_sa, e_sd));
        check(illegal_o == (inst_o[31:26] == 6'h3F), "illegal flag");
        cycles++;
        @(posedge clk);
        #1;
      end
    end
    // the halt jump must have been reached by the model too
    check(m_pc == halt_pc, "model reached halt");
    // one instruction per clock
    check(cycles == m_count, $sformatf("%0d cycles for %0d instructions", cycles, m_count));
    // final state
    @(posedge clk); #1;
    for (int r = 1; r < 32; r++)
      check(dut.u_rf.regs[r] == m_regs[r], $sformatf("final r%0d", r));
    for (int i = 0; i < DDEPTH; i++)
      check(dut.u_dmem.mem[i] == m_mem[i], $sformatf("final mem[%0d]", i));

    // every mechanism happened
    check(n_rtype > 0,    "R-type ALU executed");
    check(n_imm > 0,      "ALU immediate executed");
    check(n_load > 0,     "load executed");
    check(n_store_b > 0,  "store byte executed");
    check(n_store_h > 0,  "store halfword executed");
    check(n_store_w > 0,  "store word executed");
    check(n_jump > 0,     "jump taken");
    check(n_jal > 0,      "jal link written");
    check(n_r0_write > 0, "write to r0 discarded");
    check(n_neg_ext > 0,  "sign extension of a negative value");
    check(n_zero_ext > 0, "zero extension of a value with bit 15/7 set");
    check(n_illegal > 0,  "unknown instruction as no-op");
    check(n_alias > 0,    "address above memory size");
    $display("mechanisms: rtype=%0d imm=%0d load=%0d sb=%0d sh=%0d sw=%0d j=%0d jal=%0d r0=%0d sext=%0d zext=%0d illegal=%0d alias=%0d",
             n_rtype, n_imm, n_load, n_store_b, n_store_h, n_store_w, n_jump, n_jal,
             n_r0_write, n_neg_ext, n_zero_ext, n_illegal, n_alias);
    $display("instructions=%0d cycles=%0d", m_count, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
