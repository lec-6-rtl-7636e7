// tb_mips_examples: runs the two small example programs the processor is
// described with, on the processor at its default parameters.
//
//   1. Array access, with r4 holding the address of int array[32]:
//        lw r3, 0(r4)     x = array[0]
//        lw r3, 16(r4)    x = array[4]
//        sw r3, 0(r4)     array[0] = x
//   2. The start of "for (i = 0; i < 10; ++i)":
//        li r2, 10 ; li r1, 0 ; slt r3, r1, r2
//      with li written as addi from r0. The loop's closing bne is a
//      conditional branch, which this processor does not implement, so the
//      program stops after the compare.
// The program is loaded through the loading port, the array is preset in the
// data memory, and the results are checked after each instruction against
// values worked out by hand. One instruction per clock is checked by counting
// the cycles up to the final self-jump.
module tb_mips_examples;
  import mips_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        imem_load_en = 1'b0;
  logic [31:0] imem_load_addr = '0, imem_load_data = '0;
  logic [31:0] pc_o, inst_o, rf_w_o, dmem_addr_o, dmem_wdata_o;
  logic        rf_we_o, illegal_o;
  logic [4:0]  rf_rw_o;
  mem_ctl_e    dmem_mc_o;

  mips_cpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam logic [31:0] ARRAY = 32'h0000_0200;   // address of array[0]

  // program, hand-assembled (op rs rd imm / 0 rs rt rd shamt func / op target)
  localparam int NPROG = 8;
  localparam logic [31:0] PROG [NPROG] = '{
    {6'h0D, 5'd0, 5'd4, ARRAY[15:0]},          // ori  r4, r0, 0x200
    {6'h23, 5'd4, 5'd3, 16'd0},                // lw   r3, 0(r4)
    {6'h23, 5'd4, 5'd3, 16'd16},               // lw   r3, 16(r4)
    {6'h2B, 5'd4, 5'd3, 16'd0},                // sw   r3, 0(r4)
    {6'h08, 5'd0, 5'd2, 16'd10},               // li   r2, 10
    {6'h08, 5'd0, 5'd1, 16'd0},                // li   r1, 0
    {6'h00, 5'd1, 5'd2, 5'd3, 5'd0, 6'h2A},    // slt  r3, r1, r2
    {6'h02, 26'd7}                             // j    to itself (word 7)
  };

  logic [31:0] array_init [32];

  initial begin
    int cycles;
    for (int i = 0; i < 32; i++) begin
      array_init[i] = 32'h1000_0000 + 32'(i * 3);
      dut.u_dmem.mem[ARRAY[13:2] + 12'(i)] = array_init[i];
    end
    foreach (PROG[i]) begin
      @(negedge clk);
      imem_load_en = 1'b1; imem_load_addr = 32'(4 * i); imem_load_data = PROG[i];
    end
    @(negedge clk);
    imem_load_en = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    cycles = 0;
    // after each instruction's falling edge, look at the register file
    while (pc_o != 32'd28) begin
      @(negedge clk); #1;
      unique case (pc_o)
        32'd0:  check(dut.u_rf.regs[4] == ARRAY, "r4 = &array[0]");
        32'd4:  check(dut.u_rf.regs[3] == array_init[0], "x = array[0]");
        32'd8:  check(dut.u_rf.regs[3] == array_init[4], "x = array[4]");
        32'd12: ;
        32'd16: check(dut.u_rf.regs[2] == 32'd10, "li r2, 10");
        32'd20: check(dut.u_rf.regs[1] == 32'd0, "li r1, 0");
        32'd24: check(dut.u_rf.regs[3] == 32'd1, "slt r3, r1, r2: 0 < 10");
        default: check(1'b0, $sformatf("unexpected pc %h", pc_o));
      endcase
      @(posedge clk); #1;
      cycles++;
      if (pc_o == 32'd16)
        check(dut.u_dmem.mem[ARRAY[13:2]] == array_init[4], "array[0] = x");
    end
    check(cycles == 7, $sformatf("7 instructions took %0d cycles", cycles));
    // the self-jump holds the pc
    repeat (3) @(posedge clk);
    #1 check(pc_o == 32'd28, "halt loop holds");
    for (int i = 1; i < 32; i++)
      check(dut.u_dmem.mem[ARRAY[13:2] + 12'(i)] == array_init[i], "rest of array untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
