// tb_pc_unit: self-checking testbench for the program counter.
//
// Checks the reset value, one pc + 4 step per rising edge, the absolute jump
// target (upper 4 bits of pc, 26-bit target, 00) including a jump from a high
// region, and that pc_plus4 always equals pc + 4.
module tb_pc_unit;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        jump;
  logic [25:0] target;
  logic [31:0] pc, pc_plus4, exp_pc;
  int checks = 0, failures = 0;

  pc_unit dut (.clk, .rst_n, .jump, .target, .pc, .pc_plus4);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    jump = 0; target = '0;
    #12;
    check(pc, 32'h0, "reset");
    rst_n = 1;
    exp_pc = 32'h4;   // one rising edge (t=15) passes before the first check
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      check(pc, exp_pc, "pc");
      check(pc_plus4, exp_pc + 4, "pc_plus4");
      jump   = ($urandom % 4) == 0;
      target = 26'($urandom);
      exp_pc = jump ? {exp_pc[31:28], target, 2'b00} : exp_pc + 4;
    end
    // walk into the next 256 MiB region: jump to its last word, step once,
    // then jump again and check that the new upper 4 bits are kept
    @(negedge clk); jump = 1; target = 26'h3FF_FFFF;
    @(negedge clk); check(pc, 32'h0FFF_FFFC, "jump to region end");
    jump = 0;
    @(negedge clk); check(pc, 32'h1000_0000, "step into next region");
    jump = 1; target = 26'h000_0010;
    @(negedge clk); check(pc, 32'h1000_0040, "jump keeps upper 4 bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
