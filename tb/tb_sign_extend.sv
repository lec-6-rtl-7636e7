// tb_sign_extend: self-checking testbench for the immediate extender.
//
// Checks the examples 1 and -1, then every 16-bit value in both modes
// against an arithmetic reference (signed value or unsigned value as a
// 32-bit integer).
module tb_sign_extend;

  logic [15:0] imm;
  logic        sign;
  logic [31:0] ext;
  int checks = 0, failures = 0;

  sign_extend dut (.imm, .sign, .ext);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (ext !== exp) begin
      failures++;
      $display("FAIL %s imm=%h sign=%b: got %h expected %h", what, imm, sign, ext, exp);
    end
  endtask

  initial begin
    sign = 1; imm = 16'h0001; #1 check(32'h0000_0001, "+1");
    sign = 1; imm = 16'hFFFF; #1 check(32'hFFFF_FFFF, "-1");
    sign = 0; imm = 16'hFFFF; #1 check(32'h0000_FFFF, "zero-extend");
    for (int v = 0; v < 65536; v++) begin
      imm = 16'(v);
      sign = 1; #1 check(32'(int'($signed(imm))), "signed");
      sign = 0; #1 check(32'(v), "unsigned");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
