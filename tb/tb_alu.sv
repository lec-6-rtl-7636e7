// tb_alu: self-checking testbench for the ALU.
//
// Applies directed corner cases (carry out, signed overflow, shifts by 0 and
// 31) and random operands for every operation, and compares the result with
// a reference written with SystemVerilog's own operators.
module tb_alu;
  import mips_pkg::*;

  logic [31:0] a, b, y;
  logic [4:0]  shamt;
  alu_op_e     op;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .shamt, .op, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_alu(input logic [31:0] x, input logic [31:0] z,
                                          input logic [4:0] s, input alu_op_e o);
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_NOR: return ~(x | z);
      ALU_SLL: return z << s;
      ALU_SRL: return z >> s;
      ALU_SLT: return ($signed(x) < $signed(z)) ? 32'd1 : 32'd0;
      default: return 'x;
    endcase
  endfunction

  task automatic apply(input logic [31:0] x, input logic [31:0] z,
                       input logic [4:0] s, input alu_op_e o);
    logic [31:0] exp;
    a = x; b = z; shamt = s; op = o;
    #1;
    exp = ref_alu(x, z, s, o);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h shamt=%0d: got %h expected %h", o.name(), x, z, s, y, exp);
    end
  endtask

  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF,
                                          32'h7FFF_FFFF, 32'h8000_0000, 32'h8000_0001};

  initial begin
    for (int o = 0; o < 8; o++)
      foreach (CORNER[i])
        foreach (CORNER[j]) begin
          apply(CORNER[i], CORNER[j], 5'd0, alu_op_e'(o));
          apply(CORNER[i], CORNER[j], 5'd31, alu_op_e'(o));
        end
    for (int n = 0; n < 20000; n++)
      apply($urandom, $urandom, 5'($urandom), alu_op_e'($urandom % 8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
