// tb_regfile: self-checking testbench for the register file.
//
// Drives random writes and reads against a reference array, and checks that
// register 0 stays zero, that a write is invisible before the falling clock
// edge and visible right after it, that WE low blocks a write, and that reset
// clears every register.
module tb_regfile;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        we;
  logic [4:0]  rw, ra, rb;
  logic [31:0] w, a, b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst_n, .we, .rw, .w, .ra, .rb, .a, .b);

  always #5 clk = ~clk;

  initial begin
    #20000;
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
    we = 0; rw = 0; ra = 0; rb = 0; w = 0;
    foreach (model[i]) model[i] = '0;
    #12 rst_n = 1'b1;
    // reset cleared every register
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); #1;
      check(a, 32'h0, "reset A");
      check(b, 32'h0, "reset B");
    end
    // timing of one write: set up after a rising edge
    @(posedge clk); #1;
    we = 1; rw = 5'd7; w = 32'hCAFE_F00D; ra = 5'd7;
    #1 check(a, 32'h0, "before falling edge");
    @(negedge clk); #1;
    check(a, 32'hCAFE_F00D, "after falling edge");
    model[7] = 32'hCAFE_F00D;
    // write to r0 is discarded
    rw = 5'd0; w = 32'hFFFF_FFFF;
    @(negedge clk); #1;
    ra = 0; #1 check(a, 32'h0, "r0 stays zero");
    // WE low blocks the write
    we = 0; rw = 5'd7; w = 32'h1234_5678;
    @(negedge clk); #1;
    ra = 5'd7; #1 check(a, 32'hCAFE_F00D, "we low");
    // random traffic
    for (int n = 0; n < 400; n++) begin
      @(posedge clk); #1;
      we = 1'($urandom);
      rw = 5'($urandom);
      w  = $urandom;
      ra = 5'($urandom);
      rb = 5'($urandom);
      #1;
      check(a, model[ra], "random A");
      check(b, model[rb], "random B");
      @(negedge clk); #1;
      if (we && rw != 0) model[rw] = w;
      check(a, model[ra], "random A after write");
      check(b, model[rb], "random B after write");
    end
    // asynchronous reset clears again
    rst_n = 0; #1;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); #1 check(a, 32'h0, "second reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
