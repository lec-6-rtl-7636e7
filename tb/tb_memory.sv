// tb_memory: self-checking testbench for the byte-addressed memory.
//
// Fills a small memory with words, then applies random reads and byte,
// halfword and word writes against a byte-array reference model (little
// endian) and checks data_out at every step, including that mc = 00 writes
// nothing and that addresses alias above the storage size.
module tb_memory;
  import mips_pkg::*;

  localparam int unsigned DL = 6;          // 64 words
  localparam int unsigned NB = 4 * (2**DL);

  logic        clk = 1'b0;
  logic [31:0] addr, data_in, data_out;
  mem_ctl_e    mc;
  logic [7:0]  model [NB];
  int checks = 0, failures = 0;

  memory #(.DEPTH_LOG2(DL)) dut (.clk, .addr, .data_in, .mc, .data_out);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] mword(input logic [31:0] ad);
    int base = int'({ad[DL+1:2], 2'b00});
    return {model[base+3], model[base+2], model[base+1], model[base]};
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%h: got %h expected %h", what, addr, got, exp);
    end
  endtask

  initial begin
    mc = MC_READ; addr = 0; data_in = 0;
    // fill with word writes
    for (int i = 0; i < 2**DL; i++) begin
      @(negedge clk);
      addr = 32'(4*i); data_in = $urandom; mc = MC_WORD;
      for (int k = 0; k < 4; k++) model[4*i+k] = data_in[8*k +: 8];
    end
    @(negedge clk); mc = MC_READ;
    for (int i = 0; i < 2**DL; i++) begin
      addr = 32'(4*i) | 32'($urandom % 4); #1;
      check(data_out, mword(addr), "fill read");
    end
    // random mix
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr    = $urandom;                       // full 32-bit address: aliases
      data_in = $urandom;
      mc      = mem_ctl_e'($urandom % 4);
      #1 check(data_out, mword(addr), "read before write");
      @(posedge clk); #1;
      unique case (mc)
        MC_READ: ;
        MC_BYTE: model[int'(addr[DL+1:0])] = data_in[7:0];
        MC_HALF: for (int k = 0; k < 2; k++)
                   model[int'({addr[DL+1:1], 1'b0}) + k] = data_in[8*k +: 8];
        MC_WORD: for (int k = 0; k < 4; k++)
                   model[int'({addr[DL+1:2], 2'b00}) + k] = data_in[8*k +: 8];
      endcase
      check(data_out, mword(addr), "read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
