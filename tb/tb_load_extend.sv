// tb_load_extend: self-checking testbench for the load-data extension unit.
//
// For random memory words and every byte offset it checks the five load
// kinds against a reference that extracts the little-endian byte or halfword
// and extends it as a signed or an unsigned integer.
module tb_load_extend;
  import mips_pkg::*;

  logic [31:0] word, value;
  logic [1:0]  addr;
  load_e       ld;
  int checks = 0, failures = 0;

  load_extend dut (.word, .addr, .ld, .value);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] exp);
    checks++;
    if (value !== exp) begin
      failures++;
      $display("FAIL %s word=%h addr=%0d: got %h expected %h", ld.name(), word, addr, value, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      word = (n == 0) ? 32'h80FF_7F01 : $urandom;
      for (int o = 0; o < 4; o++) begin
        byte     sb;
        shortint sh;
        addr = 2'(o);
        sb = byte'(word >> (8 * o));
        sh = shortint'(word >> (16 * (o / 2)));
        ld = LD_W;  #1 check(word);
        ld = LD_B;  #1 check(32'(int'(sb)));
        ld = LD_BU; #1 check(32'(int'(sb) & 255));
        ld = LD_H;  #1 check(32'(int'(sh)));
        ld = LD_HU; #1 check(32'(int'(sh) & 65535));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
