// regfile: the processor's register file.
//
// Thirty-two 32-bit registers with two combinational read ports and one
// write port. RA and RB select the registers driven on outputs A and B;
// register 0 always reads as zero. When WE is high, the value on W is written
// into the register selected by RW on the falling edge of clk, so a value
// produced in the first half of a single-cycle instruction is stored before
// the next rising edge. A write to register 0 is discarded.
//
// The register count and width, the hard-wired zero register, the port names
// and the falling-edge write all follow the specification. Reset is this
// design's addition: rst_n (asynchronous, active low) clears every register
// so that simulation starts from a known state.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    rw,
  input  logic [WIDTH-1:0] w,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  output logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] b
);

  // Register 0 is not stored; entries 1..NREGS-1 are.
  logic [WIDTH-1:0] regs [1:NREGS-1];

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < NREGS; i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= w;
    end
  end

  always_comb begin
    a = (ra == '0) ? '0 : regs[ra];
    b = (rb == '0) ? '0 : regs[rb];
  end

endmodule
