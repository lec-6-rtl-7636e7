// mips_cpu: single-cycle processor for a subset of the MIPS instruction set.
//
// Each clock cycle executes one whole instruction (Harvard organisation, with
// separate instruction and data memories):
//   1. fetch   - the pc addresses the instruction memory (mc tied to 00, read);
//   2. decode  - the control unit decodes the instruction; the register file
//                reads rs on port A and rt on port B;
//   3. execute - the ALU combines A with either B or the extended 16-bit
//                immediate (B mux);
//   4. memory  - the ALU result is the data memory address; stores write
//                port B's value with mc = byte/halfword/word;
//   5. write   - the ALU result, the (extended) load data or, for jal, pc + 4
//                is written to the register file on the falling clock edge;
//   6. new pc  - on the rising edge the pc takes pc + 4 or the jump target.
//
// Interface: clk, rst_n (asynchronous, active low; holds pc at 0 and clears
// the registers). While imem_load_en is high the instruction memory is taken
// away from the pc and imem_load_data is written as a word at imem_load_addr
// on each rising edge; this is how a program is put into the machine, and it
// is meant to be used while rst_n is low. The remaining ports only observe
// the machine: the current pc and instruction, the register write of this
// cycle, the data memory access of this cycle and a flag for an instruction
// the decoder does not know. The data memory can be preset through the
// hierarchy (u_dmem.mem) or by the program's own stores.
//
// The block structure (pc, new-pc calculation, instruction memory, control,
// register file, sign extend, B mux, ALU, data memory and write-back mux)
// follows the specification's datapath. The load-extension unit, the link
// path for jal, the program-loading port and the observation ports are this
// design's additions.
// Conditional branches are not implemented.
module mips_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH_LOG2 = 12,
  parameter int unsigned DMEM_DEPTH_LOG2 = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        imem_load_en,
  input  logic [31:0] imem_load_addr,
  input  logic [31:0] imem_load_data,
  output logic [31:0] pc_o,
  output logic [31:0] inst_o,
  output logic        rf_we_o,
  output logic [4:0]  rf_rw_o,
  output logic [31:0] rf_w_o,
  output logic [31:0] dmem_addr_o,
  output logic [31:0] dmem_wdata_o,
  output mem_ctl_e    dmem_mc_o,
  output logic        illegal_o
);

  logic [31:0] pc, pc_plus4, inst;
  ctrl_t       ctrl;
  logic [31:0] rf_a, rf_b, imm_ext, alu_b, alu_y;
  logic [31:0] dmem_rdata, load_val, wb_val;
  logic [31:0] imem_addr, imem_wdata;
  mem_ctl_e    imem_mc;

  // ------------------------------------------------------------ fetch
  pc_unit u_pc (
    .clk      (clk),
    .rst_n    (rst_n),
    .jump     (ctrl.jump),
    .target   (inst[25:0]),
    .pc       (pc),
    .pc_plus4 (pc_plus4)
  );

  // in normal operation the pc reads the instruction memory with mc = 00;
  // the loading port borrows it to write a program
  always_comb begin
    if (imem_load_en) begin
      imem_addr  = imem_load_addr;
      imem_wdata = imem_load_data;
      imem_mc    = MC_WORD;
    end else begin
      imem_addr  = pc;
      imem_wdata = '0;
      imem_mc    = MC_READ;
    end
  end

  memory #(.DEPTH_LOG2(IMEM_DEPTH_LOG2)) u_imem (
    .clk      (clk),
    .addr     (imem_addr),
    .data_in  (imem_wdata),
    .mc       (imem_mc),
    .data_out (inst)
  );

  // ----------------------------------------------------------- decode
  control u_ctrl (
    .inst (inst),
    .ctrl (ctrl)
  );

  regfile u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (ctrl.we),
    .rw    (ctrl.rw),
    .w     (wb_val),
    .ra    (ctrl.ra),
    .rb    (ctrl.rb),
    .a     (rf_a),
    .b     (rf_b)
  );

  sign_extend u_sext (
    .imm  (inst[15:0]),
    .sign (ctrl.ext_sign),
    .ext  (imm_ext)
  );

  // ---------------------------------------------------------- execute
  assign alu_b = ctrl.alu_src ? imm_ext : rf_b;

  alu u_alu (
    .a     (rf_a),
    .b     (alu_b),
    .shamt (inst[10:6]),
    .op    (ctrl.alu_op),
    .y     (alu_y)
  );

  // ----------------------------------------------------------- memory
  memory #(.DEPTH_LOG2(DMEM_DEPTH_LOG2)) u_dmem (
    .clk      (clk),
    .addr     (alu_y),
    .data_in  (rf_b),
    .mc       (ctrl.mc),
    .data_out (dmem_rdata)
  );

  load_extend u_ldx (
    .word  (dmem_rdata),
    .addr  (alu_y[1:0]),
    .ld    (ctrl.ld),
    .value (load_val)
  );

  // -------------------------------------------------------- write back
  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb_val = load_val;
      WB_LINK: wb_val = pc_plus4;
      default: wb_val = alu_y;
    endcase
  end

  // the loading port takes the instruction memory away from the fetch path,
  // so it may only be used while the processor is held in reset
  a_load_in_reset: assert property (@(posedge clk) imem_load_en |-> !rst_n)
    else $error("imem_load_en asserted while the processor runs");

  // ----------------------------------------------------- observation
  assign pc_o         = pc;
  assign inst_o       = inst;
  assign rf_we_o      = ctrl.we;
  assign rf_rw_o      = ctrl.rw;
  assign rf_w_o       = wb_val;
  assign dmem_addr_o  = alu_y;
  assign dmem_wdata_o = rf_b;
  assign dmem_mc_o    = ctrl.mc;
  assign illegal_o    = ctrl.illegal;

endmodule
