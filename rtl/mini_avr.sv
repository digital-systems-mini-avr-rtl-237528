// mini_avr: a small single-cycle, AVR-compatible 8-bit microcontroller core.
//
// Harvard organisation: the program sits in its own combinational ROM, and
// the only data storage is the register bank r16..r31. Each clock cycle one
// instruction is fetched, decoded, executed and written back:
//   pr_pc -> program_rom -> pr_op -> control -> {d_reg, r_reg, k, alu_op,
//   out_mux, reg_we, jump}
//   register_file read ports -> alu_in_a/alu_in_b -> alu -> alu_out, nx_sr
//   out_mux picks nx_reg = alu_out or k; on the clock edge the register
//   file writes nx_reg to d_reg (when reg_we), the status register takes
//   nx_sr and the program counter takes nx_pc.
// Instructions: NOP, LDI, ADC, MOV, AND, OR, EOR, RJMP, BREQ. Flags: Z, C.
//
// The block structure, signal names and widths follow the reference datapath.
// The PC adder for RJMP/BREQ (the datapath drawing shows only +1), the
// observation ports and the synchronous active-high reset are this design's
// additions. The core has no I/O ports of its own, so the present PC, opcode,
// flags and the register write-back bus are brought out for observation.
//
// Timing: after rst is released the instruction at address 0 executes in
// the first cycle; every instruction takes exactly one cycle.
module mini_avr
  import avr_pkg::*;
#(
  parameter int unsigned ROM_DEPTH = 256,
  parameter string       ROM_FILE  = ""
) (
  input  logic    clk,
  input  logic    rst,
  output pc_t     pc_o,       // present program counter
  output opcode_t op_o,       // present opcode
  output sreg_t   sr_o,       // present Z/C flags
  output logic    reg_we_o,   // write-back this cycle
  output raddr_t  d_reg_o,    // destination register index (r16 = 0)
  output data_t   nx_reg_o    // value written back
);

  pc_t         pr_pc;
  opcode_t     pr_op;
  sreg_t       pr_sr, nx_sr;
  logic        reg_we;
  out_mux_e    out_mux;
  data_t       k;
  raddr_t      d_reg, r_reg;
  alu_op_e     alu_op;
  logic        jump;
  pc_t         offset;
  data_t       alu_in_a, alu_in_b, alu_out, nx_reg;

  program_counter u_pc (
    .clk    (clk),
    .rst    (rst),
    .jump   (jump),
    .offset (offset),
    .pr_pc  (pr_pc)
  );

  program_rom #(
    .DEPTH     (ROM_DEPTH),
    .INIT_FILE (ROM_FILE)
  ) u_rom (
    .pr_pc (pr_pc),
    .pr_op (pr_op)
  );

  control u_control (
    .pr_op   (pr_op),
    .z       (pr_sr.z),
    .reg_we  (reg_we),
    .out_mux (out_mux),
    .k       (k),
    .d_reg   (d_reg),
    .r_reg   (r_reg),
    .alu_op  (alu_op),
    .jump    (jump),
    .offset  (offset)
  );

  register_file u_regs (
    .clk      (clk),
    .rst      (rst),
    .reg_we   (reg_we),
    .d_reg    (d_reg),
    .r_reg    (r_reg),
    .nx_reg   (nx_reg),
    .alu_in_a (alu_in_a),
    .alu_in_b (alu_in_b)
  );

  alu u_alu (
    .alu_op   (alu_op),
    .alu_in_a (alu_in_a),
    .alu_in_b (alu_in_b),
    .pr_sr    (pr_sr),
    .alu_out  (alu_out),
    .nx_sr    (nx_sr)
  );

  status_register u_sr (
    .clk   (clk),
    .rst   (rst),
    .nx_sr (nx_sr),
    .pr_sr (pr_sr)
  );

  // out_mux: register write data is the ALU result or the LDI immediate.
  assign nx_reg = (out_mux == MUX_K) ? k : alu_out;

  assign pc_o     = pr_pc;
  assign op_o     = pr_op;
  assign sr_o     = pr_sr;
  assign reg_we_o = reg_we;
  assign d_reg_o  = d_reg;
  assign nx_reg_o = nx_reg;

endmodule
