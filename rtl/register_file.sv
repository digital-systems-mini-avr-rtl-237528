// register_file: register bank r16..r31 of the Mini AVR (RegW).
//
// Sixteen 8-bit registers; index i holds r(16+i). Only the upper half of the
// AVR register file exists. One write port: on a rising clock edge with
// reg_we high, register d_reg takes nx_reg. Two combinational read ports:
// alu_in_a = regs[d_reg] and alu_in_b = regs[r_reg], so the destination
// register is also the first ALU operand, as in the two-operand AVR
// instructions. A read in the same cycle as a write returns the old value;
// the new one is visible after the edge. The synchronous reset clearing all
// registers to 0 is this design's choice (the reference bank has no reset).
module register_file
  import avr_pkg::*;
#(
  parameter int unsigned NREGS = 16
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   reg_we,
  input  raddr_t d_reg,
  input  raddr_t r_reg,
  input  data_t  nx_reg,
  output data_t  alu_in_a,
  output data_t  alu_in_b
);

  data_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (reg_we) begin
      regs[d_reg] <= nx_reg;
    end
  end

  assign alu_in_a = regs[d_reg];
  assign alu_in_b = regs[r_reg];

endmodule
