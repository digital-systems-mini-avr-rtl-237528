// program_counter: the 8-bit program counter register of the Mini AVR.
//
// Every rising clock edge the counter loads nx_pc. Normally nx_pc = pr_pc + 1
// (the incrementer drawn beside the PC register). When jump is high (an RJMP,
// or a BREQ whose condition holds) nx_pc = pr_pc + 1 + offset, the relative
// jump of the AVR instruction set; offset is a signed word count and the sum
// wraps modulo the program size. Every instruction therefore takes one
// cycle, jumps included: this single-cycle timing, and the synchronous
// active-high reset to address 0, are this design's choices.
module program_counter
  import avr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        jump,    // take the relative jump this cycle
  input  pc_t         offset,  // signed jump distance in words, mod 2^PC_W
  output pc_t         pr_pc
);

  pc_t nx_pc;

  always_comb begin
    nx_pc = pr_pc + pc_t'(1);
    if (jump) nx_pc = nx_pc + offset;
  end

  always_ff @(posedge clk) begin
    if (rst) pr_pc <= '0;
    else     pr_pc <= nx_pc;
  end

endmodule
