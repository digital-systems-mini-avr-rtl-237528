// status_register: the Z and C flags of the Mini AVR status register.
//
// A 2-bit register loaded from nx_sr on every rising clock edge; the ALU
// supplies nx_sr and copies the present value for instructions that do not
// change a flag, so no enable is needed. The other SREG flags (I T H S V N)
// are not kept. The synchronous active-high reset to Z = 0, C = 0 is this
// design's choice.
module status_register
  import avr_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  sreg_t nx_sr,
  output sreg_t pr_sr
);

  always_ff @(posedge clk) begin
    if (rst) pr_sr <= '0;
    else     pr_sr <= nx_sr;
  end

endmodule
