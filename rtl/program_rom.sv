// program_rom: combinational program memory of the Mini AVR.
//
// Given the present program counter pr_pc, the ROM returns the present
// opcode pr_op in the same cycle: there is no clock, the read is a pure
// function of the address. It holds DEPTH words of 16 bits (256 words for an
// 8-bit program counter).
//
// With INIT_FILE left empty the ROM holds the reference demonstration program
//   0x00 NOP              0000
//   0x01 LDI r16,0x83     E803
//   0x02 ADC r16,r16      1F00
//   0x03 ADC r16,r16      1F00   (0x06 + 0x06 + C=1 = 0x0D, C cleared)
//   0x04 MOV r17,r16      2F10
//   0x05 NOP              0000
// and NOP (0000) in every other word. Filling the unused words with NOP is
// this design's choice (they are "don't care" in the reference). With
// INIT_FILE naming a hex file (one 16-bit word per line, path relative to
// the simulator's working directory) the ROM is loaded from that file
// instead, so other programs can be run without editing the RTL.
module program_rom
  import avr_pkg::*;
#(
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = ""
) (
  input  pc_t     pr_pc,
  output opcode_t pr_op
);

  opcode_t mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = 16'h0000;
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      mem[1] = 16'hE803;  // LDI r16,0x83
      mem[2] = 16'h1F00;  // ADC r16,r16
      mem[3] = 16'h1F00;  // ADC r16,r16
      mem[4] = 16'h2F10;  // MOV r17,r16
    end
  end

  always_comb begin
    if (int'(pr_pc) < DEPTH) pr_op = mem[pr_pc];
    else                     pr_op = 16'h0000;
  end

endmodule
