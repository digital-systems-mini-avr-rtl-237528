// tb_program_rom: checks the combinational program ROM with its built-in
// demonstration program. Every address is applied; words 0..5 must hold
// NOP, LDI r16,0x83, ADC r16,r16 (twice), MOV r17,r16, NOP (opcodes worked
// out by hand from the instruction formats) and every other word NOP.
module tb_program_rom;
  import avr_pkg::*;

  pc_t     pc;
  opcode_t op;
  int checks = 0, failures = 0;

  program_rom dut (.pr_pc(pc), .pr_op(op));

  function automatic opcode_t expected(int a);
    case (a)
      1:       return {4'b1110, 4'h8, 4'h0, 4'h3};  // LDI r16,0x83
      2, 3:    return {4'b0001, 4'hF, 4'h0, 4'h0};  // ADC r16,r16
      4:       return {4'b0010, 4'hF, 4'h1, 4'h0};  // MOV r17,r16
      default: return 16'h0000;                     // NOP
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      pc = pc_t'(a);
      #1;
      checks++;
      if (op !== expected(a)) begin
        failures++;
        $display("ROM[%0d] = %h, expected %h", a, op, expected(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
