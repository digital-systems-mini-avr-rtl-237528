// tb_control: applies opcodes of every supported instruction, with random
// operand fields, to the decoder and compares each control output with the
// value expected from the instruction formats. Unsupported opcodes must
// decode as NOP (no write, no jump, flags kept).
module tb_control;
  import avr_pkg::*;

  opcode_t  op;
  logic     z;
  logic     reg_we, jump;
  out_mux_e out_mux;
  data_t    k;
  raddr_t   d_reg, r_reg;
  alu_op_e  alu_op;
  pc_t      offset;
  int checks = 0, failures = 0;

  control dut (.pr_op(op), .z, .reg_we, .out_mux, .k, .d_reg, .r_reg,
               .alu_op, .jump, .offset);

  task automatic expect_out(string name, logic we, out_mux_e m, alu_op_e a,
                            logic j, logic chk_k, logic chk_off,
                            data_t ek, pc_t eoff);
    checks++;
    if (reg_we !== we || out_mux !== m || alu_op !== a || jump !== j ||
        d_reg !== op[7:4] || r_reg !== op[3:0] ||
        (chk_k && k !== ek) || (chk_off && offset !== eoff)) begin
      failures++;
      $display("%s op=%h z=%b: we=%b mux=%0d alu=%0d jump=%b k=%h off=%h d=%h r=%h",
               name, op, z, reg_we, out_mux, alu_op, jump, k, offset, d_reg, r_reg);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t kk;
    logic [11:0] k12;
    logic [6:0]  k7;
    for (int i = 0; i < 200; i++) begin
      logic [3:0] d, r;
      d  = 4'($urandom);
      r  = 4'($urandom);
      z  = 1'($urandom);
      kk = 8'($urandom);
      // NOP
      op = 16'h0000; #1;
      expect_out("NOP", 0, MUX_ALU, ALU_PASS, 0, 0, 0, '0, '0);
      // LDI Rd,K : 1110 KKKK dddd KKKK
      op = {4'b1110, kk[7:4], d, kk[3:0]}; #1;
      expect_out("LDI", 1, MUX_K, ALU_PASS, 0, 1, 0, kk, '0);
      // ADC : 0001 11rd dddd rrrr
      op = {6'b000111, 1'b1, 1'b1, d, r}; #1;
      expect_out("ADC", 1, MUX_ALU, ALU_ADC, 0, 0, 0, '0, '0);
      // AND / EOR / OR / MOV : 0010 xxrd dddd rrrr
      op = {6'b001000, 2'b11, d, r}; #1;
      expect_out("AND", 1, MUX_ALU, ALU_AND, 0, 0, 0, '0, '0);
      op = {6'b001001, 2'b11, d, r}; #1;
      expect_out("EOR", 1, MUX_ALU, ALU_EOR, 0, 0, 0, '0, '0);
      op = {6'b001010, 2'b11, d, r}; #1;
      expect_out("OR", 1, MUX_ALU, ALU_OR, 0, 0, 0, '0, '0);
      op = {6'b001011, 2'b11, d, r}; #1;
      expect_out("MOV", 1, MUX_ALU, ALU_PASS, 0, 0, 0, '0, '0);
      // RJMP k : 1100 kkkk kkkk kkkk
      k12 = 12'($urandom);
      op = {4'b1100, k12}; #1;
      expect_out("RJMP", 0, MUX_ALU, ALU_PASS, 1, 0, 1, '0, k12[7:0]);
      // BREQ k : 1111 00kk kkkk k001, taken only when Z = 1
      k7 = 7'($urandom);
      op = {6'b111100, k7, 3'b001}; #1;
      expect_out("BREQ", 0, MUX_ALU, ALU_PASS, z, 0, 1, '0, {k7[6], k7});
      // BRNE (1111 01kk kkkk k001) is not part of the set: never jumps
      op = {6'b111101, k7, 3'b001}; #1;
      expect_out("BRNE", 0, MUX_ALU, ALU_PASS, 0, 0, 0, '0, '0);
      // an unsupported class (CPI, 0011) acts as NOP
      op = {4'b0011, 4'($urandom), d, r}; #1;
      expect_out("CPI", 0, MUX_ALU, ALU_PASS, 0, 0, 0, '0, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
