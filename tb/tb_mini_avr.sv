// tb_mini_avr: end-to-end test of the Mini AVR core.
//
// The core runs a 20-word test program (tb/tb_mini_avr_prog.hex) that uses
// every instruction of the set:
//   00 NOP               0B OR   r18,r19   Z=0
//   01 LDI  r16,0x83     0C BREQ +5        not taken
//   02 ADC  r16,r16      0D EOR  r19,r19   Z=1
//   03 ADC  r16,r16      0E LDI  r21,0xFF
//   04 MOV  r17,r16      0F LDI  r22,0x01
//   05 LDI  r18,0xF0     10 ADC  r21,r22   0x00, Z=1 C=1
//   06 LDI  r19,0x0F     11 ADC  r23,r23   C added in
//   07 AND  r18,r19 Z=1  12 ADC  r23,r22   loop body
//   08 BREQ +1  taken    13 RJMP -2        back to 12
//   09 LDI  r24,0x55  (skipped)
//   0A LDI  r20,0xEE
// An instruction-level model in this testbench, written from the AVR
// instruction formats, executes the same program one instruction per
// clock. After every edge the PC, the flags and the write-back bus of the
// core are compared with the model, and at the end all 16 registers. The
// test also counts how often each mechanism occurs (every instruction,
// carry set and cleared, Z set, BREQ taken and not taken, RJMP taken) and
// counts a failure for any that never happens.
module tb_mini_avr;
  import avr_pkg::*;

  localparam int CYCLES = 600;

  logic    clk = 0, rst = 1;
  pc_t     pc;
  opcode_t op;
  sreg_t   sr;
  logic    we;
  raddr_t  dr;
  data_t   wd;
  int checks = 0, failures = 0;

  mini_avr #(.ROM_FILE("tb/tb_mini_avr_prog.hex")) dut (
    .clk, .rst, .pc_o(pc), .op_o(op), .sr_o(sr),
    .reg_we_o(we), .d_reg_o(dr), .nx_reg_o(wd)
  );

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  logic [15:0] prog [256];
  int  m_pc;
  int  m_r [16];
  bit  m_z, m_c;
  bit  m_we;
  int  m_d, m_wd;

  // mechanism counters
  int n_nop, n_ldi, n_adc, n_mov, n_and, n_or, n_eor, n_rjmp;
  int n_breq_taken, n_breq_not, n_c_set, n_c_clear, n_z_set;

  // Execute one instruction in the model; sets m_we/m_d/m_wd for the
  // write-back the core must show in this cycle.
  task automatic model_step();
    logic [15:0] w;
    int d, r, res, next_pc;
    bit  old_c;
    w = prog[m_pc];
    d = int'(w[7:4]);
    r = int'(w[3:0]);
    next_pc = (m_pc + 1) % 256;
    m_we = 0; m_d = d; m_wd = 0;
    old_c = m_c;
    if (w == 16'h0000) begin
      n_nop++;
    end else if (w[15:12] == 4'hE) begin
      n_ldi++;
      m_we = 1; m_wd = int'({w[11:8], w[3:0]});
    end else if (w[15:10] == 6'b000111) begin
      n_adc++;
      res = m_r[d] + m_r[r] + int'(m_c);
      m_c = res > 255; m_z = (res % 256) == 0;
      m_we = 1; m_wd = res % 256;
      if (m_c && !old_c) n_c_set++;
      if (!m_c && old_c) n_c_clear++;
    end else if (w[15:10] == 6'b001011) begin
      n_mov++;
      m_we = 1; m_wd = m_r[r];
    end else if (w[15:10] == 6'b001000) begin
      n_and++;
      m_we = 1; m_wd = m_r[d] & m_r[r]; m_z = m_wd == 0;
    end else if (w[15:10] == 6'b001010) begin
      n_or++;
      m_we = 1; m_wd = m_r[d] | m_r[r]; m_z = m_wd == 0;
    end else if (w[15:10] == 6'b001001) begin
      n_eor++;
      m_we = 1; m_wd = m_r[d] ^ m_r[r]; m_z = m_wd == 0;
    end else if (w[15:12] == 4'hC) begin
      n_rjmp++;
      next_pc = (m_pc + 1 + int'($signed(w[11:0]))) & 255;
    end else if (w[15:10] == 6'b111100 && w[2:0] == 3'b001) begin
      if (m_z) begin
        n_breq_taken++;
        next_pc = (m_pc + 1 + int'($signed(w[9:3]))) & 255;
      end else begin
        n_breq_not++;
      end
    end
    if (m_we) m_r[d] = m_wd;
    if (m_we && m_wd == 0 && m_z) n_z_set++;
    m_pc = next_pc;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("t=%0t %s (pc=%h op=%h model pc=%h)", $time, what, pc, op, m_pc);
    end
  endtask

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else begin
      $display("%-16s %0d", what, n);
    end
  endtask

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $readmemh("tb/tb_mini_avr_prog.hex", prog);
    for (int i = 20; i < 256; i++) prog[i] = 16'h0000;
    for (int i = 0; i < 16; i++) m_r[i] = 0;
    m_pc = 0; m_z = 0; m_c = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      // combinational state in the middle of the cycle
      check(pc == pc_t'(m_pc), "PC mismatch");
      check(op == prog[m_pc], "opcode mismatch");
      check(sr.z == m_z && sr.c == m_c, "flags mismatch before execute");
      model_step();
      check(we == m_we, "write enable mismatch");
      if (m_we) check(dr == raddr_t'(m_d) && wd == data_t'(m_wd), "write-back mismatch");
      @(posedge clk);
      #1;
      check(sr.z == m_z && sr.c == m_c, "flags mismatch after execute");
    end
    for (int i = 0; i < 16; i++)
      check(dut.u_regs.regs[i] == data_t'(m_r[i]), $sformatf("r%0d final value", 16 + i));
    // known values of the straight-line part of the program
    check(dut.u_regs.regs[0] == 8'h0D, "r16 = 0x0D");
    check(dut.u_regs.regs[1] == 8'h0D, "r17 = 0x0D");
    check(dut.u_regs.regs[2] == 8'h0F, "r18 = 0x0F");
    check(dut.u_regs.regs[3] == 8'h00, "r19 = 0x00");
    check(dut.u_regs.regs[4] == 8'hEE, "r20 = 0xEE");
    check(dut.u_regs.regs[5] == 8'h00, "r21 = 0x00");
    check(dut.u_regs.regs[8] == 8'h00, "r24 untouched: BREQ skipped it");
    need(n_nop, "NOP");
    need(n_ldi, "LDI");
    need(n_adc, "ADC");
    need(n_mov, "MOV");
    need(n_and, "AND");
    need(n_or, "OR");
    need(n_eor, "EOR");
    need(n_rjmp, "RJMP taken");
    need(n_breq_taken, "BREQ taken");
    need(n_breq_not, "BREQ not taken");
    need(n_c_set, "carry set");
    need(n_c_clear, "carry cleared");
    need(n_z_set, "zero result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
