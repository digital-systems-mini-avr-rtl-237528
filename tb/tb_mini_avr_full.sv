// tb_mini_avr_full: runs the Mini AVR with every parameter at its default,
// i.e. with the built-in demonstration program of the 256-word ROM:
//   NOP; LDI r16,0x83; ADC r16,r16; ADC r16,r16; MOV r17,r16; NOP
// One instruction completes per clock, so after reset the k-th edge ends
// instruction k-1. Expected results, worked out by hand:
//   edge 2  r16 = 0x83
//   edge 3  r16 = 0x06, C = 1 (0x83 + 0x83 = 0x106)
//   edge 4  r16 = 0x0D, C = 0 (0x06 + 0x06 + 1)
//   edge 5  r17 = 0x0D
// The PC must step by one every cycle, and the remaining NOPs must leave
// registers and flags alone until the PC wraps.
module tb_mini_avr_full;
  import avr_pkg::*;

  logic    clk = 0, rst = 1;
  pc_t     pc;
  opcode_t op;
  sreg_t   sr;
  logic    we;
  raddr_t  dr;
  data_t   wd;
  int checks = 0, failures = 0;

  mini_avr dut (
    .clk, .rst, .pc_o(pc), .op_o(op), .sr_o(sr),
    .reg_we_o(we), .d_reg_o(dr), .nx_reg_o(wd)
  );

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("t=%0t cycle check failed: %s (pc=%h op=%h we=%b d=%h wd=%h zc=%b%b)",
               $time, what, pc, op, we, dr, wd, sr.z, sr.c);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // cycle of instruction 0: NOP
    check(pc == 8'h00 && op == 16'h0000 && !we, "NOP at 0");
    @(posedge clk); #1;
    check(pc == 8'h01 && op == 16'hE803, "LDI r16,0x83 fetched at 1");
    check(we && dr == 4'd0 && wd == 8'h83, "LDI writes 0x83 to r16");
    @(posedge clk); #1;
    check(dut.u_regs.regs[0] == 8'h83, "r16 = 0x83");
    check(pc == 8'h02 && we && dr == 4'd0 && wd == 8'h06, "ADC gives 0x06");
    @(posedge clk); #1;
    check(dut.u_regs.regs[0] == 8'h06 && sr.c && !sr.z, "r16 = 0x06, C set");
    check(pc == 8'h03 && we && dr == 4'd0 && wd == 8'h0D, "ADC gives 0x0D");
    @(posedge clk); #1;
    check(dut.u_regs.regs[0] == 8'h0D && !sr.c && !sr.z, "r16 = 0x0D, C cleared");
    check(pc == 8'h04 && we && dr == 4'd1 && wd == 8'h0D, "MOV r17,r16");
    @(posedge clk); #1;
    check(dut.u_regs.regs[1] == 8'h0D, "r17 = 0x0D");
    check(pc == 8'h05 && op == 16'h0000 && !we, "NOP at 5");
    // the rest of the ROM is NOP: run to the wrap of the PC
    for (int i = 6; i < 256; i++) begin
      @(posedge clk); #1;
      check(pc == pc_t'(i) && !we, "PC steps by one through NOPs");
    end
    @(posedge clk); #1;
    check(pc == 8'h00, "PC wraps to 0");
    check(dut.u_regs.regs[0] == 8'h0D && dut.u_regs.regs[1] == 8'h0D &&
          !sr.c && !sr.z, "state kept by NOPs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
