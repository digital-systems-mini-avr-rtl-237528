// tb_register_file: random writes and reads of the 16 x 8 register bank,
// compared with a model array. Checks that a write lands on the next clock
// edge, that reg_we low leaves the bank unchanged, that both read ports
// are combinational and independent, and that reset clears every register.
module tb_register_file;
  import avr_pkg::*;

  logic   clk = 0, rst = 1, reg_we = 0;
  raddr_t d_reg = '0, r_reg = '0;
  data_t  nx_reg = '0, a, b;
  data_t  model [16];
  int checks = 0, failures = 0;

  register_file dut (.clk, .rst, .reg_we, .d_reg, .r_reg, .nx_reg,
                     .alu_in_a(a), .alu_in_b(b));

  always #5 clk = ~clk;

  task automatic check_reads();
    #1;
    checks++;
    if (a !== model[d_reg] || b !== model[r_reg]) begin
      failures++;
      $display("t=%0t d=%0d a=%h (exp %h) r=%0d b=%h (exp %h)", $time,
               d_reg, a, model[d_reg], r_reg, b, model[r_reg]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // reset value of every register
    for (int i = 0; i < 16; i++) begin
      d_reg = raddr_t'(i); r_reg = raddr_t'(15 - i);
      check_reads();
    end
    // fill every register with a distinct value
    for (int i = 0; i < 16; i++) begin
      reg_we = 1; d_reg = raddr_t'(i); nx_reg = data_t'(8'h11 * i + 3);
      @(posedge clk);
      model[i] = nx_reg;
      #1;
    end
    reg_we = 0;
    for (int i = 0; i < 16; i++) begin
      d_reg = raddr_t'(i); r_reg = raddr_t'($urandom);
      check_reads();
    end
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      reg_we = 1'($urandom); d_reg = raddr_t'($urandom);
      r_reg = raddr_t'($urandom); nx_reg = data_t'($urandom);
      check_reads();  // before the edge: old contents
      @(posedge clk);
      if (reg_we) model[d_reg] = nx_reg;
      check_reads();  // after the edge
    end
    // reset clears the bank
    rst = 1;
    @(posedge clk);
    for (int i = 0; i < 16; i++) model[i] = '0;
    for (int i = 0; i < 16; i++) begin
      d_reg = raddr_t'(i); r_reg = raddr_t'(i);
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
