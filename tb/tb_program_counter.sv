// tb_program_counter: drives the program counter with random jump requests
// and offsets and compares pr_pc after every clock edge with a model that
// adds 1, or 1 + offset, modulo 256. Reset to 0 and wrap-around past 0xFF
// are checked explicitly; each cycle is one step (single-cycle timing).
module tb_program_counter;
  import avr_pkg::*;

  logic clk = 0, rst = 1, jump = 0;
  pc_t  offset = '0;
  pc_t  pr_pc;
  int   model;
  int   checks = 0, failures = 0;
  int   wraps = 0, jumps = 0;

  program_counter dut (.clk, .rst, .jump, .offset, .pr_pc);

  always #5 clk = ~clk;

  task automatic check(int exp);
    checks++;
    if (int'(pr_pc) != exp) begin
      failures++;
      $display("t=%0t pc=%0d expected %0d", $time, pr_pc, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check(0);
    rst = 0;
    model = 0;
    // plain counting through a wrap
    for (int i = 0; i < 300; i++) begin
      @(posedge clk);
      model = (model + 1) % 256;
      if (model == 0) wraps++;
      #1 check(model);
    end
    // random relative jumps, forward and backward
    for (int i = 0; i < 1000; i++) begin
      jump   = ($urandom % 3) == 0;
      offset = pc_t'($urandom);
      @(posedge clk);
      if (jump) begin
        jumps++;
        model = (model + 1 + int'($signed(offset))) & 8'hFF;
      end else begin
        model = (model + 1) % 256;
      end
      #1 check(model);
    end
    // reset in mid-run
    jump = 0;
    rst  = 1;
    @(posedge clk);
    #1 check(0);
    checks++;
    if (wraps == 0 || jumps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
