// tb_status_register: loads random Z/C values every clock and checks that
// pr_sr shows each one after exactly one edge, and that reset clears both
// flags.
module tb_status_register;
  import avr_pkg::*;

  logic  clk = 0, rst = 1;
  sreg_t nx_sr = '0, pr_sr;
  int checks = 0, failures = 0;

  status_register dut (.clk, .rst, .nx_sr, .pr_sr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sreg_t prev;
    nx_sr = 2'b11;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (pr_sr !== 2'b00) failures++;
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      nx_sr = sreg_t'($urandom);
      prev  = pr_sr;
      #2 checks++;  // no change before the edge
      if (pr_sr !== prev) failures++;
      @(posedge clk);
      #1 checks++;
      if (pr_sr !== nx_sr) begin
        failures++;
        $display("pr_sr=%b expected %b", pr_sr, nx_sr);
      end
    end
    nx_sr = 2'b11;
    rst = 1;
    @(posedge clk);
    #1 checks++;
    if (pr_sr !== 2'b00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
