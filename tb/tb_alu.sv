// tb_alu: compares the ALU against integer arithmetic for random operands,
// flags and operations, plus the corner cases of ADC (0x83 + 0x83 sets C,
// 0xFF + 0x00 + C gives 0x00 with Z and C set). Logic operations must keep
// C, and MOV (pass) must keep both flags.
module tb_alu;
  import avr_pkg::*;

  alu_op_e op;
  data_t   a, b, y;
  sreg_t   sr, nsr;
  int checks = 0, failures = 0;

  alu dut (.alu_op(op), .alu_in_a(a), .alu_in_b(b), .pr_sr(sr),
           .alu_out(y), .nx_sr(nsr));

  task automatic run_one();
    int    s;
    data_t ey;
    sreg_t es;
    #1;
    es = sr;
    case (op)
      ALU_ADC: begin
        s    = int'(a) + int'(b) + int'(sr.c);
        ey   = data_t'(s);
        es.c = (s > 255);
        es.z = ((s % 256) == 0);
      end
      ALU_AND: begin ey = a & b; es.z = (ey == 0); end
      ALU_EOR: begin ey = a ^ b; es.z = (ey == 0); end
      ALU_OR:  begin ey = a | b; es.z = (ey == 0); end
      default: ey = b;
    endcase
    checks++;
    if (y !== ey || nsr !== es) begin
      failures++;
      $display("op=%0d a=%h b=%h zc=%b%b -> y=%h zc=%b%b, expected y=%h zc=%b%b",
               op, a, b, sr.z, sr.c, y, nsr.z, nsr.c, ey, es.z, es.c);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops [5] = '{ALU_PASS, ALU_ADC, ALU_AND, ALU_EOR, ALU_OR};
    op = ALU_ADC; a = 8'h83; b = 8'h83; sr = '{z:1'b0, c:1'b0}; run_one();
    op = ALU_ADC; a = 8'h06; b = 8'h06; sr = '{z:1'b0, c:1'b1}; run_one();
    op = ALU_ADC; a = 8'hFF; b = 8'h00; sr = '{z:1'b0, c:1'b1}; run_one();
    for (int i = 0; i < 20000; i++) begin
      op = ops[$urandom % 5];
      a  = data_t'($urandom);
      b  = ($urandom % 8 == 0) ? data_t'(~a) : data_t'($urandom);
      sr = sreg_t'($urandom);
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
