// alu: combinational 8-bit ALU of the Mini AVR.
//
// Computes alu_out from alu_in_a (Rd) and alu_in_b (Rr), and the next status
// nx_sr from the present status pr_sr:
//   ALU_ADC  alu_out = a + b + C; Z set if the result is 0x00, C set on a
//            carry out of bit 7.
//   ALU_AND, ALU_EOR, ALU_OR
//            bitwise result; Z from the result, C kept (as in the AVR
//            instruction set, where logic operations leave C alone).
//   ALU_PASS alu_out = b (MOV); both flags kept.
// Any operation that does not touch a flag passes pr_sr through, so the
// status register can be loaded every cycle.
module alu
  import avr_pkg::*;
(
  input  alu_op_e alu_op,
  input  data_t   alu_in_a,
  input  data_t   alu_in_b,
  input  sreg_t   pr_sr,
  output data_t   alu_out,
  output sreg_t   nx_sr
);

  logic [DATA_W:0] sum;

  always_comb begin
    sum     = {1'b0, alu_in_a} + {1'b0, alu_in_b} + {{DATA_W{1'b0}}, pr_sr.c};
    alu_out = alu_in_b;
    nx_sr   = pr_sr;
    unique case (alu_op)
      ALU_ADC: begin
        alu_out  = sum[DATA_W-1:0];
        nx_sr.c  = sum[DATA_W];
        nx_sr.z  = (sum[DATA_W-1:0] == '0);
      end
      ALU_AND: begin
        alu_out = alu_in_a & alu_in_b;
        nx_sr.z = (alu_out == '0);
      end
      ALU_EOR: begin
        alu_out = alu_in_a ^ alu_in_b;
        nx_sr.z = (alu_out == '0);
      end
      ALU_OR: begin
        alu_out = alu_in_a | alu_in_b;
        nx_sr.z = (alu_out == '0);
      end
      default: ;  // ALU_PASS
    endcase
  end

endmodule
