// control: instruction decoder of the Mini AVR.
//
// Purely combinational. From the present opcode pr_op it produces every
// control signal of the single-cycle datapath:
//   d_reg, r_reg  register indices (0..15 stand for r16..r31), taken from
//                 opcode bits 7:4 and 3:0. The d4/r4 bits (8 and 9) of ADC
//                 and the 0010 class are ignored because only r16..r31
//                 exist.
//   k             8-bit immediate of LDI, {op[11:8], op[3:0]}.
//   out_mux       selects the register write data: ALU result or k.
//   reg_we        register write enable.
//   alu_op        ALU operation.
//   jump, offset  relative PC jump request: RJMP always (12-bit offset
//                 op[11:0]); BREQ (1111 00kk kkkk k001) when the present Z
//                 flag is set, with the 7-bit offset op[9:3] sign-extended.
//                 Since the 8-bit PC wraps modulo 256, only the low 8 bits
//                 of the signed offset matter, and only those are output.
// The instruction class comes from opcode bits 15:12; within the 0010 class,
// bits 11:10 separate AND, EOR, OR and MOV. NOP, LDI, ADC and MOV are
// decoded as in the reference opcode tables; the AND/EOR/OR/RJMP/BREQ
// encodings follow the AVR instruction set. Any other opcode is executed as a
// NOP, which is this design's choice.
module control
  import avr_pkg::*;
(
  input  opcode_t     pr_op,
  input  logic        z,         // present Z flag, for BREQ
  output logic        reg_we,
  output out_mux_e    out_mux,
  output data_t       k,
  output raddr_t      d_reg,
  output raddr_t      r_reg,
  output alu_op_e     alu_op,
  output logic        jump,
  output pc_t         offset     // jump distance, modulo the program size
);

  logic [3:0] cls;
  assign cls = pr_op[15:12];

  assign d_reg = pr_op[7:4];
  assign r_reg = pr_op[3:0];
  assign k     = {pr_op[11:8], pr_op[3:0]};

  always_comb begin
    reg_we  = 1'b0;
    out_mux = MUX_ALU;
    alu_op  = ALU_PASS;
    jump    = 1'b0;
    offset  = pr_op[PC_W-1:0];  // RJMP k, truncated to the PC width
    unique case (cls)
      CLS_LDI: begin
        reg_we  = 1'b1;
        out_mux = MUX_K;
      end
      CLS_ADC: begin
        reg_we = 1'b1;
        alu_op = ALU_ADC;
      end
      CLS_LOGIC: begin
        reg_we = 1'b1;
        unique case (pr_op[11:10])
          SUB_AND: alu_op = ALU_AND;
          SUB_EOR: alu_op = ALU_EOR;
          SUB_OR:  alu_op = ALU_OR;
          SUB_MOV: alu_op = ALU_PASS;
        endcase
      end
      CLS_RJMP: begin
        jump = 1'b1;
      end
      CLS_BRANCH: begin
        offset = {pr_op[9], pr_op[9:3]};  // 7-bit k, sign-extended
        jump   = (pr_op[11:10] == 2'b00) && (pr_op[2:0] == 3'b001) && z;
      end
      default: ;  // NOP and unsupported opcodes
    endcase
  end

endmodule
