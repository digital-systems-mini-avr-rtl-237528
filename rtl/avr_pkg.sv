// avr_pkg: shared widths, opcode constants and the ALU operation code of the
// Mini AVR core.
//
// The core is an 8-bit AVR subset. The top four opcode bits pick the
// instruction class (NOP 0000, ADC 0001, register logic/move 0010, RJMP 1100,
// LDI 1110, branch 1111). Inside the 0010 class, bits 11:10 select AND (00),
// EOR (01), OR (10) or MOV (11), as in the AVR instruction set. The ALU
// operation code is 3 bits wide, as drawn in the datapath; its encoding is a
// choice of this design.
package avr_pkg;

  localparam int unsigned DATA_W = 8;   // register and ALU width
  localparam int unsigned OP_W   = 16;  // opcode width
  localparam int unsigned PC_W   = 8;   // 256-word program space
  localparam int unsigned RADDR_W = 4;  // r16..r31 -> index 0..15

  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [OP_W-1:0]    opcode_t;
  typedef logic [PC_W-1:0]    pc_t;
  typedef logic [RADDR_W-1:0] raddr_t;

  // Instruction class, opcode bits 15:12.
  localparam logic [3:0] CLS_NOP   = 4'b0000;
  localparam logic [3:0] CLS_ADC   = 4'b0001;
  localparam logic [3:0] CLS_LOGIC = 4'b0010;  // AND, EOR, OR, MOV
  localparam logic [3:0] CLS_RJMP  = 4'b1100;
  localparam logic [3:0] CLS_LDI   = 4'b1110;
  localparam logic [3:0] CLS_BRANCH = 4'b1111;

  // Sub-operation of the 0010 class, opcode bits 11:10.
  localparam logic [1:0] SUB_AND = 2'b00;
  localparam logic [1:0] SUB_EOR = 2'b01;
  localparam logic [1:0] SUB_OR  = 2'b10;
  localparam logic [1:0] SUB_MOV = 2'b11;

  // ALU operation (alu_op, 3 bits).
  typedef enum logic [2:0] {
    ALU_PASS = 3'd0,  // alu_out = b, flags kept (MOV, and idle for others)
    ALU_ADC  = 3'd1,  // a + b + C, sets Z and C
    ALU_AND  = 3'd2,  // a & b, sets Z, keeps C
    ALU_EOR  = 3'd3,  // a ^ b, sets Z, keeps C
    ALU_OR   = 3'd4   // a | b, sets Z, keeps C
  } alu_op_e;

  // Status register: only the Z and C flags of SREG are kept.
  typedef struct packed {
    logic z;
    logic c;
  } sreg_t;

  // Source of the register write data (out_mux).
  typedef enum logic {
    MUX_ALU = 1'b0,  // nx_reg = alu_out
    MUX_K   = 1'b1   // nx_reg = immediate k (LDI)
  } out_mux_e;

endpackage
