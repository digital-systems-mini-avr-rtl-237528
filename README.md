# Mini AVR: a single-cycle, AVR-compatible 8-bit core

Mini AVR is a very small microcontroller core. Programs written for the Atmel
AVR run on it unchanged, as long as they use only its few instructions and
only registers r16..r31. It is a Harvard machine: the program sits in a ROM of
its own, and the register bank is the only data storage. There is no RAM,
stack or I/O space. Each instruction is fetched, decoded, executed and
written back within one clock cycle.

Supported instructions (standard AVR encodings):

| Instruction   | Opcode                | Operation                  | Flags             |
|---------------|-----------------------|----------------------------|-------------------|
| `NOP`         | `0000 0000 0000 0000` | none                       | none              |
| `LDI Rd,K`    | `1110 KKKK dddd KKKK` | Rd ← K                     | none              |
| `ADC Rd,Rr`   | `0001 11rd dddd rrrr` | Rd ← Rd + Rr + C           | Z, C              |
| `AND Rd,Rr`   | `0010 00rd dddd rrrr` | Rd ← Rd & Rr               | Z (C kept)        |
| `EOR Rd,Rr`   | `0010 01rd dddd rrrr` | Rd ← Rd ^ Rr               | Z (C kept)        |
| `OR Rd,Rr`    | `0010 10rd dddd rrrr` | Rd ← Rd \| Rr              | Z (C kept)        |
| `MOV Rd,Rr`   | `0010 11rd dddd rrrr` | Rd ← Rr                    | none              |
| `RJMP k`      | `1100 kkkk kkkk kkkk` | PC ← PC + k + 1            | none              |
| `BREQ k`      | `1111 00kk kkkk k001` | if Z: PC ← PC + k + 1      | none              |

Any other opcode executes as a `NOP`. Only the Z (zero) and C (carry) flags
of the AVR status register exist.

## Datapath

```
 program_counter --pr_pc--> program_rom --pr_op--> control
       ^                                   |  d_reg, r_reg, k, alu_op,
       | jump, offset                      |  out_mux, reg_we
       +-----------------------------------+
                                           v
 register_file --alu_in_a, alu_in_b--> alu --alu_out--> out_mux --nx_reg--> register_file
       ^                                ^  \                ^
       | d_reg, r_reg          pr_sr    |   nx_sr            k
                                        |     v
                              status_register (Z, C)
```

Every signal name above is a real net in `rtl/mini_avr.sv`:

* **program_counter** (`pr_pc`, 8 bits). On each clock edge it loads
  `pr_pc + 1`, or `pr_pc + 1 + offset` when `control` asserts `jump`. The
  addition wraps modulo 256, so only the low 8 bits of the jump distance
  matter.
* **program_rom** (`pr_op`, 16 bits). A combinational ROM: the opcode at
  `pr_pc` is ready in the same cycle, so nothing is prefetched.
* **control** is combinational and derives everything from `pr_op`:
  * `d_reg = op[7:4]` and `r_reg = op[3:0]`, where index 0 is r16.
  * `k = {op[11:8], op[3:0]}`.
  * `alu_op`, `reg_we`, `out_mux`, and the jump request.
* **register_file** holds 16 x 8 bits and has two combinational read ports:
  * `alu_in_a` reads `regs[d_reg]`, so the destination is also the first
    operand, as in the AVR's two-operand instructions.
  * `alu_in_b` reads `regs[r_reg]`.
  * It has one write port, at `d_reg`, which writes on the clock edge.
* **out_mux** chooses what is written back: `k` for `LDI`, otherwise
  `alu_out`.
* **alu** computes `alu_out` and also the next flags `nx_sr` from the present
  flags `pr_sr`. For an operation that changes no flag, `nx_sr` equals
  `pr_sr`.
* **status_register** has no enable and loads `nx_sr` on every edge.

Each clock edge does three things at once. It writes the register bank (when
`reg_we` is high), loads the flags, and advances the PC. No result is
forwarded and no pipeline is bypassed. A read sees the register bank as it
was before the edge, and that is also the correct program-order value.

### Decoding details that are easy to miss

* There are only r16..r31, so the high register-address bits d4 and r4
  (opcode bits 8 and 9) are ignored. For example, `ADC` is written
  `0001 1111 dddd rrrr`. If you feed the core an opcode that names r0..r15,
  it acts on r16..r31 instead.
* The top nibble picks the instruction, except in the `0010` group. There,
  bits 11:10 choose among `AND`, `EOR`, `OR` and `MOV`.
* The `alu_op` code is 3 bits wide: 0 pass (`MOV` and all non-ALU
  instructions), 1 `ADC`, 2 `AND`, 3 `EOR`, 4 `OR`. This encoding is the
  design's own choice. It is defined once, in `avr_pkg::alu_op_e`.
* `BREQ` decodes only the `BRBS 1` form (`1111 00kk kkkk k001`). The other
  conditional branches (BRNE, BRCS and so on) do not exist and act as `NOP`.

## Timing

Every instruction takes exactly one clock, jumps included. After `rst` is
released, the instruction at address 0 executes during the first cycle, and
its result is visible after the following rising edge. On a real AVR,
`RJMP` and a taken `BREQ` take two cycles. Here they take one, because the
branch target is computed combinationally in the same cycle.

## Program ROM and the demonstration program

The ROM has `ROM_DEPTH = 256` words, the full reach of the 8-bit PC. By
default (`ROM_FILE = ""`) it holds this program, and every other word is
`NOP`:

```
00  0000  NOP
01  E803  LDI r16,0x83
02  1F00  ADC r16,r16   ; 0x83+0x83 = 0x106 -> r16 = 0x06, C = 1
03  1F00  ADC r16,r16   ; 0x06+0x06+1       -> r16 = 0x0D, C = 0
04  2F10  MOV r17,r16   ; r17 = 0x0D
05  0000  NOP
```

To run another program, set `ROM_FILE` to a `$readmemh` file with one 16-bit
hex word per line. The path is relative to the directory the simulator runs
in. `tb/tb_mini_avr_prog.hex` is an example that uses every instruction. The
ROM is an initialised array read combinationally, so synthesis tools can map
it to LUTs or ROM.

## Interface of `mini_avr`

| Port        | Dir | Width | Meaning                                          |
|-------------|-----|-------|--------------------------------------------------|
| `clk`       | in  | 1     | clock, rising edge                               |
| `rst`       | in  | 1     | synchronous, active high: clears PC, flags and all registers |
| `pc_o`      | out | 8     | present program counter                          |
| `op_o`      | out | 16    | present opcode                                   |
| `sr_o`      | out | 2     | present flags, packed `{z, c}`                   |
| `reg_we_o`  | out | 1     | a register is written at the next edge           |
| `d_reg_o`   | out | 4     | register written (0 = r16)                       |
| `nx_reg_o`  | out | 8     | value written                                    |

The core has no I/O instructions, so these observation ports are the only
way to see what it is doing. They also stop synthesis from removing the
whole core.

## What follows the AVR reference and what is this design's own

These points follow the standard AVR definitions:

* the instruction formats;
* the flag rules of `ADC`: Z is set when the result is 0x00, and C is the
  carry out of bit 7;
* the rule that `NOP`, `LDI` and `MOV` leave the flags alone;
* the relative-jump arithmetic;
* the restriction to r16..r31.

These points are design choices:

* The synchronous reset. The register bank is reset too, so that a read
  before the first write is defined. The original bank has no reset.
* Unused ROM words hold `NOP`. Unknown opcodes execute as `NOP`.
* One cycle for every jump.
* The `alu_op` encoding.
* The `ROM_FILE` loading option and the observation ports.
* `AND`, `OR` and `EOR` leave C unchanged and set Z, following the AVR.

Not modelled:

* the other SREG flags (I, T, H, S, V, N);
* registers r0..r15;
* any data memory, stack or I/O.

## Files

* `rtl/avr_pkg.sv`: widths, opcode classes, `alu_op_e`, `sreg_t`,
  `out_mux_e`.
* `rtl/program_counter.sv`, `rtl/program_rom.sv`, `rtl/control.sv`,
  `rtl/register_file.sv`, `rtl/alu.sv`, `rtl/status_register.sv`: the blocks.
* `rtl/mini_avr.sv`: the top level, including the `out_mux`.
* `tb/tb_<block>.sv`: a self-checking testbench for each block. Each one
  prints `TB_RESULT checks=N failures=M`.
* `tb/tb_mini_avr.sv`: end-to-end test. It runs `tb/tb_mini_avr_prog.hex`
  for 600 cycles against an instruction-level model kept in the testbench,
  and compares PC, flags and write-back every cycle. It also counts each
  mechanism (every instruction, carry set and cleared, zero result, BREQ
  taken and not taken, RJMP) and fails if any never occurs.
* `tb/tb_mini_avr_full.sv`: the core at its default parameters. It runs the
  demonstration program with cycle-exact checks, then lets the PC wrap
  through the remaining 250 `NOP`s.

## Simulating

From the repository root (the `.hex` path in `tb_mini_avr` is relative to
it):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/avr_pkg.sv tb/tb_mini_avr.sv --top-module tb_mini_avr -Mdir obj
./obj/Vtb_mini_avr
```

Use the same command for any other testbench, changing the file and the top
module. Every testbench finishes in well under a second.
