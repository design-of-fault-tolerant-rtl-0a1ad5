# A Gumnut processor with a fault tolerant control state machine

A single-bit upset in the state register of a processor's control unit is one
of the worst transient faults it can suffer: the register can land on a state
the instruction is not in, or on a code that is no state at all, and the
processor then skips work, repeats it or hangs. This RTL implements a small
8-bit RISC processor (Gumnut instruction set, 18-bit instructions) whose
five-state control machine, Fetch, Decode, Execute, Memory Access and Write
Back, is hardened in three alternative ways:

* **TMR**: the state flip-flops are triplicated and voted, each copy fed by
  its own copy of the next-state logic;
* **LUT**: the next-state logic is a look-up table covering every possible
  state code, so a corrupted code always has a defined way back;
* **ECC**: the state is stored as a 12-bit Hamming code word and corrected
  on every read.

The point is to protect only the few state bits at gate level instead of
replicating the whole processor. The top level, `ft_risc_top`, holds three
complete processor systems side by side, one per scheme, so the three can be
run on the same program under the same kind of upsets and compared.

## The control state machine

Every instruction walks through the same states. The state codes are fixed:

| State        | Code | Work done                                                     | Leaves when            |
|--------------|------|---------------------------------------------------------------|------------------------|
| Fetch        | 000  | read instruction at PC into IR, PC := PC + 1                  | instruction bus ack    |
| Decode       | 001  | read source registers into operand latches                    | always (1 cycle)       |
| Execute      | 010  | ALU/shift and flags, or address rs+offset, or PC change       | always (1 cycle)       |
| Memory       | 011  | ldm/stm on the data bus, inp/out on the I/O port bus          | data or port bus ack   |
| Write Back   | 100  | write ALU result or loaded byte to rd                         | always (1 cycle)       |

A state holds while its "done" input (`adv`) is 0. When it is 1:

```
Fetch   -> Decode -> Execute -> Memory      (ldm, stm, inp, out)
                             -> Write Back  (all other instructions)
Memory  -> Write Back (ldm, inp: the loaded byte must reach rd)
        -> Fetch      (stm, out)
Write Back -> Fetch
101, 110, 111 (unused) -> Fetch
```

Branches, jumps and `ret` change PC in Execute and pass through Write Back
without writing a register. The single definition of this function is
`fsm_next_state` in `gumnut_pkg`; `fsm_next` wraps it as a module.

With the memories and peripherals of `gumnut_system`, which acknowledge one
clock after a request, an instruction takes Fetch 2 + Decode 1 + Execute 1 +
Memory 2 (memory and I/O instructions only) + Write Back 1 (all but stores)
clock cycles: 5 for ALU, shift, jump and branch instructions, 7 for loads,
`inp` and 6 for stores, `out`. The protection schemes do not change this
count.

## Three ways to protect the state

All three controllers (`fsm_tmr`, `fsm_lut`, `fsm_ecc`) have the same ports:
clock, reset, the transition inputs `in = {adv, is_mem, is_load}`, a 12-bit
`fault` input, the `state` they present to the datapath, and an `err` flag.
`gumnut_core` picks one with its parameter `FT` (`FT_TMR`, `FT_LUT`,
`FT_ECC`; default `FT_TMR`).

`fault` is an upset model for simulation: a 1 bit inverts the corresponding
stored bit as it is captured at the next rising edge. Drive it with a
one-cycle pulse to model a transient upset; tie it to zero in a real design.

### TMR (`tmr_ff`, `fsm_tmr`)

`tmr_ff` holds three W-bit registers loaded from three separate inputs
(the "three redundant data paths") and outputs their bitwise two-out-of-three
majority. `fsm_tmr` instantiates one 3-bit `tmr_ff` and three `fsm_next`
blocks, each computing the next state from the *voted* state:

```
            +-> fsm_next #0 -> copy 0 --+
voted state +-> fsm_next #1 -> copy 1 --+-> majority -> state
            +-> fsm_next #2 -> copy 2 --+
```

An upset in one copy never reaches the output (the other two outvote it), and
because every copy is reloaded from the voted state, the bad copy is replaced
by the correct next state at the very next edge. `err` is 1 for exactly that
one cycle. Fault bits `[2:0]`, `[5:3]`, `[8:6]` hit copies 0, 1, 2. Two upsets
in the same bit of two copies in the same cycle defeat it, as with any TMR.
A synthesis tool that merges the three identical `fsm_next` copies removes
protection of the next-state logic itself; keep hierarchy or use the tool's
"keep" mechanism if that matters.

### LUT (`fsm_lut`)

The combinational part of the machine is stored in a 64-word x 3-bit array
addressed by `{state, adv, is_mem, is_load}`; the word read is the next state,
captured by a plain 3-bit register. The array is written from
`fsm_next_state` while reset is high, so every address, including those of
the three unused codes, holds a defined entry, and those entries lead to
Fetch. An upset that puts the register on 101, 110 or 111 is therefore
undone in one clock (`err` is 1 while the unused code is held) and the
machine cannot lock up.

Know its limit: with a plain 3-bit binary code, an upset from one *valid*
state to another (Decode 001 to Memory 011, say) looks like a legal state and
is not corrected. Recovery from an unused code also restarts at Fetch with
the already incremented PC, so the interrupted instruction is abandoned. This
scheme protects against lock-up, not against every wrong step; use TMR or ECC
where every upset must be invisible.

### ECC (`hamming_enc`, `hamming_dec`, `fsm_ecc`)

The 3-bit state is zero-extended to an 8-bit data word d1..d8 and stored as a
12-bit Hamming code word e1..e12. Positions that are powers of two hold check
bits, the others hold data in order:

```
e12 e11 e10 e9  e8  e7  e6  e5  e4  e3  e2  e1
d8  d7  d6  d5  c8  d4  d3  d2  c4  d1  c2  c1
```

Check bit e(2^k) is the XOR of every other position whose index has bit k
set, e.g. e2 = e3 ^ e6 ^ e7 ^ e10 ^ e11. Decoding recomputes the check bits
and XORs them with the stored ones; the 4-bit result (syndrome) is 0 for an
intact word and otherwise the position of the flipped bit, which is inverted.
Example: state 001 is stored as `0000_0000_0111`; flip any one of its twelve
bits and it still decodes to 001.

`fsm_ecc` decodes and corrects the stored word every cycle, feeds the
corrected state to the datapath and to `fsm_next`, and stores the re-encoded
next state, so a single upset is invisible and gone after one edge. It also
keeps the code words of the five legal states in a small table, written at
reset, and compares the stored word with the entry of its corrected state;
`err` is 1 on a mismatch or a non-zero syndrome. `hamming_enc`/`hamming_dec`
are parameterised by the data width `DW` (check-bit count and code length are
derived); the default, 8, gives the 12-bit code.

## The processor

`gumnut_core` is a multi-cycle, non-pipelined core: eight 8-bit registers
r0..r7 (r0 reads as zero), a 12-bit PC, carry and zero flags and an
eight-entry return address stack for `jsb`/`ret`. Reset is synchronous and
active high; the core runs while `rst` is low, starting at address 0.

Instruction formats (18 bits, most significant bit first):

| Format                 | Encoding                                  | Functions                                          |
|------------------------|-------------------------------------------|----------------------------------------------------|
| ALU, immediate         | `0 fn3 rd rs imm8`                        | add addc sub subc and or xor mask (000..111)       |
| memory / I/O           | `10 fn2 rd rs off8`                       | ldm stm inp out (00..11), address = rs + off       |
| shift                  | `110 x rd rs cnt3 xxx fn2`                | shl shr rol ror (00..11)                           |
| ALU, register          | `1110 rd rs r2 xx fn3`                    | as ALU immediate, second operand r2                |
| jump                   | `11110 fn1 addr12`                        | jmp jsb                                            |
| branch                 | `111110 fn2 xx disp8`                     | bz bnz bc bnc, PC := PC + disp (PC already + 1)    |
| miscellaneous          | `1111110 fn3 x8`                          | ret (000); others execute as no-operations         |

`mask` is `a & ~b`. Subtraction sets carry on borrow; logic functions clear
it; shifts and rotates leave the last bit moved out (or around) in carry.
`stm`/`out` write rd; `ldm`/`inp` read into rd.

Three buses, each with `cyc`/`stb` held until `ack`:

* instruction: `inst_adr_o[11:0]`, `inst_dat_i[17:0]`;
* data memory: `data_adr_o[7:0]`, `data_dat_o`, `data_dat_i`, `data_we_o`;
* I/O ports: `port_adr_o[7:0]`, `port_dat_o`, `port_dat_i`, `port_we_o`.

Concurrent assertions in the core check that every request is held until it
is acknowledged.

## The system and the top level

`gumnut_system` connects one core to:

* `inst_mem`: 4096 x 18-bit instruction memory, synchronous read, `ack` one
  clock after the request; a separate load port (`load_we`, `load_adr`,
  `load_dat`) writes programs while reset is held;
* `data_mem`: 256 x 8-bit data memory, same handshake;
* `led_gpio`: an 8-bit LED status register at I/O port address 0x51
  (`0101_0001`), written by `out`, read back by `inp`, with a `led_enable`
  strobe;
* a default responder that acknowledges every other port address and reads 0.

`ft_risc_top` instantiates three systems, `g_sys[0]` with TMR, `g_sys[1]`
with LUT and `g_sys[2]` with ECC. They share clock, reset and the program
load port, so they run the same program in lock step; each has its own
`fault_i[i]`, `state_o[i]`, `fsm_err_o[i]`, `led_status[i]` and
`led_enable[i]`. The top has no parameters.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5 (packages first, `-y` to find the rest):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gumnut_pkg.sv tb/gumnut_asm_pkg.sv tb/tb_ft_risc_top.sv \
    --top-module tb_ft_risc_top -o sim
obj_dir/sim
```

| Testbench           | What it shows                                                                 |
|---------------------|-------------------------------------------------------------------------------|
| `tb_ft_risc_top`    | All three systems run the LED program under upsets (TMR, ECC: on about one clock in three; LUT: onto unused codes while idling); every LED write must match a reference model in value and clock cycle; counts every mechanism (fetch waits, each state transition, loads, stores, LED and unmapped port access, taken and untaken branches, calls, returns, corrections, LUT recoveries) and fails if one never happened. Runs the top at its default size. |
| `tb_gumnut_system`  | The LED program on one system per scheme, no upsets; LED values and cycle of every write against the reference. |
| `tb_gumnut_core`    | 3000 instructions of a random program per scheme against an instruction-level reference model: fetch address of every instruction, every store and `out`, every bus address, and the cycle count of every instruction, with random wait states on all buses and, for TMR and ECC, upsets on about one clock in four. |
| `tb_fsm_tmr`, `tb_fsm_ecc` | 2000 cycles of random inputs with single-bit upsets; state never wrong, `err` for exactly one cycle per upset. |
| `tb_fsm_lut`        | Random inputs with upsets onto unused codes; one-clock return to Fetch.       |
| `tb_fsm_next`, `tb_tmr_ff`, `tb_hamming`, `tb_alu`, `tb_regfile`, `tb_inst_mem`, `tb_data_mem`, `tb_led_gpio` | Unit checks against independent models (exhaustive for the next-state table and the Hamming code with every single-bit error). |

`tb/gumnut_asm_pkg.sv` holds instruction encoders (`i_alu`, `i_mem`,
`i_jsb`, ...), the LED demonstration program (`led_demo`) and the reference
model (`arch_step`), which are handy for writing further programs.

The LED program builds 0x0F, keeps it in data memory, calls a subroutine five
times that rotates it onto the LEDs and reads it back, reads an unmapped port
and ends by writing `0000_1111` to the LEDs, then spins at address 10. It
takes 346 cycles to reach the spin loop.

## Where this RTL departs from, or goes beyond, its source description

The processor, the state codes and transitions, the three protection schemes,
the 8/12-bit Hamming code, the register, memory and PC sizes, the ALU and
shift function codes and the LED register at 0x51 follow the published
description of the design. The following are choices made here:

* **Transitions out of Memory.** The description has two state tables that
  disagree: one sends every instruction through Memory and Write Back, the
  other sends non-memory instructions from Execute straight to Write Back
  and every instruction from Memory back to Fetch. This RTL uses the second
  for Execute and for stores, but sends loads from Memory to Write Back, as
  the datapath drawings route load data into the register file there.
* **Transition inputs.** The "transition function" is read as the state's
  done signal (bus acknowledge in Fetch and Memory, always 1 elsewhere); the
  `is_load` input is added to tell loads from stores.
* **LUT scheme.** How the look-up table tolerates faults is not spelled out;
  here it is the defined return from unused codes described above. It does
  not correct valid-to-valid upsets.
* **Correction time.** Single upsets are corrected at the next clock edge in
  TMR and ECC, well inside the bound of N cycles for N state elements.
* **Memories.** Separate instruction (4096 x 18) and data (256 x 8) memories
  with separate buses, as in the described bus signals; the datapath drawings
  show a single memory with an address multiplexer instead. The load port of
  the instruction memory and the one-cycle acknowledge are additions.
* **Instruction set details** not given in the description (encodings beyond
  the function codes, flag rules, r0 = 0, the return stack) follow the
  published Gumnut instruction set. Interrupts are not implemented.
* **LED peripheral.** A 3-bit `ack_sync` signal appears in the peripheral's
  signal list without a described function and is not built; read-back of
  the register is an addition.
* **Not reproduced:** the unprotected reference processor (a baseline only)
  and the FPGA area and frequency comparison, which depends on the vendor
  tool and device.

## Files

`rtl/`: `gumnut_pkg` (types, codes, next-state function), `fsm_next`,
`tmr_ff`, `fsm_tmr`, `fsm_lut`, `hamming_enc`, `hamming_dec`, `fsm_ecc`,
`alu`, `regfile`, `gumnut_core`, `inst_mem`, `data_mem`, `led_gpio`,
`gumnut_system`, `ft_risc_top`. `tb/`: one testbench per module plus
`gumnut_asm_pkg`.
