// gumnut_pkg: types and constants shared by the fault tolerant Gumnut processor.
//
// The control unit is a five-state machine (Fetch, Decode, Execute, Memory
// Access, Write Back) with the binary state codes 000..100. The next-state
// function below is the single definition of its transitions: the TMR and ECC
// controllers evaluate it as logic, the LUT controller loads it into its
// look-up table. It has four inputs besides the state:
//   adv     - the state's work is done ("transition function" = 1); 0 holds the state
//   is_mem  - the instruction is a memory or I/O instruction (ldm, stm, inp, out)
//   is_load - the instruction reads data (ldm, inp) and must write a register
// Execute goes to Memory for memory/I/O instructions and to Write Back for all
// others; Memory goes to Write Back for loads and back to Fetch for stores.
// The three unused codes 101, 110 and 111 lead to Fetch, so a corrupted state
// can never lock the machine up.
//
// Instruction encodings follow the Gumnut instruction set (18-bit words):
//   0  fn(3) rd rs immed(8)          ALU, immediate operand
//   10 fn(2) rd rs offset(8)         ldm/stm/inp/out, address = rs + offset
//   110 x rd rs count(3) xxx fn(2)   shl/shr/rol/ror
//   1110 rd rs r2 xxx fn(3)          ALU, register operand
//   11110 fn(1) addr(12)             jmp/jsb
//   111110 fn(2) xx disp(8)          bz/bnz/bc/bnc
//   1111110 fn(3) xxxxxxxx           ret/reti/enai/disi/wait/stby
package gumnut_pkg;

  typedef enum logic [2:0] {
    S_FETCH     = 3'b000,
    S_DECODE    = 3'b001,
    S_EXECUTE   = 3'b010,
    S_MEMORY    = 3'b011,
    S_WRITEBACK = 3'b100
  } state_t;

  // Inputs of the next-state function besides the present state.
  typedef struct packed {
    logic adv;
    logic is_mem;
    logic is_load;
  } fsm_in_t;

  // Which protection the controller uses for its state register.
  typedef enum logic [1:0] {
    FT_TMR = 2'd0,
    FT_LUT = 2'd1,
    FT_ECC = 2'd2
  } ft_scheme_t;

  // Width of the fault injection vector every controller accepts; each scheme
  // uses as many low bits as it has state storage bits (TMR 9, LUT 3, ECC 12).
  localparam int unsigned FAULT_W = 12;

  // ALU function codes (instruction bits 16:14 or 2:0).
  typedef enum logic [2:0] {
    ALU_ADD  = 3'b000,
    ALU_ADDC = 3'b001,
    ALU_SUB  = 3'b010,
    ALU_SUBC = 3'b011,
    ALU_AND  = 3'b100,
    ALU_OR   = 3'b101,
    ALU_XOR  = 3'b110,
    ALU_MASK = 3'b111
  } alu_fn_t;

  // Shift function codes (instruction bits 1:0).
  typedef enum logic [1:0] {
    SH_SHL = 2'b00,
    SH_SHR = 2'b01,
    SH_ROL = 2'b10,
    SH_ROR = 2'b11
  } shift_fn_t;

  // Memory / I/O function codes (instruction bits 15:14).
  localparam logic [1:0] MEM_LDM = 2'b00;
  localparam logic [1:0] MEM_STM = 2'b01;
  localparam logic [1:0] MEM_INP = 2'b10;
  localparam logic [1:0] MEM_OUT = 2'b11;

  // Branch function codes (instruction bits 11:10).
  localparam logic [1:0] BR_BZ  = 2'b00;
  localparam logic [1:0] BR_BNZ = 2'b01;
  localparam logic [1:0] BR_BC  = 2'b10;
  localparam logic [1:0] BR_BNC = 2'b11;

  // Miscellaneous function codes (instruction bits 10:8).
  localparam logic [2:0] MISC_RET = 3'b000;

  function automatic state_t fsm_next_state(input logic [2:0] cur, input fsm_in_t in);
    state_t nxt;
    case (cur)
      S_FETCH:     nxt = in.adv ? S_DECODE  : S_FETCH;
      S_DECODE:    nxt = in.adv ? S_EXECUTE : S_DECODE;
      S_EXECUTE:   nxt = !in.adv ? S_EXECUTE : (in.is_mem ? S_MEMORY : S_WRITEBACK);
      S_MEMORY:    nxt = !in.adv ? S_MEMORY  : (in.is_load ? S_WRITEBACK : S_FETCH);
      S_WRITEBACK: nxt = in.adv ? S_FETCH   : S_WRITEBACK;
      default:     nxt = S_FETCH;
    endcase
    return nxt;
  endfunction

endpackage
