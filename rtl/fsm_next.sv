// fsm_next: next-state logic of the processor's five-state control unit.
//
// Purely combinational. It evaluates gumnut_pkg::fsm_next_state: a state
// holds while its transition input `adv` is 0 and moves on when it is 1
// (Fetch -> Decode -> Execute -> Memory or Write Back -> Fetch). Execute
// chooses Memory for memory and I/O instructions and Write Back otherwise,
// as in the document's look-up table; Memory continues to Write Back for
// loads, which must write a register, and to Fetch for stores. Unused codes go
// to Fetch. The TMR controller instantiates three copies of this block.
module fsm_next
  import gumnut_pkg::*;
(
  input  logic [2:0] cur,   // present state code (may be any 3-bit value)
  input  fsm_in_t    in,    // adv, is_mem, is_load
  output state_t     nxt    // next state
);
  always_comb nxt = fsm_next_state(cur, in);
endmodule
