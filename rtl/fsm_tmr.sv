// fsm_tmr: control state machine with a triple modular redundant state register.
//
// The 3-bit state is held in a tmr_ff. Three copies of the next-state logic
// (fsm_next), each fed with the voted state, form the three redundant data
// paths into the TMR flip-flop. A single upset in one copy is masked at the
// voter at once and overwritten with the correct next state at the next clock
// edge, so the state seen by the datapath never changes and the correction
// takes one cycle. Interface: `in` carries the transition inputs, `fault`
// bits [3i+2:3i] invert bits of copy i at the next edge (upset model), `state`
// is the voted state and `err` is 1 while the copies disagree. Synchronous,
// active-high reset to Fetch. TMR of the state flip-flops follows the
// document; the per-copy next-state logic is this design's reading of its
// "three redundant data paths".
module fsm_tmr
  import gumnut_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  fsm_in_t            in,
  input  logic [FAULT_W-1:0] fault,
  output state_t             state,
  output logic               err
);
  logic [2:0][2:0] nxt;
  logic [2:0][2:0] flip;
  logic [2:0]      voted;

  for (genvar i = 0; i < 3; i++) begin : g_path
    state_t n;
    fsm_next u_next (.cur(voted), .in(in), .nxt(n));
    assign nxt[i]  = n;
    assign flip[i] = fault[3*i +: 3];
  end

  tmr_ff #(.W(3), .RESET_VAL(S_FETCH)) u_state (
    .clk(clk), .rst(rst), .d(nxt), .flip(flip), .q(voted), .mismatch(err)
  );

  assign state = state_t'(voted);
endmodule
