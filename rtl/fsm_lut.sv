// fsm_lut: control state machine whose next-state logic is a look-up table.
//
// The combinational part of the state machine is held in a small memory (an
// SRAM-style array of 64 three-bit words). Its address is the present state
// together with the transition inputs, {state, adv, is_mem, is_load}, and the
// word read is the next state, which a 3-bit register captures every clock.
// The table is written from gumnut_pkg::fsm_next_state while reset is held,
// so every one of the 64 addresses has a defined entry. This is what gives
// the scheme its fault tolerance: a state register upset that produces one of
// the unused codes 101, 110 or 111 reads an entry that leads back to Fetch,
// so the machine recovers in one clock instead of locking up. An upset from
// one valid code to another valid code cannot be told apart from a legal
// state with a plain 3-bit code and is not corrected.
// Interface: `fault[2:0]` inverts state bits at the next edge (upset model);
// `err` is 1 while the register holds an unused code. Synchronous, active-high
// reset to Fetch. The LUT contents follow the document's state table; the
// address layout and the load-at-reset are this design's choices.
module fsm_lut
  import gumnut_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  fsm_in_t            in,
  input  logic [FAULT_W-1:0] fault,
  output state_t             state,
  output logic               err
);
  localparam int unsigned AW = 6;

  logic [2:0] lut [2**AW];
  logic [2:0] state_q;
  logic [AW-1:0] addr;

  assign addr = {state_q, in};

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int a = 0; a < 2**AW; a++)
        lut[a] <= fsm_next_state(a[AW-1:3], fsm_in_t'(a[2:0]));
      state_q <= S_FETCH ^ fault[2:0];
    end else begin
      state_q <= lut[addr] ^ fault[2:0];
    end
  end

  assign state = state_t'(state_q);
  assign err   = (state_q > S_WRITEBACK);
endmodule
