// fsm_ecc: control state machine whose state is stored as a Hamming code word.
//
// The 3-bit state is zero-extended to an 8-bit data word and kept in a
// 12-bit register as its Hamming code word (hamming_enc). Every cycle the
// stored word is decoded and corrected (hamming_dec), the corrected state
// drives the datapath and the next-state logic, and the next state is encoded
// again before it is stored. Any single flipped bit of the 12 is therefore
// invisible at the output and is gone after the next clock edge (correction
// in one cycle). As a second check, the code words of the five legal states
// are kept in a small table, written at reset from hamming_enc; the stored
// word is compared with the table entry of the decoded state, and a mismatch
// (or a non-zero syndrome) raises `err`.
// Interface: `fault[11:0]` inverts code word bits at the next edge (upset
// model); `err` is 1 while the stored word differs from the code word of its
// corrected state. Synchronous, active-high reset to the code word of Fetch.
// The 8-bit/12-bit Hamming code, the table of state code words and the
// comparison follow the document; zero-extending the state into the 8-bit
// data word is this design's reading.
module fsm_ecc
  import gumnut_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  fsm_in_t            in,
  input  logic [FAULT_W-1:0] fault,
  output state_t             state,
  output logic               err
);
  localparam int unsigned DW = 8;
  localparam int unsigned CW = 12;

  localparam int unsigned NSTATES = 5;

  logic [CW-1:0] code_q, code_d;
  logic [DW-1:0] dec_data;
  logic [3:0]    syndrome;
  logic          dec_err, match;
  state_t        cur, nxt;
  logic [CW-1:0] state_code [NSTATES];   // code word of each legal state
  logic [CW-1:0] state_code_init [NSTATES];

  hamming_dec #(.DW(DW)) u_dec (.code(code_q), .data(dec_data), .syndrome(syndrome), .err(dec_err));

  for (genvar i = 0; i < NSTATES; i++) begin : g_code
    hamming_enc #(.DW(DW)) u_tab (.data(DW'(i)), .code(state_code_init[i]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NSTATES; i++) state_code[i] <= state_code_init[i];
    end
  end

  assign match = (dec_data < DW'(NSTATES)) && (code_q == state_code[dec_data[2:0]]);
  assign err   = dec_err || !match;

  assign cur = state_t'(dec_data[2:0]);

  fsm_next u_next (.cur(cur), .in(in), .nxt(nxt));

  hamming_enc #(.DW(DW)) u_enc (.data(DW'(nxt)), .code(code_d));

  // Reset value: code word of S_FETCH (all zero data gives an all zero word).
  always_ff @(posedge clk) begin
    if (rst) code_q <= '0 ^ fault[CW-1:0];
    else     code_q <= code_d ^ fault[CW-1:0];
  end

  assign state = cur;
endmodule
