// tmr_ff: triple modular redundant flip-flop.
//
// Three W-bit registers capture three redundant data paths d[0], d[1], d[2]
// on the rising clock edge; the output is the bitwise two-out-of-three
// majority of the three stored copies, so one corrupted copy never reaches the
// output. When every data path is computed from the voted output, a corrupted
// copy is overwritten with the correct value at the next edge (correction in
// one clock). `flip` models a transient upset: at an edge where a bit of
// flip[i] is 1, copy i stores the inverted value of that bit. `mismatch` is 1
// while the three copies disagree. Synchronous, active-high reset to RESET_VAL.
// The structure (three data paths, voter, clock and reset) follows the
// document's TMR flip-flop; the fault input and mismatch flag are additions.
module tmr_ff #(
  parameter int unsigned       W         = 3,
  parameter logic [W-1:0]      RESET_VAL = '0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [2:0][W-1:0]    d,
  input  logic [2:0][W-1:0]    flip,
  output logic [W-1:0]         q,
  output logic                 mismatch
);
  logic [2:0][W-1:0] copy_q;

  always_ff @(posedge clk) begin
    for (int i = 0; i < 3; i++) begin
      if (rst) copy_q[i] <= RESET_VAL ^ flip[i];
      else     copy_q[i] <= d[i] ^ flip[i];
    end
  end

  always_comb begin
    q        = (copy_q[0] & copy_q[1]) | (copy_q[1] & copy_q[2]) | (copy_q[0] & copy_q[2]);
    mismatch = (copy_q[0] != copy_q[1]) || (copy_q[1] != copy_q[2]);
  end
endmodule
