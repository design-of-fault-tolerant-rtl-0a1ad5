// regfile: the eight 8-bit general purpose registers r0..r7.
//
// Two combinational read ports and one write port written on the rising
// clock edge when `we` is 1. Register r0 always reads as zero and ignores
// writes, as in the Gumnut instruction set, which uses it as the zero operand
// for immediate loads and absolute addresses. Synchronous, active-high reset
// clears r1..r7. Eight 8-bit registers follow the document; the zero register
// and the reset are this design's choices.
module regfile (
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] ra1,
  output logic [7:0] rd1,
  input  logic [2:0] ra2,
  output logic [7:0] rd2,
  input  logic       we,
  input  logic [2:0] wa,
  input  logic [7:0] wd
);
  logic [7:0] regs [1:7];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < 8; i++) regs[i] <= '0;
    end else if (we && wa != 3'd0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == 3'd0) ? 8'h00 : regs[ra1];
  assign rd2 = (ra2 == 3'd0) ? 8'h00 : regs[ra2];
endmodule
