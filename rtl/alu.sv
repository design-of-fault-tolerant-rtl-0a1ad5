// alu: 8-bit arithmetic, logic and shift unit of the Gumnut processor.
//
// Purely combinational. With shift = 0 it performs one of the eight ALU
// functions selected by `fn` on `a` and `b`:
//   000 add  a+b          001 addc a+b+cin
//   010 sub  a-b          011 subc a-b-cin
//   100 and  a&b          101 or   a|b
//   110 xor  a^b          111 mask a&~b
// With shift = 1 it shifts or rotates `a` by `count` (0..7) places, selected
// by `sfn`: 00 shl, 01 shr, 10 rol, 11 ror. The function codes are the
// document's. `cout` is the carry (borrow for subtraction), the last bit
// shifted out for shl/shr, the bit that last wrapped around for rol/ror, and
// 0 for the logic functions and for a shift by 0; `zero` flags a zero result.
// These flag rules are this design's choices.
module alu
  import gumnut_pkg::*;
(
  input  logic       shift,
  input  alu_fn_t    fn,
  input  shift_fn_t  sfn,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic [2:0] count,
  input  logic       cin,
  output logic [7:0] y,
  output logic       cout,
  output logic       zero
);
  logic [8:0] sum;
  logic [8:0] wide;

  always_comb begin
    sum  = '0;
    wide = '0;
    y    = '0;
    cout = 1'b0;
    if (!shift) begin
      unique case (fn)
        ALU_ADD:  sum = {1'b0, a} + {1'b0, b};
        ALU_ADDC: sum = {1'b0, a} + {1'b0, b} + {8'b0, cin};
        ALU_SUB:  sum = {1'b0, a} - {1'b0, b};
        ALU_SUBC: sum = {1'b0, a} - {1'b0, b} - {8'b0, cin};
        ALU_AND:  sum = {1'b0, a & b};
        ALU_OR:   sum = {1'b0, a | b};
        ALU_XOR:  sum = {1'b0, a ^ b};
        ALU_MASK: sum = {1'b0, a & ~b};
      endcase
      y    = sum[7:0];
      cout = sum[8];
    end else begin
      unique case (sfn)
        SH_SHL: begin
          wide = {1'b0, a} << count;
          y    = wide[7:0];
          cout = wide[8];
        end
        SH_SHR: begin
          wide = {a, 1'b0} >> count;
          y    = wide[8:1];
          cout = wide[0];
        end
        SH_ROL: begin
          y    = (a << count) | (a >> (4'd8 - {1'b0, count}));
          cout = (count != 3'd0) && y[0];
        end
        SH_ROR: begin
          y    = (a >> count) | (a << (4'd8 - {1'b0, count}));
          cout = (count != 3'd0) && y[7];
        end
      endcase
    end
    zero = (y == 8'h00);
  end
endmodule
