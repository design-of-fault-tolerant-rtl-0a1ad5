// gumnut_asm_pkg: instruction encoders for writing Gumnut test programs in
// SystemVerilog, plus an instruction-level reference model of the processor.
//
// The encoders build the 18-bit instruction words field by field. The
// reference model executes one instruction at a time on an architectural
// state (registers, flags, PC, return stack, data memory) and reports the
// I/O port writes, so testbenches can compare the RTL with it.
package gumnut_asm_pkg;

  typedef logic [17:0] word_t;

  function automatic word_t i_alu(input logic [2:0] fn, input logic [2:0] rd, rs, input logic [7:0] imm);
    return {1'b0, fn, rd, rs, imm};
  endfunction
  function automatic word_t i_alur(input logic [2:0] fn, input logic [2:0] rd, rs, r2);
    return {4'b1110, rd, rs, r2, 2'b00, fn};
  endfunction
  function automatic word_t i_shift(input logic [1:0] fn, input logic [2:0] rd, rs, cnt);
    return {3'b110, 1'b0, rd, rs, cnt, 3'b000, fn};
  endfunction
  function automatic word_t i_mem(input logic [1:0] fn, input logic [2:0] rd, rs, input logic [7:0] off);
    return {2'b10, fn, rd, rs, off};
  endfunction
  function automatic word_t i_jmp(input logic [11:0] addr);
    return {5'b11110, 1'b0, addr};
  endfunction
  function automatic word_t i_jsb(input logic [11:0] addr);
    return {5'b11110, 1'b1, addr};
  endfunction
  function automatic word_t i_br(input logic [1:0] fn, input logic [7:0] disp);
    return {6'b111110, fn, 2'b00, disp};
  endfunction
  function automatic word_t i_ret();
    return {7'b1111110, 3'b000, 8'h00};
  endfunction

  // Architectural state of the reference model.
  typedef struct {
    logic [7:0]  r [8];
    logic        c, z;
    logic [11:0] pc;
    logic [11:0] stk [8];
    logic [2:0]  sp;
    logic [7:0]  dmem [256];
    bit          sys_ports;  // 1: ports as in gumnut_system (LED at 0x51, others read 0)
    logic [7:0]  led;
  } arch_t;

  function automatic void arch_reset(ref arch_t a);
    foreach (a.r[i]) a.r[i] = '0;
    a.c = 0; a.z = 0; a.pc = '0; a.sp = '0;
    foreach (a.stk[i]) a.stk[i] = '0;
    foreach (a.dmem[i]) a.dmem[i] = '0;
    a.sys_ports = 0; a.led = '0;
  endfunction

  // Value the testbench port models return for an `inp` from address adr.
  function automatic logic [7:0] port_in_value(input logic [7:0] adr);
    return adr ^ 8'hA5;
  endfunction

  // Executes one instruction. Returns 1 with port address and data in
  // padr/pdat when the instruction is an `out`; an `inp` reads
  // port_in_value(address).
  function automatic bit arch_step(ref arch_t a, input word_t w,
                                   output logic [7:0] padr, output logic [7:0] pdat);
    logic [7:0] x, y, res;
    logic [8:0] t;
    logic       cy;
    int         n;
    bit         is_out = 0;
    padr = 0; pdat = 0;
    a.pc = a.pc + 1;
    if (w[17] == 1'b0 || w[17:14] == 4'b1110) begin
      logic [2:0] fn, rd;
      fn = w[17] ? w[2:0] : w[16:14];
      rd = w[13:11];
      x  = a.r[w[10:8]];
      y  = w[17] ? a.r[w[7:5]] : w[7:0];
      case (fn)
        0: t = x + y;
        1: t = x + y + a.c;
        2: t = {1'b0, x} - {1'b0, y};
        3: t = {1'b0, x} - {1'b0, y} - a.c;
        4: t = {1'b0, x & y};
        5: t = {1'b0, x | y};
        6: t = {1'b0, x ^ y};
        default: t = {1'b0, x & ~y};
      endcase
      a.c = t[8]; a.z = (t[7:0] == 0);
      if (rd != 0) a.r[rd] = t[7:0];
    end else if (w[17:15] == 3'b110) begin
      x = a.r[w[10:8]]; n = int'(w[7:5]); res = x; cy = 0;
      for (int k = 0; k < n; k++) begin
        case (w[1:0])
          0: begin cy = res[7]; res = {res[6:0], 1'b0}; end
          1: begin cy = res[0]; res = {1'b0, res[7:1]}; end
          2: begin cy = res[7]; res = {res[6:0], res[7]}; end
          default: begin cy = res[0]; res = {res[0], res[7:1]}; end
        endcase
      end
      a.c = cy; a.z = (res == 0);
      if (w[13:11] != 0) a.r[w[13:11]] = res;
    end else if (w[17:16] == 2'b10) begin
      logic [7:0] ad;
      ad = a.r[w[10:8]] + w[7:0];
      case (w[15:14])
        0: if (w[13:11] != 0) a.r[w[13:11]] = a.dmem[ad];
        1: a.dmem[ad] = a.r[w[13:11]];
        2: if (w[13:11] != 0)
             a.r[w[13:11]] = !a.sys_ports ? port_in_value(ad) : (ad == 8'h51) ? a.led : 8'h00;
        default: begin
          is_out = 1; padr = ad; pdat = a.r[w[13:11]];
          if (ad == 8'h51) a.led = pdat;
        end
      endcase
    end else if (w[17:13] == 5'b11110) begin
      if (w[12]) begin a.stk[a.sp] = a.pc; a.sp++; end
      a.pc = w[11:0];
    end else if (w[17:12] == 6'b111110) begin
      bit tk;
      case (w[11:10])
        0: tk = a.z;
        1: tk = !a.z;
        2: tk = a.c;
        default: tk = !a.c;
      endcase
      if (tk) a.pc = a.pc + {{4{w[7]}}, w[7:0]};
    end else if (w[17:11] == 7'b1111110) begin
      if (w[10:8] == 0) begin a.sp--; a.pc = a.stk[a.sp]; end
    end
    return is_out;
  endfunction

  // Clock cycles one instruction takes in gumnut_system, whose memories and
  // ports acknowledge one clock after the request: Fetch 2, Decode 1,
  // Execute 1, Memory 2 (memory and I/O instructions), Write Back 1 (all but
  // stores).
  function automatic int sys_cycles(input word_t w);
    bit mem = (w[17:16] == 2'b10);
    return 4 + (mem ? 2 : 0) + ((mem && w[14]) ? 0 : 1);
  endfunction

  // The LED demonstration program used by the system and top-level tests:
  // it builds 0x0F, keeps it in data memory, calls a subroutine five times
  // that rotates it onto the LEDs and back, reads the LED register and an
  // unmapped port, and finally writes 0000_1111 to the LED register at port
  // 0x51 before spinning at address 10.
  function automatic void led_demo(ref word_t p [4096]);
    foreach (p[i]) p[i] = '0;
    p[0]  = i_alu(3'b000, 3'd1, 3'd0, 8'h0F);        // add  r1, r0, 0x0F
    p[1]  = i_alu(3'b000, 3'd2, 3'd0, 8'd5);         // add  r2, r0, 5
    p[2]  = i_mem(2'b01, 3'd1, 3'd0, 8'h10);         // stm  r1, 0x10(r0)
    p[3]  = i_jsb(12'd20);                           // jsb  20
    p[4]  = i_alu(3'b010, 3'd2, 3'd2, 8'd1);         // sub  r2, r2, 1
    p[5]  = i_br(2'b01, 8'hFD);                      // bnz  -3  (to 3)
    p[6]  = i_mem(2'b00, 3'd3, 3'd0, 8'h10);         // ldm  r3, 0x10(r0)
    p[7]  = i_mem(2'b10, 3'd4, 3'd0, 8'h0C);         // inp  r4, 0x0C(r0)
    p[8]  = i_alur(3'b000, 3'd3, 3'd3, 3'd4);        // add  r3, r3, r4
    p[9]  = i_mem(2'b11, 3'd3, 3'd0, 8'h51);         // out  r3, 0x51(r0)
    p[10] = i_jmp(12'd10);                           // jmp  10
    p[11] = i_jmp(12'd10);                           // jmp  10
    p[20] = i_mem(2'b00, 3'd5, 3'd0, 8'h10);         // ldm  r5, 0x10(r0)
    p[21] = i_shift(2'b10, 3'd5, 3'd5, 3'd1);        // rol  r5, r5, 1
    p[22] = i_mem(2'b11, 3'd5, 3'd0, 8'h51);         // out  r5, 0x51(r0)
    p[23] = i_mem(2'b10, 3'd6, 3'd0, 8'h51);         // inp  r6, 0x51(r0)
    p[24] = i_shift(2'b11, 3'd5, 3'd6, 3'd1);        // ror  r5, r6, 1
    p[25] = i_mem(2'b01, 3'd5, 3'd0, 8'h10);         // stm  r5, 0x10(r0)
    p[26] = i_alu(3'b001, 3'd7, 3'd7, 8'h01);        // addc r7, r7, 1
    p[27] = i_ret();                                 // ret
  endfunction

  // A random instruction of any class, weighted towards ALU and I/O work.
  // Jump targets stay below `span` so random programs stay in their region.
  function automatic word_t random_inst(input int unsigned span);
    int unsigned k = $urandom % 20;
    logic [2:0] rd = 3'($urandom), rs = 3'($urandom), r2 = 3'($urandom);
    if (k < 5)       return i_alu(3'($urandom), rd, rs, 8'($urandom));
    else if (k < 7)  return i_alur(3'($urandom), rd, rs, r2);
    else if (k < 9)  return i_shift(2'($urandom), rd, rs, 3'($urandom));
    else if (k < 11) return i_mem(2'($urandom % 2), rd, rs, 8'($urandom));       // ldm/stm
    else if (k < 14) return i_mem(2'b10 + 2'($urandom % 2), rd, rs, 8'($urandom)); // inp/out
    else if (k < 15) return i_jmp(12'($urandom % span));
    else if (k < 16) return i_jsb(12'($urandom % span));
    else if (k < 18) return i_br(2'($urandom), 8'(int'($urandom % 16) - 8));
    else if (k < 19) return i_ret();
    else             return {7'b1111110, 3'($urandom), 8'($urandom)};
  endfunction

endpackage

