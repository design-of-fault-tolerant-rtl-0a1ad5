// tb_alu: compares the ALU and shifter with a bit-by-bit reference model.
//
// Random operands, carries, function codes and shift counts; the reference
// computes results with 9-bit arithmetic and shifts one place at a time.
// Also checks a few fixed cases by hand (0x0F + 0xF1 carries out, 0x10 - 0x20
// borrows, rol of 0x81 by 1 gives 0x03 with carry 1).
module tb_alu;
  import gumnut_pkg::*;
  logic shift, cin, cout, zero;
  alu_fn_t fn;
  shift_fn_t sfn;
  logic [7:0] a, b, y;
  logic [2:0] count;
  int checks = 0, failures = 0;

  alu dut (.shift(shift), .fn(fn), .sfn(sfn), .a(a), .b(b), .count(count), .cin(cin),
           .y(y), .cout(cout), .zero(zero));

  task automatic ref_model(output logic [7:0] ry, output logic rc);
    logic [8:0] t;
    logic [7:0] r;
    if (!shift) begin
      case (fn)
        ALU_ADD:  t = a + b;
        ALU_ADDC: t = a + b + cin;
        ALU_SUB:  t = {1'b0, a} - {1'b0, b};
        ALU_SUBC: t = {1'b0, a} - {1'b0, b} - cin;
        ALU_AND:  t = {1'b0, a & b};
        ALU_OR:   t = {1'b0, a | b};
        ALU_XOR:  t = {1'b0, a ^ b};
        default:  t = {1'b0, a & ~b};
      endcase
      ry = t[7:0]; rc = t[8];
    end else begin
      r = a; rc = 0;
      for (int k = 0; k < count; k++) begin
        case (sfn)
          SH_SHL: begin rc = r[7]; r = {r[6:0], 1'b0}; end
          SH_SHR: begin rc = r[0]; r = {1'b0, r[7:1]}; end
          SH_ROL: begin rc = r[7]; r = {r[6:0], r[7]}; end
          default: begin rc = r[0]; r = {r[0], r[7:1]}; end
        endcase
      end
      ry = r;
    end
  endtask

  task automatic check(string what);
    logic [7:0] ey; logic ec;
    #1;
    ref_model(ey, ec);
    checks++;
    if (y !== ey || cout !== ec || zero !== (ey == 0)) begin
      failures++;
      $display("FAIL %s shift=%0d fn=%0d sfn=%0d a=%h b=%h cnt=%0d cin=%0d: y=%h c=%0d z=%0d exp y=%h c=%0d",
               what, shift, fn, sfn, a, b, count, cin, y, cout, zero, ey, ec);
    end
  endtask

  initial begin
    shift = 0; fn = ALU_ADD; sfn = SH_SHL; a = 8'h0F; b = 8'hF1; count = 0; cin = 0; #1;
    checks++; if (y !== 8'h00 || !cout || !zero) begin failures++; $display("FAIL add fixed"); end
    fn = ALU_SUB; a = 8'h10; b = 8'h20; #1;
    checks++; if (y !== 8'hF0 || !cout) begin failures++; $display("FAIL sub fixed"); end
    shift = 1; sfn = SH_ROL; a = 8'h81; count = 1; #1;
    checks++; if (y !== 8'h03 || !cout) begin failures++; $display("FAIL rol fixed"); end
    for (int n = 0; n < 4000; n++) begin
      shift = $urandom % 3 == 0;
      fn    = alu_fn_t'($urandom);
      sfn   = shift_fn_t'($urandom);
      a     = 8'($urandom);
      b     = ($urandom % 8 == 0) ? a : 8'($urandom);
      count = 3'($urandom);
      cin   = 1'($urandom);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
