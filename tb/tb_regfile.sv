// tb_regfile: random writes and reads of the register file against a model.
//
// Checks that r1..r7 return the last value written, that r0 always reads 0
// even after a write to it, that nothing changes while we = 0, and the reset.
module tb_regfile;
  logic clk = 0, rst = 1, we;
  logic [2:0] ra1, ra2, wa;
  logic [7:0] rd1, rd2, wd;
  logic [7:0] model [8];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .rst(rst), .ra1(ra1), .rd1(rd1), .ra2(ra2), .rd2(rd2),
               .we(we), .wa(wa), .wd(wd));

  always #5 clk = ~clk;

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    foreach (model[i]) model[i] = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom);
      wa = 3'($urandom);
      wd = 8'($urandom);
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      @(negedge clk);
      we = 0;
      ra1 = 3'($urandom); ra2 = 3'($urandom);
      #1;
      checks += 2;
      if (rd1 !== model[ra1]) begin failures++; $display("FAIL r%0d=%h exp %h", ra1, rd1, model[ra1]); end
      if (rd2 !== model[ra2]) begin failures++; $display("FAIL r%0d=%h exp %h", ra2, rd2, model[ra2]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
