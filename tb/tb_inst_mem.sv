// tb_inst_mem: loads the 4096 x 18 instruction memory and reads it back over
// the bus, checking data and the one-cycle acknowledge (ack rises one clock
// after the request and lasts one cycle even if the request is held).
module tb_inst_mem;
  logic clk = 0, rst = 1;
  logic cyc, stb, ack, load_we;
  logic [11:0] adr, load_adr;
  logic [17:0] dat, load_dat;
  int checks = 0, failures = 0;

  inst_mem dut (.clk(clk), .rst(rst), .cyc_i(cyc), .stb_i(stb), .ack_o(ack), .adr_i(adr), .dat_o(dat),
                .load_we(load_we), .load_adr(load_adr), .load_dat(load_dat));

  always #5 clk = ~clk;

  function automatic logic [17:0] pattern(int a);
    return 18'(a * 37 + (a << 7) + 5);
  endfunction

  initial begin
    cyc = 0; stb = 0; adr = 0; load_we = 0; load_adr = 0; load_dat = 0;
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      load_we = 1; load_adr = 12'(a); load_dat = pattern(a);
    end
    @(negedge clk);
    load_we = 0; rst = 0;
    for (int n = 0; n < 600; n++) begin
      int a;
      a = (n < 8) ? (4095 - n) : int'($urandom % 4096);
      adr = 12'(a); cyc = 1; stb = 1;
      #1;
      checks++; if (ack !== 0) begin failures++; $display("FAIL early ack"); end
      @(negedge clk);
      checks++;
      if (ack !== 1 || dat !== pattern(a)) begin failures++; $display("FAIL adr %0d dat=%h ack=%0d", a, dat, ack); end
      @(negedge clk);                  // request still held: no second ack
      checks++; if (ack !== 0) begin failures++; $display("FAIL double ack"); end
      cyc = 0; stb = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
