// tb_led_gpio: checks the LED register at port address 0x51.
//
// Writes to 0x51 must update led_status (including the 0000_1111 pattern)
// and be acknowledged one clock later with a led_enable pulse; writes to
// other addresses must be ignored and not acknowledged; reads of 0x51 return
// the register.
module tb_led_gpio;
  logic clk = 0, rst = 1;
  logic cyc, stb, we, ack, led_enable;
  logic [7:0] adr, wdat, rdat, led_status;
  logic [7:0] model;
  int checks = 0, failures = 0;

  led_gpio dut (.clk(clk), .rst(rst), .cyc_i(cyc), .stb_i(stb), .we_i(we), .ack_o(ack),
                .adr_i(adr), .dat_i(wdat), .dat_o(rdat), .led_enable(led_enable), .led_status(led_status));

  always #5 clk = ~clk;

  initial begin
    cyc = 0; stb = 0; we = 0; adr = 0; wdat = 0; model = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    checks++; if (led_status !== 8'h00) failures++;
    for (int n = 0; n < 400; n++) begin
      adr  = (n == 0 || $urandom % 2) ? 8'h51 : 8'($urandom);
      wdat = (n == 0) ? 8'h0F : 8'($urandom);
      we   = (n == 0) ? 1'b1 : 1'($urandom);
      cyc = 1; stb = 1;
      #1;
      checks++;
      if (led_enable !== (we && adr == 8'h51)) begin failures++; $display("FAIL led_enable"); end
      @(negedge clk);
      if (we && adr == 8'h51) model = wdat;
      checks++;
      if (ack !== (adr == 8'h51)) begin failures++; $display("FAIL ack adr=%h", adr); end
      checks++;
      if (led_status !== model) begin failures++; $display("FAIL led_status=%h exp %h", led_status, model); end
      if (adr == 8'h51 && !we) begin
        checks++; if (rdat !== model) begin failures++; $display("FAIL read"); end
      end
      cyc = 0; stb = 0; we = 0;
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
