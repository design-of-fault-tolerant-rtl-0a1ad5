// tb_data_mem: random bus writes and reads of the 256-byte data memory
// against a model, checking read data and the one-cycle acknowledge.
module tb_data_mem;
  logic clk = 0, rst = 1;
  logic cyc, stb, we, ack;
  logic [7:0] adr, wdat, rdat;
  logic [7:0] model [256];
  bit valid [256];
  int checks = 0, failures = 0;

  data_mem dut (.clk(clk), .rst(rst), .cyc_i(cyc), .stb_i(stb), .we_i(we), .ack_o(ack),
                .adr_i(adr), .dat_i(wdat), .dat_o(rdat));

  always #5 clk = ~clk;

  initial begin
    cyc = 0; stb = 0; we = 0; adr = 0; wdat = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int a = 0; a < 256; a++) begin
      model[a] = 8'($urandom);
      adr = 8'(a); wdat = model[a]; we = 1; cyc = 1; stb = 1;
      @(negedge clk);
      checks++; if (ack !== 1) begin failures++; $display("FAIL write ack %0d", a); end
      cyc = 0; stb = 0; we = 0;
      @(negedge clk);
    end
    for (int n = 0; n < 1500; n++) begin
      adr = 8'($urandom); cyc = 1; stb = 1; we = 1'($urandom); wdat = 8'($urandom);
      if (we) model[adr] = wdat;
      @(negedge clk);
      checks++;
      if (ack !== 1 || (!we && rdat !== model[adr])) begin
        failures++; $display("FAIL adr %h we=%0d rdat=%h exp %h ack=%0d", adr, we, rdat, model[adr], ack);
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
