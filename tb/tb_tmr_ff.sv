// tb_tmr_ff: checks the TMR flip-flop's voter and its masking of upsets.
//
// Loads random values through the three data paths, sometimes with one copy
// given a different value or one copy hit by a bit flip, and checks that the
// output is the two-out-of-three majority and that `mismatch` reports
// disagreeing copies. Also checks the reset value.
module tb_tmr_ff;
  localparam int W = 4;
  logic clk = 0, rst = 1;
  logic [2:0][W-1:0] d, flip;
  logic [W-1:0] q;
  logic mismatch;
  int checks = 0, failures = 0;
  logic [2:0][W-1:0] stored;

  tmr_ff #(.W(W), .RESET_VAL(4'h5)) dut (.clk(clk), .rst(rst), .d(d), .flip(flip), .q(q), .mismatch(mismatch));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] maj(logic [W-1:0] a, b, c);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
    return r;
  endfunction

  initial begin
    d = '0; flip = '0;
    @(negedge clk); @(negedge clk);
    checks++; if (q !== 4'h5 || mismatch) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      d = {v, v, v};
      flip = '0;
      case ($urandom % 4)
        0: d[$urandom % 3] = W'($urandom);
        1: flip[$urandom % 3] = W'(1 << ($urandom % W));
        2: begin flip[0] = W'($urandom); flip[1] = W'($urandom); flip[2] = W'($urandom); end
        default: ;
      endcase
      stored = {d[2] ^ flip[2], d[1] ^ flip[1], d[0] ^ flip[0]};
      @(negedge clk);
      checks++;
      if (q !== maj(stored[0], stored[1], stored[2])) begin
        failures++; $display("FAIL n=%0d q=%h", n, q);
      end
      checks++;
      if (mismatch !== (stored[0] != stored[1] || stored[1] != stored[2])) begin
        failures++; $display("FAIL mismatch n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
