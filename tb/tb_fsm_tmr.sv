// tb_fsm_tmr: checks that the TMR-protected control FSM never shows a wrong state.
//
// Drives random transition inputs and follows the expected state with a
// reference transition table. At random clock edges it injects
// single-bit upsets in one of the three state copies. The voted/decoded state must equal the reference on every cycle,
// the error flag must be 1 in the cycle after an upset and back to 0 one
// cycle later (correction within one clock).
module tb_fsm_tmr;
  import gumnut_pkg::*;
  logic clk = 0, rst = 1;
  fsm_in_t in;
  logic [FAULT_W-1:0] fault;
  state_t state;
  logic err;
  logic [2:0] ref_state;
  int checks = 0, failures = 0, upsets = 0;

  fsm_tmr dut (.clk(clk), .rst(rst), .in(in), .fault(fault), .state(state), .err(err));

  always #5 clk = ~clk;

  function automatic logic [2:0] ref_next(logic [2:0] s, fsm_in_t i);
    if (!i.adv) return s;
    case (s)
      3'd0: return 3'd1;
      3'd1: return 3'd2;
      3'd2: return i.is_mem ? 3'd3 : 3'd4;
      3'd3: return i.is_load ? 3'd4 : 3'd0;
      default: return 3'd0;
    endcase
  endfunction

  initial begin
    bit injected;
    in = '0; fault = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    ref_state = 3'd0;
    injected = 0;
    for (int n = 0; n < 2000; n++) begin
      checks++;
      if (state !== state_t'(ref_state)) begin
        failures++; $display("FAIL cycle %0d state=%0d expected %0d", n, state, ref_state);
      end
      checks++;
      if (err !== injected) begin
        failures++; $display("FAIL cycle %0d err=%0d expected %0d", n, err, injected);
      end
      in = fsm_in_t'($urandom);
      injected = ($urandom % 3 == 0);
      fault = injected ? FAULT_W'(1) << ($urandom % 9) : '0;
      if (injected) upsets++;
      ref_state = ref_next(ref_state, in);
      @(negedge clk);
    end
    checks++;
    if (upsets < 100) failures++;
    $display("upsets injected: %0d", upsets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
