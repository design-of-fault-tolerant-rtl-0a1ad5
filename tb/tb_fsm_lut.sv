// tb_fsm_lut: checks the look-up-table FSM and its recovery from unused codes.
//
// Drives random transition inputs and compares the state with a reference
// transition table on every cycle. At random edges it inverts state bits so
// that the register lands on one of the unused codes 101, 110, 111: the
// state must then show that code with err = 1, and the next clock must bring
// the machine back to Fetch, after which it follows the reference again.
module tb_fsm_lut;
  import gumnut_pkg::*;
  logic clk = 0, rst = 1;
  fsm_in_t in;
  logic [FAULT_W-1:0] fault;
  state_t state;
  logic err;
  logic [2:0] ref_state;
  int checks = 0, failures = 0, recoveries = 0;

  fsm_lut dut (.clk(clk), .rst(rst), .in(in), .fault(fault), .state(state), .err(err));

  always #5 clk = ~clk;

  function automatic logic [2:0] ref_next(logic [2:0] s, fsm_in_t i);
    if (s > 3'd4) return 3'd0;
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
    in = '0; fault = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    ref_state = 3'd0;
    for (int n = 0; n < 2000; n++) begin
      logic [2:0] nxt, bad;
      checks++;
      if (state !== state_t'(ref_state)) begin
        failures++; $display("FAIL cycle %0d state=%0d expected %0d", n, state, ref_state);
      end
      checks++;
      if (err !== (ref_state > 3'd4)) begin
        failures++; $display("FAIL cycle %0d err=%0d", n, err);
      end
      in  = fsm_in_t'($urandom);
      nxt = ref_next(ref_state, in);
      fault = '0;
      if ($urandom % 4 == 0 && ref_state <= 3'd4) begin
        bad = 3'd5 + 3'($urandom % 3);
        fault[2:0] = nxt ^ bad;
        nxt = bad;
        recoveries++;
      end
      ref_state = nxt;
      @(negedge clk);
    end
    checks++;
    if (recoveries < 100) failures++;
    $display("unused-code upsets: %0d", recoveries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
