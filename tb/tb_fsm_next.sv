// tb_fsm_next: exhaustive check of the control unit's next-state logic.
//
// Applies all 8 state codes x 8 input combinations and compares with a
// transition table written out in the testbench: hold on adv = 0, Fetch ->
// Decode -> Execute, Execute -> Memory (memory instruction) or Write Back,
// Memory -> Write Back (load) or Fetch, Write Back -> Fetch, unused -> Fetch.
module tb_fsm_next;
  import gumnut_pkg::*;
  logic [2:0] cur;
  fsm_in_t    in;
  state_t     nxt;
  int checks = 0, failures = 0;

  fsm_next dut (.cur(cur), .in(in), .nxt(nxt));

  function automatic logic [2:0] expect_next(logic [2:0] s, logic adv, logic m, logic l);
    if (s > 3'd4) return 3'd0;
    if (!adv)     return s;
    case (s)
      3'd0: return 3'd1;
      3'd1: return 3'd2;
      3'd2: return m ? 3'd3 : 3'd4;
      3'd3: return l ? 3'd4 : 3'd0;
      default: return 3'd0;
    endcase
  endfunction

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int i = 0; i < 8; i++) begin
        cur = s[2:0];
        in  = fsm_in_t'(i[2:0]);
        #1;
        checks++;
        if (nxt !== expect_next(s[2:0], i[2], i[1], i[0])) begin
          failures++;
          $display("FAIL state=%0d in=%b got %0d", s, i[2:0], nxt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
