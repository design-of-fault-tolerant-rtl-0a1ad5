// tb_ft_risc_top: end-to-end test of the three fault tolerant processors
// under injected state upsets, at the design's full size.
//
// All three systems (TMR, LUT, ECC controllers) run the LED demonstration
// program, loaded once through the shared load port. An instruction-level
// reference model predicts every LED register write, its value and the
// clock cycle it happens on.
//   - TMR system: a single-bit upset in one of the nine state flip-flop
//     copies on about one clock in three, for the whole run.
//   - ECC system: a single-bit upset in the 12-bit state code word on about
//     one clock in three, for the whole run.
//   - LUT system: no upsets while the program runs (a valid-to-valid upset of
//     a plain 3-bit state is not correctable); once it spins in its final
//     loop, upsets that push the state onto an unused code, after which the
//     machine must return to Fetch on the next clock and keep running.
// All three must produce exactly the reference LED writes on exactly the
// predicted cycles and end with 0000_1111 on the LEDs. The testbench also
// counts how often each mechanism happened and fails if one never did:
// fetch wait states, Execute->Memory, Execute->Write Back, Memory->Write Back
// (loads), Memory->Fetch (stores), data loads and stores, LED writes and
// reads, unmapped port reads, taken and untaken branches, subroutine calls
// and returns, corrected TMR and ECC upsets and LUT recoveries.
module tb_ft_risc_top;
  import gumnut_pkg::*;
  import gumnut_asm_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic load_we;
  logic [11:0] load_adr;
  logic [17:0] load_dat;
  logic [2:0][FAULT_W-1:0] fault;
  state_t [2:0] state;
  logic [2:0] fsm_err, led_en;
  logic [2:0][7:0] led;

  ft_risc_top dut (
    .clk(clk), .rst(rst), .load_we(load_we), .load_adr(load_adr), .load_dat(load_dat),
    .fault_i(fault), .state_o(state), .fsm_err_o(fsm_err), .led_status(led), .led_enable(led_en)
  );

  word_t prog [4096];
  int checks = 0, failures = 0;
  int cycle;
  logic [7:0] exp_val [16];
  int exp_cyc [16];
  int n_exp, n_seen [3];
  bit running, lut_inject, upset_inject;
  state_t prev_state [3];

  // mechanism counters
  typedef enum int {
    M_FETCH_WAIT, M_EX_MEM, M_EX_WB, M_MEM_WB, M_MEM_FETCH, M_LOAD, M_STORE, M_LED_WR, M_LED_RD,
    M_PORT_DEFAULT, M_BR_TAKEN, M_BR_NOT, M_CALL, M_RET, M_TMR_FIX, M_ECC_FIX, M_LUT_RECOVER, M_NUM
  } mech_t;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"fetch wait", "Execute->Memory", "Execute->Write Back",
    "Memory->Write Back", "Memory->Fetch", "data load", "data store", "LED write", "LED read",
    "unmapped port read", "branch taken", "branch not taken", "jsb", "ret", "TMR upset corrected",
    "ECC upset corrected", "LUT recovery"};

  function automatic logic [7:0] port_wdat(int g);
    case (g)
      0: return dut.g_sys[0].u_sys.u_core.port_dat_o;
      1: return dut.g_sys[1].u_sys.u_core.port_dat_o;
      default: return dut.g_sys[2].u_sys.u_core.port_dat_o;
    endcase
  endfunction

  // observation of the TMR system's core (mechanism counting)
  wire        c_icyc = dut.g_sys[0].u_sys.u_core.inst_cyc_o;
  wire        c_iack = dut.g_sys[0].u_sys.u_core.inst_ack_i;
  wire        c_dcyc = dut.g_sys[0].u_sys.u_core.data_cyc_o;
  wire        c_dwe  = dut.g_sys[0].u_sys.u_core.data_we_o;
  wire        c_dack = dut.g_sys[0].u_sys.u_core.data_ack_i;
  wire        c_pcyc = dut.g_sys[0].u_sys.u_core.port_cyc_o;
  wire        c_pwe  = dut.g_sys[0].u_sys.u_core.port_we_o;
  wire        c_pack = dut.g_sys[0].u_sys.u_core.port_ack_i;
  wire [7:0]  c_padr = dut.g_sys[0].u_sys.u_core.port_adr_o;
  wire [17:0] c_ir   = dut.g_sys[0].u_sys.u_core.ir;
  wire [11:0] c_pc   = dut.g_sys[0].u_sys.u_core.pc;
  wire [11:0] c_iadr = dut.g_sys[0].u_sys.u_core.inst_adr_o;

  always @(posedge clk) begin
    if (running) begin
      for (int g = 0; g < 3; g++) begin
        if (led_en[g]) begin
          checks++;
          if (n_seen[g] >= n_exp) begin
            failures++; $display("FAIL[%0d] unexpected LED write at cycle %0d", g, cycle);
          end else if (port_wdat(g) !== exp_val[n_seen[g]] || cycle != exp_cyc[n_seen[g]]) begin
            failures++;
            $display("FAIL[%0d] LED write %0d: %h at cycle %0d, expected %h at %0d", g, n_seen[g],
                     port_wdat(g), cycle, exp_val[n_seen[g]], exp_cyc[n_seen[g]]);
          end
          n_seen[g]++;
        end
        // transitions, from the observable state of each system
        if (prev_state[g] == S_EXECUTE && state[g] == S_MEMORY)    mech[M_EX_MEM]++;
        if (prev_state[g] == S_EXECUTE && state[g] == S_WRITEBACK) mech[M_EX_WB]++;
        if (prev_state[g] == S_MEMORY  && state[g] == S_WRITEBACK) mech[M_MEM_WB]++;
        if (prev_state[g] == S_MEMORY  && state[g] == S_FETCH)     mech[M_MEM_FETCH]++;
        prev_state[g] = state[g];
      end
      if (fsm_err[0]) mech[M_TMR_FIX]++;
      if (fsm_err[2]) mech[M_ECC_FIX]++;
      if (fsm_err[1]) begin
        mech[M_LUT_RECOVER]++;
        checks++;
        if (dut.g_sys[1].u_sys.u_core.g_lut.u_fsm.lut[{state[1], 3'b000}] != S_FETCH) failures++;
      end
      if (c_icyc && !c_iack) mech[M_FETCH_WAIT]++;
      if (c_dcyc && c_dack) mech[c_dwe ? M_STORE : M_LOAD]++;
      if (c_pcyc && c_pack && c_padr == 8'h51) mech[c_pwe ? M_LED_WR : M_LED_RD]++;
      if (c_pcyc && c_pack && c_padr != 8'h51 && !c_pwe) mech[M_PORT_DEFAULT]++;
      if (state[0] == S_EXECUTE && c_ir[17:12] == 6'b111110) begin
        if (dut.g_sys[0].u_sys.u_core.branch_taken) mech[M_BR_TAKEN]++;
        else mech[M_BR_NOT]++;
      end
      if (state[0] == S_EXECUTE && c_ir[17:12] == 6'b111101) mech[M_CALL]++;
      if (state[0] == S_EXECUTE && c_ir[17:8] == 10'b1111110000) mech[M_RET]++;
      cycle <= cycle + 1;
    end
  end

  // fault injection
  always @(negedge clk) begin
    fault = '0;
    if (running) begin
      if (upset_inject && $urandom % 3 == 0) fault[0] = FAULT_W'(1) << ($urandom % 9);
      if (upset_inject && $urandom % 3 == 0) fault[2] = FAULT_W'(1) << ($urandom % 12);
      if (lut_inject && !fsm_err[1] && $urandom % 4 == 0) begin
        logic [2:0] nxt, bad;
        nxt = (state[1] == S_FETCH && dut.g_sys[1].u_sys.u_core.inst_ack_i) ? S_DECODE :
              (state[1] == S_FETCH) ? S_FETCH : (state[1] == S_DECODE) ? S_EXECUTE :
              (state[1] == S_EXECUTE) ? S_WRITEBACK : S_FETCH;
        bad = 3'd5 + 3'($urandom % 3);
        fault[1] = FAULT_W'(nxt ^ bad);
      end
    end
  end

  initial begin
    arch_t a;
    int t, t_end;
    word_t w;
    logic [7:0] padr, pdat;
    led_demo(prog);
    arch_reset(a);
    a.sys_ports = 1;
    n_exp = 0; t = 0;
    while (a.pc != 12'd10) begin
      w = prog[a.pc];
      if (arch_step(a, w, padr, pdat) && padr == 8'h51) begin
        exp_val[n_exp] = pdat;
        exp_cyc[n_exp] = t + 4;
        n_exp++;
      end
      t += sys_cycles(w);
    end
    t_end = t;
    foreach (mech[i]) mech[i] = 0;
    for (int g = 0; g < 3; g++) begin n_seen[g] = 0; prev_state[g] = S_FETCH; end
    cycle = 0; running = 0; lut_inject = 0; upset_inject = 0;
    load_we = 0; load_adr = 0; load_dat = 0;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      load_we = 1; load_adr = 12'(i); load_dat = prog[i];
    end
    @(negedge clk);
    load_we = 0;
    @(negedge clk);
    rst = 0;
    running = 1;
    upset_inject = 1;
    repeat (t_end + 20) @(posedge clk);
    lut_inject = 1;
    repeat (400) @(posedge clk);
    lut_inject = 0;
    upset_inject = 0;
    repeat (20) @(posedge clk);
    @(negedge clk);
    running = 0;
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (n_seen[g] != n_exp || led[g] !== 8'h0F) begin
        failures++; $display("FAIL[%0d] %0d LED writes (expected %0d), LED=%b", g, n_seen[g], n_exp, led[g]);
      end
      checks++;
      if (fsm_err[g] || !(state[g] inside {S_FETCH, S_DECODE, S_EXECUTE, S_WRITEBACK})) begin
        failures++; $display("FAIL[%0d] not running the spin loop at the end", g);
      end
    end
    checks++;
    if (c_iadr != 12'd10 && c_iadr != 12'd11) begin failures++; $display("FAIL TMR system left its loop"); end
    for (int m = 0; m < M_NUM; m++) begin
      $display("  %-22s %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism never happened: %s", mech_name[m]); end
    end
    $display("program: %0d LED writes, %0d cycles to the spin loop; final LEDs %b %b %b",
             n_exp, t_end, led[0], led[1], led[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
