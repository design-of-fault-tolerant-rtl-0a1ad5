// tb_gumnut_core: runs random Gumnut programs on the core and compares it,
// instruction by instruction, with an instruction-level reference model.
//
// The testbench holds the instruction memory, data memory and I/O ports
// itself; each bus answers after a random 0..2 wait states, so every state
// that waits for an acknowledge (Fetch, Memory) is stretched. For each
// instruction it checks:
//   - the fetch address against the reference model's PC trace (this covers
//     ALU results and flags through the branches that test them, and jumps,
//     jsb/ret and branches directly);
//   - every data memory store and every I/O `out` (address and data), and
//     the data returned by loads and `inp`;
//   - the number of clock cycles from one instruction fetch to the next:
//     Decode 1 + Execute 1 + Memory (1 + waits, memory instructions only)
//     + Write Back (1, except for stores) + Fetch (1 + waits).
// The run is repeated for each controller, TMR, LUT and ECC. For TMR and
// ECC, single-bit upsets are injected into the state storage on about one
// clock in four: the core must still follow the reference exactly, with the
// same cycle counts. The LUT controller runs without upsets here.
module tb_gumnut_core;
  import gumnut_pkg::*;
  import gumnut_asm_pkg::*;

  localparam int NINST = 3000;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0] done;
  int c_checks [3], c_fail [3], c_upsets [3], c_waits [3], c_mem [3];

  for (genvar g = 0; g < 3; g++) begin : g_run
    localparam ft_scheme_t FT = (g == 0) ? FT_TMR : (g == 1) ? FT_LUT : FT_ECC;
    logic rst;
    logic inst_cyc, inst_stb, inst_ack;
    logic [11:0] inst_adr;
    logic [17:0] inst_dat;
    logic data_cyc, data_stb, data_we, data_ack;
    logic [7:0] data_adr, data_wdat, data_rdat;
    logic port_cyc, port_stb, port_we, port_ack;
    logic [7:0] port_adr, port_wdat, port_rdat;
    logic [FAULT_W-1:0] fault;
    state_t state;
    logic fsm_err;

    gumnut_core #(.FT(FT)) dut (
      .clk(clk), .rst(rst),
      .inst_cyc_o(inst_cyc), .inst_stb_o(inst_stb), .inst_ack_i(inst_ack),
      .inst_adr_o(inst_adr), .inst_dat_i(inst_dat),
      .data_cyc_o(data_cyc), .data_stb_o(data_stb), .data_we_o(data_we),
      .data_ack_i(data_ack), .data_adr_o(data_adr), .data_dat_o(data_wdat), .data_dat_i(data_rdat),
      .port_cyc_o(port_cyc), .port_stb_o(port_stb), .port_we_o(port_we),
      .port_ack_i(port_ack), .port_adr_o(port_adr), .port_dat_o(port_wdat), .port_dat_i(port_rdat),
      .fault_i(fault), .state_o(state), .fsm_err_o(fsm_err)
    );

    word_t       prog [4096];
    logic [7:0]  dmem [256];
    arch_t       ref_a;
    logic [11:0] pc_trace [NINST + 1];
    int          icnt, dcnt, pcnt, iwait, dwait, pwait;

    // bus models: ack after a random number of wait states
    assign inst_ack  = inst_cyc && inst_stb && (icnt == iwait);
    assign inst_dat  = prog[inst_adr];
    assign data_ack  = data_cyc && data_stb && (dcnt == dwait);
    assign data_rdat = dmem[data_adr];
    assign port_ack  = port_cyc && port_stb && (pcnt == pwait);
    assign port_rdat = port_in_value(port_adr);

    always_ff @(posedge clk) begin
      icnt <= (inst_cyc && !inst_ack) ? icnt + 1 : 0;
      dcnt <= (data_cyc && !data_ack) ? dcnt + 1 : 0;
      pcnt <= (port_cyc && !port_ack) ? pcnt + 1 : 0;
      if (inst_ack) iwait <= $urandom % 3;
      if (data_ack) dwait <= $urandom % 3;
      if (port_ack) pwait <= $urandom % 3;
      if (data_ack && data_we) dmem[data_adr] <= data_wdat;
      if (FT != FT_LUT && !rst && $urandom % 4 == 0) begin
        fault <= FAULT_W'(1) << ($urandom % ((FT == FT_TMR) ? 9 : 12));
        c_upsets[g]++;
      end else begin
        fault <= '0;
      end
    end

    initial begin
      int ninst, cyc, exp_cyc, last_wait_m;
      logic [7:0] padr, pdat;
      word_t prev;
      bit started;
      c_checks[g] = 0; c_fail[g] = 0; c_upsets[g] = 0; c_waits[g] = 0; c_mem[g] = 0;
      done[g] = 0;
      rst = 1; icnt = 0; dcnt = 0; pcnt = 0; iwait = 1; dwait = 2; pwait = 0; fault = '0;
      foreach (prog[i]) prog[i] = random_inst(4096);
      foreach (dmem[i]) dmem[i] = 0;
      // reference PC trace
      arch_reset(ref_a);
      for (int k = 0; k <= NINST; k++) begin
        pc_trace[k] = ref_a.pc;
        void'(arch_step(ref_a, prog[ref_a.pc], padr, pdat));
      end
      arch_reset(ref_a);
      repeat (3) @(negedge clk);
      rst = 0;
      ninst = 0; cyc = 0; started = 0; exp_cyc = 0; last_wait_m = 0; prev = '0;
      while (ninst < NINST) begin
        @(posedge clk);
        cyc++;
        if (inst_ack) begin
          // cycle count of the previous instruction plus this fetch
          if (started) begin
            exp_cyc = 2 + 1 + icnt;
            if (prev[17:16] == 2'b10) exp_cyc += 1 + last_wait_m;
            if (!(prev[17:16] == 2'b10 && prev[14])) exp_cyc += 1;
            c_checks[g]++;
            if (cyc != exp_cyc) begin
              c_fail[g]++;
              $display("FAIL[%0d] inst %0d took %0d cycles, expected %0d", g, ninst, cyc, exp_cyc);
            end
          end
          c_waits[g] += icnt;
          started = 1;
          cyc = 0;
          c_checks[g]++;
          if (inst_adr !== pc_trace[ninst]) begin
            c_fail[g]++;
            $display("FAIL[%0d] inst %0d fetched from %h, expected %h", g, ninst, inst_adr, pc_trace[ninst]);
          end
          prev = prog[inst_adr];
          // expected bus events of this instruction
          begin
            bit is_out;
            word_t w;
            logic [7:0] ad;
            w = prog[ref_a.pc];
            ad = ref_a.r[w[10:8]] + w[7:0];
            is_out = arch_step(ref_a, w, padr, pdat);
            if (w[17:16] == 2'b10) begin
              // wait for this instruction's memory access and compare it
              while (!(data_ack || port_ack)) @(posedge clk) cyc++;
              c_mem[g]++;
              last_wait_m = (data_ack ? dcnt : pcnt);
              c_checks[g]++;
              if (w[15] != port_ack || (port_ack ? port_adr : data_adr) !== ad
                  || (w[14] && (port_ack ? port_we : data_we) !== 1'b1)) begin
                c_fail[g]++;
                $display("FAIL[%0d] inst %0d bus access adr=%h expected %h", g, ninst, port_ack ? port_adr : data_adr, ad);
              end
              if (w[14]) begin
                c_checks[g]++;
                if ((port_ack ? port_wdat : data_wdat) !== (is_out ? pdat : ref_a.dmem[ad])) begin
                  c_fail[g]++;
                  $display("FAIL[%0d] inst %0d store data %h", g, ninst, port_ack ? port_wdat : data_wdat);
                end
              end
            end
          end
          ninst++;
        end
      end
      done[g] = 1;
    end
  end

  initial begin
    wait (&done);
    for (int g = 0; g < 3; g++) begin
      checks += c_checks[g];
      failures += c_fail[g];
      $display("controller %0d: %0d checks, %0d failures, %0d upsets, %0d fetch waits, %0d memory accesses",
               g, c_checks[g], c_fail[g], c_upsets[g], c_waits[g], c_mem[g]);
      checks++;
      if (c_waits[g] == 0 || c_mem[g] == 0) failures++;
    end
    checks++;
    if (c_upsets[0] == 0 || c_upsets[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NINST * 14) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
