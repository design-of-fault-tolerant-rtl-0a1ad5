// tb_gumnut_system: runs the LED demonstration program on a complete system
// (core, instruction and data memory, LED peripheral) for each controller.
//
// The program is written through the instruction memory's load port while
// reset is high. An instruction-level reference model runs the same program;
// every LED register write (led_enable pulse) must carry the model's value
// and occur on the clock cycle predicted from the per-instruction cycle
// counts (Fetch 2, Decode 1, Execute 1, Memory 2 for memory and I/O
// instructions, Write Back 1 except for stores). The run ends with
// 0000_1111 on the LEDs, the value the demonstration writes last.
module tb_gumnut_system;
  import gumnut_pkg::*;
  import gumnut_asm_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic load_we;
  logic [11:0] load_adr;
  logic [17:0] load_dat;
  word_t prog [4096];
  int checks = 0, failures = 0;
  int cycle;

  // expected LED writes: value and cycle
  logic [7:0] exp_val [16];
  int exp_cyc [16];
  int n_exp;

  logic [2:0] led_en;
  logic [2:0][7:0] led;
  int n_seen [3];

  for (genvar g = 0; g < 3; g++) begin : g_sys
    localparam ft_scheme_t FT = (g == 0) ? FT_TMR : (g == 1) ? FT_LUT : FT_ECC;
    state_t st;
    logic err;
    gumnut_system #(.FT(FT)) dut (
      .clk(clk), .rst(rst), .load_we(load_we), .load_adr(load_adr), .load_dat(load_dat),
      .fault_i('0), .state_o(st), .fsm_err_o(err), .led_status(led[g]), .led_enable(led_en[g])
    );
  end

  always @(posedge clk) begin
    if (!rst) begin
      for (int g = 0; g < 3; g++) begin
        if (led_en[g]) begin
          checks++;
          if (n_seen[g] >= n_exp) begin
            failures++; $display("FAIL[%0d] unexpected LED write at cycle %0d", g, cycle);
          end else if (g_sys_data(g) !== exp_val[n_seen[g]] || cycle != exp_cyc[n_seen[g]]) begin
            failures++;
            $display("FAIL[%0d] LED write %0d: value %h at cycle %0d, expected %h at %0d", g, n_seen[g],
                     g_sys_data(g), cycle, exp_val[n_seen[g]], exp_cyc[n_seen[g]]);
          end
          n_seen[g]++;
        end
      end
      cycle <= cycle + 1;
    end
  end

  // value being written to the LED register by system g
  function automatic logic [7:0] g_sys_data(int g);
    case (g)
      0: return g_sys[0].dut.u_core.port_dat_o;
      1: return g_sys[1].dut.u_core.port_dat_o;
      default: return g_sys[2].dut.u_core.port_dat_o;
    endcase
  endfunction

  initial begin
    arch_t a;
    int t;
    logic [7:0] padr, pdat;
    led_demo(prog);
    // reference: run until the spin loop at address 10
    arch_reset(a);
    a.sys_ports = 1;
    n_exp = 0; t = 0;
    while (a.pc != 12'd10) begin
      word_t w;
      w = prog[a.pc];
      if (arch_step(a, w, padr, pdat) && padr == 8'h51) begin
        exp_val[n_exp] = pdat;
        exp_cyc[n_exp] = t + 4;       // first cycle of the Memory state
        n_exp++;
      end
      t += sys_cycles(w);
    end
    for (int g = 0; g < 3; g++) n_seen[g] = 0;
    cycle = 0;
    load_we = 0; load_adr = 0; load_dat = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      load_we = 1; load_adr = 12'(i); load_dat = prog[i];
    end
    @(negedge clk);
    load_we = 0;
    @(negedge clk);
    rst = 0;
    repeat (t + 40) @(posedge clk);
    @(negedge clk);
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (n_seen[g] != n_exp || led[g] !== 8'h0F) begin
        failures++; $display("FAIL[%0d] %0d LED writes (expected %0d), LED=%b", g, n_seen[g], n_exp, led[g]);
      end
    end
    $display("program: %0d LED writes, %0d cycles to the spin loop", n_exp, t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
