// ft_risc_top: the three fault tolerant processor variants side by side.
//
// Instantiates one gumnut_system per state protection scheme: TMR state
// flip-flops, look-up-table next-state logic and Hamming-coded state. The
// three systems share clock, reset and the program load port, so they run the
// same program in lock step when no faults are injected; each has its own
// fault injection input and its own LED, state and error outputs, so the
// schemes can be compared under the same upsets.
module ft_risc_top
  import gumnut_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    load_we,
  input  logic [11:0]             load_adr,
  input  logic [17:0]             load_dat,
  input  logic [2:0][FAULT_W-1:0] fault_i,      // [0] TMR, [1] LUT, [2] ECC
  output state_t [2:0]            state_o,
  output logic   [2:0]            fsm_err_o,
  output logic   [2:0][7:0]       led_status,
  output logic   [2:0]            led_enable
);
  localparam ft_scheme_t SCHEME [3] = '{FT_TMR, FT_LUT, FT_ECC};

  for (genvar i = 0; i < 3; i++) begin : g_sys
    gumnut_system #(.FT(SCHEME[i])) u_sys (
      .clk(clk), .rst(rst),
      .load_we(load_we), .load_adr(load_adr), .load_dat(load_dat),
      .fault_i(fault_i[i]),
      .state_o(state_o[i]), .fsm_err_o(fsm_err_o[i]),
      .led_status(led_status[i]), .led_enable(led_enable[i])
    );
  end
endmodule
