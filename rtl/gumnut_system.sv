// gumnut_system: one fault tolerant Gumnut processor with its memories and
// LED peripheral.
//
// Connects gumnut_core (control unit protected by scheme FT) to a 4096 x 18
// instruction memory, a 256 x 8 data memory and the LED GPIO peripheral at
// port address 0x51. Port addresses other than the LED register are answered
// by a default responder that acknowledges one clock later and reads zero, so
// a program touching an unmapped port never stalls. Programs are written into
// the instruction memory through the load port while rst is high. The core's
// fault injection input and state observation outputs are brought out.
module gumnut_system
  import gumnut_pkg::*;
#(
  parameter ft_scheme_t FT = FT_TMR
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               load_we,
  input  logic [11:0]        load_adr,
  input  logic [17:0]        load_dat,
  input  logic [FAULT_W-1:0] fault_i,
  output state_t             state_o,
  output logic               fsm_err_o,
  output logic [7:0]         led_status,
  output logic               led_enable
);
  localparam logic [7:0] LED_ADDR = 8'h51;

  logic        inst_cyc, inst_stb, inst_ack;
  logic [11:0] inst_adr;
  logic [17:0] inst_dat;
  logic        data_cyc, data_stb, data_we, data_ack;
  logic [7:0]  data_adr, data_wdat, data_rdat;
  logic        port_cyc, port_stb, port_we, port_ack;
  logic [7:0]  port_adr, port_wdat, port_rdat;
  logic        led_ack, dflt_ack;
  logic [7:0]  led_rdat;

  gumnut_core #(.FT(FT)) u_core (
    .clk(clk), .rst(rst),
    .inst_cyc_o(inst_cyc), .inst_stb_o(inst_stb), .inst_ack_i(inst_ack),
    .inst_adr_o(inst_adr), .inst_dat_i(inst_dat),
    .data_cyc_o(data_cyc), .data_stb_o(data_stb), .data_we_o(data_we),
    .data_ack_i(data_ack), .data_adr_o(data_adr), .data_dat_o(data_wdat),
    .data_dat_i(data_rdat),
    .port_cyc_o(port_cyc), .port_stb_o(port_stb), .port_we_o(port_we),
    .port_ack_i(port_ack), .port_adr_o(port_adr), .port_dat_o(port_wdat),
    .port_dat_i(port_rdat),
    .fault_i(fault_i), .state_o(state_o), .fsm_err_o(fsm_err_o)
  );

  inst_mem u_imem (
    .clk(clk), .rst(rst),
    .cyc_i(inst_cyc), .stb_i(inst_stb), .ack_o(inst_ack),
    .adr_i(inst_adr), .dat_o(inst_dat),
    .load_we(load_we), .load_adr(load_adr), .load_dat(load_dat)
  );

  data_mem u_dmem (
    .clk(clk), .rst(rst),
    .cyc_i(data_cyc), .stb_i(data_stb), .we_i(data_we), .ack_o(data_ack),
    .adr_i(data_adr), .dat_i(data_wdat), .dat_o(data_rdat)
  );

  led_gpio #(.LED_ADDR(LED_ADDR)) u_led (
    .clk(clk), .rst(rst),
    .cyc_i(port_cyc), .stb_i(port_stb), .we_i(port_we), .ack_o(led_ack),
    .adr_i(port_adr), .dat_i(port_wdat), .dat_o(led_rdat),
    .led_enable(led_enable), .led_status(led_status)
  );

  // default responder for unmapped port addresses
  always_ff @(posedge clk) begin
    if (rst) dflt_ack <= 1'b0;
    else     dflt_ack <= port_cyc && port_stb && (port_adr != LED_ADDR) && !dflt_ack;
  end

  assign port_ack  = led_ack || dflt_ack;
  assign port_rdat = led_ack ? led_rdat : 8'h00;
endmodule
