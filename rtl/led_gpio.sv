// led_gpio: LED output peripheral on the processor's I/O port bus.
//
// Holds an 8-bit LED status register at port address LED_ADDR (0x51). An
// `out` to that address (cyc, stb and we high) loads port_dat_i into the
// register; an `inp` from it returns the register. The peripheral answers only
// its own address: ack_o rises one clock after the request, for one cycle.
// `led_enable` pulses in the cycle the register is written. The register
// name, its address 0101_0001 and its use for the 0000_1111 test pattern
// follow the document's simulation figures; the handshake timing is this
// design's choice. Synchronous, active-high reset clears the LEDs.
module led_gpio #(
  parameter logic [7:0] LED_ADDR = 8'h51
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       cyc_i,
  input  logic       stb_i,
  input  logic       we_i,
  output logic       ack_o,
  input  logic [7:0] adr_i,
  input  logic [7:0] dat_i,
  output logic [7:0] dat_o,
  output logic       led_enable,
  output logic [7:0] led_status
);
  logic sel;

  assign sel        = cyc_i && stb_i && (adr_i == LED_ADDR) && !ack_o;
  assign led_enable = sel && we_i;
  assign dat_o      = led_status;

  always_ff @(posedge clk) begin
    if (rst) begin
      ack_o      <= 1'b0;
      led_status <= '0;
    end else begin
      ack_o <= sel;
      if (led_enable) led_status <= dat_i;
    end
  end
endmodule
