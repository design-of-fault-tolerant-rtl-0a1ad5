// data_mem: data memory of the Gumnut processor (256 x 8 bits).
//
// A synchronous memory on the data bus. When cyc and stb are high it writes
// dat_i to adr_i if we_i is 1, or registers the byte at adr_i onto dat_o, and
// raises ack_o one clock later for one cycle. The 256-byte size follows the
// document; the one-cycle handshake is this design's choice.
module data_mem #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cyc_i,
  input  logic          stb_i,
  input  logic          we_i,
  output logic          ack_o,
  input  logic [AW-1:0] adr_i,
  input  logic [DW-1:0] dat_i,
  output logic [DW-1:0] dat_o
);
  logic [DW-1:0] mem [2**AW];
  logic          req;

  assign req = cyc_i && stb_i && !ack_o;

  always_ff @(posedge clk) begin
    if (req && we_i) mem[adr_i] <= dat_i;
    dat_o <= mem[adr_i];
  end

  always_ff @(posedge clk) begin
    if (rst) ack_o <= 1'b0;
    else     ack_o <= req;
  end
endmodule
