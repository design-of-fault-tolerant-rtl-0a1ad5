// inst_mem: instruction memory of the Gumnut processor (4096 x 18 bits).
//
// A synchronous-read memory on the instruction bus: when cyc and stb are
// high, the word at adr_i is registered onto dat_o and ack_o rises one clock
// later for one cycle (a request held for two cycles is acknowledged once).
// A separate load port (load_we, load_adr, load_dat) writes words, so a host
// or a testbench can place a program before releasing the processor's reset.
// The depth, 4096 words addressed by the 12-bit PC, follows the document; the
// one-cycle handshake and the load port are this design's choices. The array
// is left for the tool to map onto block memory.
module inst_mem #(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 18
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cyc_i,
  input  logic          stb_i,
  output logic          ack_o,
  input  logic [AW-1:0] adr_i,
  output logic [DW-1:0] dat_o,
  input  logic          load_we,
  input  logic [AW-1:0] load_adr,
  input  logic [DW-1:0] load_dat
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_adr] <= load_dat;
    dat_o <= mem[adr_i];
  end

  always_ff @(posedge clk) begin
    if (rst) ack_o <= 1'b0;
    else     ack_o <= cyc_i && stb_i && !ack_o;
  end
endmodule
