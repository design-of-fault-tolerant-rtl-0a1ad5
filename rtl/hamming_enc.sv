// hamming_enc: Hamming encoder, DW data bits to a CW-bit code word.
//
// Code word bit positions are numbered 1..CW (e1..eCW). Positions that are
// powers of two (e1, e2, e4, e8) hold check bits; the others hold the data
// bits in order, d1 at e3, d2 at e5, d3 at e6 and so on up to d8 at e12.
// Check bit e(2^k) is the XOR of every other position whose index has bit k
// set; for example e2 = e3 ^ e6 ^ e7 ^ e10 ^ e11. Bit i-1 of `code` is e(i).
// With the default DW = 8 the code word has 12 bits, as in the document;
// state 001 encodes to 0000_0000_0111. Purely combinational.
module hamming_enc #(
  parameter int unsigned DW = 8,
  parameter int unsigned PW = hamming_pw(DW),
  parameter int unsigned CW = DW + PW
) (
  input  logic [DW-1:0] data,
  output logic [CW-1:0] code
);
  function automatic int unsigned hamming_pw(input int unsigned n);
    int unsigned p = 0;
    while ((2**p) < n + p + 1) p++;
    return p;
  endfunction

  always_comb begin
    int unsigned j;
    code = '0;
    j = 0;
    // place data bits at the positions that are not powers of two
    for (int unsigned pos = 1; pos <= CW; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        code[pos-1] = data[j];
        j++;
      end
    end
    // check bits
    for (int unsigned k = 0; k < PW; k++) begin
      for (int unsigned pos = 1; pos <= CW; pos++) begin
        if (((pos >> k) & 1) == 1 && pos != (1 << k))
          code[(1<<k)-1] = code[(1<<k)-1] ^ code[pos-1];
      end
    end
  end
endmodule
