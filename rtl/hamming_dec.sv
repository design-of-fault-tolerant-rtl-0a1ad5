// hamming_dec: Hamming decoder with single-bit error correction.
//
// Recomputes every check bit from the received code word (same bit numbering
// as hamming_enc: e1..eCW, check bits at powers of two) and XORs it with the
// received check bit. The result, the syndrome, is 0 when the word is intact;
// otherwise it is the position of the flipped bit, which is inverted before
// the data bits are extracted. `err` is 1 for a non-zero syndrome. A syndrome
// beyond CW (only possible with several flipped bits) corrects nothing.
// Purely combinational; default DW = 8 with a 12-bit code word.
module hamming_dec #(
  parameter int unsigned DW = 8,
  parameter int unsigned PW = hamming_pw(DW),
  parameter int unsigned CW = DW + PW
) (
  input  logic [CW-1:0] code,
  output logic [DW-1:0] data,
  output logic [PW-1:0] syndrome,
  output logic          err
);
  function automatic int unsigned hamming_pw(input int unsigned n);
    int unsigned p = 0;
    while ((2**p) < n + p + 1) p++;
    return p;
  endfunction

  logic [CW-1:0] fixed;

  always_comb begin
    int unsigned j;
    syndrome = '0;
    for (int unsigned k = 0; k < PW; k++) begin
      for (int unsigned pos = 1; pos <= CW; pos++) begin
        if (((pos >> k) & 1) == 1)
          syndrome[k] = syndrome[k] ^ code[pos-1];
      end
    end
    fixed = code;
    for (int unsigned pos = 1; pos <= CW; pos++) begin
      if (syndrome == PW'(pos))
        fixed[pos-1] = ~code[pos-1];
    end
    data = '0;
    j = 0;
    for (int unsigned pos = 1; pos <= CW; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        data[j] = fixed[pos-1];
        j++;
      end
    end
    err = (syndrome != '0);
  end
endmodule
