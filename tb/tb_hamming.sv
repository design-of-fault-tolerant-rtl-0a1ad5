// tb_hamming: checks the 8-bit / 12-bit Hamming encoder and decoder.
//
// For every data byte: the encoder output is compared with check bits
// computed from explicit position lists (e1 = parity of e3 e5 e7 e9 e11,
// e2 = e3 e6 e7 e10 e11, e4 = e5 e6 e7 e12, e8 = e9..e12); the decoder must
// return the byte with syndrome 0, and with each of the 12 bits flipped it
// must return the byte and a syndrome equal to the flipped position.
// Also checks the worked example: data 001 encodes to 0000_0000_0111.
module tb_hamming;
  logic [7:0]  data, ddata;
  logic [11:0] code, rx;
  logic [3:0]  syn;
  logic        err;
  int checks = 0, failures = 0;

  hamming_enc #(.DW(8)) u_enc (.data(data), .code(code));
  hamming_dec #(.DW(8)) u_dec (.code(rx), .data(ddata), .syndrome(syn), .err(err));

  function automatic logic [11:0] ref_code(logic [7:0] d);
    logic [12:1] e;
    e = '0;
    {e[12], e[11], e[10], e[9], e[7], e[6], e[5], e[3]} = d;
    e[1] = e[3] ^ e[5] ^ e[7] ^ e[9] ^ e[11];
    e[2] = e[3] ^ e[6] ^ e[7] ^ e[10] ^ e[11];
    e[4] = e[5] ^ e[6] ^ e[7] ^ e[12];
    e[8] = e[9] ^ e[10] ^ e[11] ^ e[12];
    return e;
  endfunction

  initial begin
    data = 8'h01; rx = '0; #1;
    checks++; if (code !== 12'h007) begin failures++; $display("FAIL example code=%b", code); end
    for (int v = 0; v < 256; v++) begin
      data = v[7:0]; #1;
      checks++;
      if (code !== ref_code(v[7:0])) begin failures++; $display("FAIL enc %h -> %b", v, code); end
      rx = code; #1;
      checks++;
      if (ddata !== v[7:0] || syn !== 0 || err) begin failures++; $display("FAIL dec clean %h", v); end
      for (int b = 0; b < 12; b++) begin
        rx = code ^ (12'h1 << b); #1;
        checks++;
        if (ddata !== v[7:0] || syn !== 4'(b + 1) || !err) begin
          failures++; $display("FAIL dec %h bit %0d: data=%h syn=%0d", v, b, ddata, syn);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
