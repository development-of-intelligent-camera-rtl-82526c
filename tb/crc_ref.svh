// Reference CRC-32 for testbenches: polynomial x^32+x^26+x^23+x^22+x^16+
// x^12+x^11+x^10+x^8+x^7+x^5+x^4+x^2+x+1, register preset to all ones,
// bits fed most significant first, no final inversion. Written as a
// bit-serial shift register, independently of the RTL function.
function automatic logic [31:0] ref_crc(input logic [63:0] words[$]);
  logic [31:0] r;
  logic fb;
  r = 32'hFFFFFFFF;
  foreach (words[k])
    for (int b = 63; b >= 0; b--) begin
      fb = r[31] ^ words[k][b];
      r = r << 1;
      if (fb) r = r ^ {6'b000001, 2'b00, 8'b11000001, 8'b00011101, 8'b10110111};
    end
  return r;
endfunction
