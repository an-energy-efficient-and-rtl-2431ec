// tb_ecc_pkg: reference helpers for the ECC testbenches.
//
// The parity-check matrix is written here row by row, as 24-character
// strings read left to right from codeword position 1 to 24, which is how
// the code is usually printed. It is kept apart from the RTL tables (which
// are column-wise) so that the testbenches check the RTL against a second,
// independently written copy of H. The printed example vectors of the code
// are also given left to right and converted with rev24/rev16.
package tb_ecc_pkg;

  function automatic logic [23:0] rev24(input logic [23:0] x);
    for (int i = 0; i < 24; i++) rev24[i] = x[23-i];
  endfunction

  function automatic logic [15:0] rev16(input logic [15:0] x);
    for (int i = 0; i < 16; i++) rev16[i] = x[15-i];
  endfunction

  function automatic logic [7:0] rev8(input logic [7:0] x);
    for (int i = 0; i < 8; i++) rev8[i] = x[7-i];
  endfunction

  // H rows, position 1 leftmost.
  function automatic logic [23:0] h_row(input int r);
    case (r)
      0: h_row = rev24(24'b111110101000000000001010);
      1: h_row = rev24(24'b010100000000000101010101);
      2: h_row = rev24(24'b000000000010101010101010);
      3: h_row = rev24(24'b100001000010000100001000);
      4: h_row = rev24(24'b010000100001000010000100);
      5: h_row = rev24(24'b001000010000100001000010);
      6: h_row = rev24(24'b000100001000010000100001);
      default: h_row = rev24(24'b000010000100001000010000);
    endcase
  endfunction

  // Syndrome of a 24-bit vector, bit [7] = row 1.
  function automatic logic [7:0] syndrome(input logic [23:0] v);
    for (int r = 0; r < 8; r++) syndrome[7-r] = ^(v & h_row(r));
  endfunction

  // Codeword positions (0-based) of d1..d16.
  function automatic int dpos(input int k);
    int t [16] = '{1, 2, 3, 4, 6, 8, 10, 14, 15, 16, 17, 18, 19, 20, 22, 23};
    return t[k];
  endfunction

  function automatic logic [15:0] extract(input logic [23:0] v);
    for (int k = 0; k < 16; k++) extract[k] = v[dpos(k)];
  endfunction

  // Burst of w ones starting at 0-based position p.
  function automatic logic [23:0] burst(input int p, input int w);
    burst = '0;
    for (int i = 0; i < w; i++) if (p + i < 24) burst[p+i] = 1'b1;
  endfunction

endpackage
