// taec_enc16: SEC-DED-TAEC-6AED (24,16) I5 encoder for one 16-bit chunk.
//
// Purely combinational. The eight check bits are XOR trees over the data
// bits (c1..c3 from the top rows of H, c4..c8 from the repeated 5x5 identity
// rows, where c4 and c5 also take in c1 and c2 because those check bits share
// an identity row with them). The check bits are then interleaved with the data as
//   V = (c1 d1 d2 d3 d4 c4 d5 c6 d6 c8 d7 c5 c3 c7 d8 d9 d10 d11 d12 d13 d14 c2 d15 d16)
// so that every check bit sits in its own column of H. Equations and order
// follow the published code; the bit numbering of the ports is this design's
// choice (see ecc_pkg).
//
// Interface: data_i[k-1] = d_k, code_o[p-1] = codeword position p,
// check_o[7] = c1 .. check_o[0] = c8. No clock: zero-cycle latency.
module taec_enc16
  import ecc_pkg::*;
(
  input  chunk_t data_i,
  output cw_t    code_o,
  output syn_t   check_o
);

  logic [16:1] d;
  logic [8:1]  c;

  assign d = data_i;

  always_comb begin
    c[1] = d[1] ^ d[2] ^ d[3] ^ d[4] ^ d[5] ^ d[6] ^ d[14] ^ d[15];
    c[2] = d[1] ^ d[3] ^ d[9] ^ d[11] ^ d[13] ^ d[16];
    c[3] = d[7] ^ d[8] ^ d[10] ^ d[12] ^ d[14] ^ d[15];
    c[4] = c[1] ^ d[7] ^ d[9] ^ d[14];
    c[5] = d[1] ^ d[5] ^ d[10] ^ c[2];
    c[6] = d[2] ^ c[3] ^ d[11] ^ d[15];
    c[7] = d[3] ^ d[6] ^ d[12] ^ d[16];
    c[8] = d[4] ^ d[8] ^ d[13];
  end

  always_comb begin
    code_o = '0;
    for (int i = 0; i < K; i++) code_o[DATA_POS[i]]  = d[i+1];
    for (int j = 0; j < R; j++) code_o[CHECK_POS[j]] = c[j+1];
    for (int j = 0; j < R; j++) check_o[R-1-j]       = c[j+1];
  end

endmodule
