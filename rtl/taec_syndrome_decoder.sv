// taec_syndrome_decoder: syndrome decoder of the SEC-DED-TAEC-6AED (24,16) I5
// code.
//
// For every correctable pattern the syndrome is compared with the XOR of the
// H columns it covers: 24 single-bit patterns, 23 double-adjacent and 22
// triple-adjacent ones (all 69 syndromes are distinct). Codeword bit i is
// flagged in the error-location vector when any of the six patterns that
// cover it matches: single error at i, double at (i-1,i) or (i,i+1), triple
// at (i-2..i), (i-1..i+1) or (i..i+2). This is the OR structure of the
// published decoder circuit. A nonzero syndrome that matches no pattern is an
// uncorrectable, detected error (double random errors that do not alias a
// correctable pattern, and adjacent bursts of four to six bits); this flag is
// this design's addition for the network interface to report.
//
// Interface: syn_i[7] = H row 1; eloc_o[p-1] = codeword position p.
// Combinational.
module taec_syndrome_decoder
  import ecc_pkg::*;
(
  input  syn_t       syn_i,
  output cw_t        eloc_o,
  output logic       uncorrectable_o,
  output err_class_e err_class_o
);

  logic [N-1:0] m1;      // single error at bit i
  logic [N-2:0] m2;      // double adjacent error at bits i, i+1
  logic [N-3:0] m3;      // triple adjacent error at bits i .. i+2

  always_comb begin
    for (int i = 0; i < N; i++)
      m1[i] = (syn_i == H_COL[i]);
    for (int i = 0; i < N-1; i++)
      m2[i] = (syn_i == (H_COL[i] ^ H_COL[i+1]));
    for (int i = 0; i < N-2; i++)
      m3[i] = (syn_i == (H_COL[i] ^ H_COL[i+1] ^ H_COL[i+2]));
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      eloc_o[i] = m1[i]
                | (i >= 1 && m2[(i >= 1) ? i-1 : 0])
                | (i <= N-2 && m2[(i <= N-2) ? i : 0])
                | (i >= 2 && m3[(i >= 2) ? i-2 : 0])
                | (i >= 1 && i <= N-2 && m3[(i >= 1 && i <= N-2) ? i-1 : 0])
                | (i <= N-3 && m3[(i <= N-3) ? i : 0]);
    end
  end

  always_comb begin
    if (|m1)      err_class_o = ERR_SINGLE;
    else if (|m2) err_class_o = ERR_DOUBLE;
    else if (|m3) err_class_o = ERR_TRIPLE;
    else          err_class_o = ERR_NONE;
    uncorrectable_o = (syn_i != '0) && !(|m1) && !(|m2) && !(|m3);
  end

endmodule
