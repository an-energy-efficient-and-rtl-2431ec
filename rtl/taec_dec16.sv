// taec_dec16: SEC-DED-TAEC-6AED (24,16) I5 decoder for one 24-bit codeword.
//
// Three combinational steps, as in the published decoding procedure:
//   1. syndrome S = H * rc: XOR of the H columns of all set codeword bits;
//   2. the syndrome decoder turns S into an error-location vector E_LOC;
//   3. u = rc XOR E_LOC, and the 16 data bits are taken out of u.
// corrected_o is raised when a correctable pattern was found and
// uncorrectable_o when S is nonzero but matches none; in that case the data
// is passed on uncorrected. The two status outputs are this design's choice.
//
// Interface: code_i[p-1] = codeword position p; data_o[k-1] = d_k;
// syn_o[7] = H row 1. Combinational.
module taec_dec16
  import ecc_pkg::*;
(
  input  cw_t        code_i,
  output chunk_t     data_o,
  output syn_t       syn_o,
  output cw_t        eloc_o,
  output err_class_e err_class_o,
  output logic       corrected_o,
  output logic       uncorrectable_o
);

  cw_t fixed;

  always_comb begin
    syn_o = '0;
    for (int p = 0; p < N; p++)
      if (code_i[p]) syn_o ^= H_COL[p];
  end

  taec_syndrome_decoder u_sdec (
    .syn_i           (syn_o),
    .eloc_o          (eloc_o),
    .uncorrectable_o (uncorrectable_o),
    .err_class_o     (err_class_o)
  );

  assign fixed       = code_i ^ eloc_o;
  assign corrected_o = (err_class_o != ERR_NONE);

  always_comb
    for (int i = 0; i < K; i++) data_o[i] = fixed[DATA_POS[i]];

endmodule
