// flit_encoder: encoder for a 64-bit network-on-chip flit.
//
// The flit is cut into CHUNKS rows of 16 bits (row A = data_i[15:0],
// row B = data_i[31:16], ...) and each row goes through its own (24,16)
// SEC-DED-TAEC-6AED encoder; the four 24-bit codewords are placed side by
// side to form the 96-bit encoded flit (row A in code_o[23:0]). Each row can
// thus have a triple-adjacent error corrected independently, up to twelve
// bit errors per flit. The split into four rows and the per-row encoders are
// the published structure; the row-to-bit mapping is this design's choice.
// Combinational.
module flit_encoder
  import ecc_pkg::K, ecc_pkg::N, ecc_pkg::syn_t;
#(
  parameter int CHUNKS = ecc_pkg::CHUNKS
) (
  input  logic [CHUNKS*K-1:0] data_i,
  output logic [CHUNKS*N-1:0] code_o
);

  for (genvar g = 0; g < CHUNKS; g++) begin : g_row
    syn_t unused_check;
    taec_enc16 u_enc (
      .data_i  (data_i[g*K +: K]),
      .code_o  (code_o[g*N +: N]),
      .check_o (unused_check)
    );
  end

endmodule
