// flit_decoder: decoder for a 96-bit encoded flit.
//
// The received flit is split back into CHUNKS 24-bit codewords (row A in
// code_i[23:0]) and each goes through its own (24,16) decoder in parallel,
// giving the corrected 64-bit flit (row A in data_o[15:0]). Per row the
// decoder reports whether an error was corrected and whether one was
// detected but could not be corrected. Parallel per-row decoding is the
// published structure; the status outputs are this design's addition.
// Combinational.
module flit_decoder
  import ecc_pkg::K, ecc_pkg::N, ecc_pkg::R, ecc_pkg::cw_t, ecc_pkg::err_class_e;
#(
  parameter int CHUNKS = ecc_pkg::CHUNKS
) (
  input  logic [CHUNKS*N-1:0] code_i,
  output logic [CHUNKS*K-1:0] data_o,
  output logic [CHUNKS*R-1:0] syn_o,
  output logic [CHUNKS-1:0]   corrected_o,
  output logic [CHUNKS-1:0]   uncorrectable_o
);

  for (genvar g = 0; g < CHUNKS; g++) begin : g_row
    cw_t        unused_eloc;
    err_class_e unused_class;
    taec_dec16 u_dec (
      .code_i          (code_i[g*N +: N]),
      .data_o          (data_o[g*K +: K]),
      .syn_o           (syn_o[g*R +: R]),
      .eloc_o          (unused_eloc),
      .err_class_o     (unused_class),
      .corrected_o     (corrected_o[g]),
      .uncorrectable_o (uncorrectable_o[g])
    );
  end

endmodule
