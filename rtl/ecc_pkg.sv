// ecc_pkg: constants of the SEC-DED-TAEC-6AED (24,16) I5 code and of the
// 64-bit flit codec built from four copies of it.
//
// The code has k = 16 data bits, r = 8 check bits and an n = 24 bit codeword.
// Its parity-check matrix H has two parts: a top of three rows (check bits
// c1..c3) and a bottom of five rows (c4..c8) made of 5x5 identity matrices
// repeated along the codeword, so codeword position p (0-based) has a one in
// bottom row p mod 5. The check-bit equations, the order in which check and
// data bits are interleaved in the codeword and the worked examples all come
// from the published description of the code; the tables below are that
// description written out.
//
// Conventions used throughout:
//   * data chunk bit data[k-1] is message bit d_k (d1 .. d16);
//   * codeword bit code[p-1] is codeword position p (1 .. 24);
//   * syndrome / check vector bit [7] is c1 (H row 1), bit [0] is c8 (H row 8).
package ecc_pkg;

  localparam int K      = 16;            // data bits per chunk
  localparam int R      = 8;             // check bits per chunk
  localparam int N      = K + R;         // codeword bits per chunk (24)
  localparam int L      = 5;             // size of the repeated identity matrix
  localparam int CHUNKS = 4;             // rows a flit is split into
  localparam int FLIT_W = CHUNKS * K;    // 64-bit flit
  localparam int CODE_W = CHUNKS * N;    // 96-bit encoded flit

  typedef logic [K-1:0] chunk_t;
  typedef logic [N-1:0] cw_t;
  typedef logic [R-1:0] syn_t;

  // Kind of error a syndrome was matched to.
  typedef enum logic [1:0] {
    ERR_NONE   = 2'd0,   // zero syndrome, or an uncorrectable one
    ERR_SINGLE = 2'd1,
    ERR_DOUBLE = 2'd2,   // two adjacent bits
    ERR_TRIPLE = 2'd3    // three adjacent bits
  } err_class_e;

  // Codeword position (0-based) of data bit d_{i+1}.
  // V = (c1 d1 d2 d3 d4 c4 d5 c6 d6 c8 d7 c5 c3 c7 d8 d9 d10 d11 d12 d13 d14 c2 d15 d16)
  localparam int DATA_POS [K] = '{1, 2, 3, 4, 6, 8, 10, 14, 15, 16, 17, 18, 19, 20, 22, 23};

  // Codeword position (0-based) of check bit c_{j+1}.
  localparam int CHECK_POS [R] = '{0, 21, 12, 5, 11, 7, 13, 9};

  // Column p of H (codeword position p, 0-based); bit [7] is row 1.
  // Top three rows from the check-bit equations, bottom five from the I5 blocks.
  localparam logic [R-1:0] H_COL [N] = '{
    8'b100_10000, 8'b110_01000, 8'b100_00100, 8'b110_00010, 8'b100_00001,
    8'b000_10000, 8'b100_01000, 8'b000_00100, 8'b100_00010, 8'b000_00001,
    8'b001_10000, 8'b000_01000, 8'b001_00100, 8'b000_00010, 8'b001_00001,
    8'b010_10000, 8'b001_01000, 8'b010_00100, 8'b001_00010, 8'b010_00001,
    8'b101_10000, 8'b010_01000, 8'b101_00100, 8'b010_00010
  };

endpackage
