// tb_fault_pkg: error patterns for the 96-bit encoded flit, used by the NI
// and mesh testbenches. Each 24-bit row gets an adjacent burst of a chosen
// width at a random position; widths 1..3 must be corrected, 4..6 detected.
package tb_fault_pkg;

  function automatic logic [23:0] row_burst(input int w);
    logic [23:0] m;
    int p;
    m = '0;
    if (w > 0) begin
      p = $urandom_range(24 - w, 0);
      for (int i = 0; i < w; i++) m[p+i] = 1'b1;
    end
    return m;
  endfunction

  // widths[r] is the burst width for row r (row 0 = bits 23:0).
  function automatic logic [95:0] flit_mask(input int widths [4]);
    logic [95:0] m;
    for (int r = 0; r < 4; r++) m[r*24 +: 24] = row_burst(widths[r]);
    return m;
  endfunction

endpackage
