// flit_decoder_tb: decodes the printed corrupted 96-bit example flit (a
// triple-adjacent error in every row, twelve bit errors in all) and expects
// the printed syndromes and the original 64-bit flit; then for random flits
// injects in each row independently nothing, a single error, or a double or
// triple adjacent error, and expects the flit back with the right per-row
// corrected flags, and injects 4..6-bit bursts into one row and expects that
// row's uncorrectable flag.
module flit_decoder_tb;
  import tb_ecc_pkg::*;

  logic [63:0] data, dout;
  logic [95:0] cw, rc, emask;
  logic [31:0] syn;
  logic [3:0]  corr, unc, exp_corr;
  int checks = 0, failures = 0;

  flit_encoder u_enc (.data_i(data), .code_o(cw));
  flit_decoder dut (.code_i(rc), .data_o(dout), .syn_o(syn), .corrected_o(corr), .uncorrectable_o(unc));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Example flit; errors at bits 1-3, 7-9, 15-17 and 19-21 of rows 1..4.
    rc = {rev24(24'b100001100010111010100011), rev24(24'b100111011011001011110101),
          rev24(24'b111001010100101100101000), rev24(24'b100111000100000111100000)};
    #1;
    checks++;
    if (dout != {rev16(16'b0000101101001111), rev16(16'b0011011010111001),
                 rev16(16'b1100110110010100), rev16(16'b1111000011110000)}
        || syn != {8'b11010011, 8'b01011001, 8'b00001110, 8'b11011100}
        || corr != 4'b1111 || unc != 0) begin
      failures++;
      $display("FAIL example flit dout=%h syn=%h", dout, syn);
    end
    for (int t = 0; t < 3000; t++) begin
      data = {$urandom, $urandom};
      emask = '0;
      exp_corr = '0;
      for (int r = 0; r < 4; r++) begin
        int w;
        w = int'($urandom_range(3, 0));
        if (w != 0) begin
          emask[r*24 +: 24] = burst(int'($urandom_range(24 - w, 0)), w);
          exp_corr[r] = 1'b1;
        end
      end
      #1;
      rc = cw ^ emask;
      #1;
      checks++;
      if (dout != data || corr != exp_corr || unc != 0) begin
        failures++;
        $display("FAIL data=%h emask=%h dout=%h corr=%b", data, emask, dout, corr);
      end
      begin
        int r, w;
        r = int'($urandom_range(3, 0));
        w = int'($urandom_range(6, 4));
        rc = cw ^ (96'(burst(int'($urandom_range(24 - w, 0)), w)) << (24 * r));
        #1;
        checks++;
        if (unc != (4'b1 << r)) begin
          failures++;
          $display("FAIL burst %0d in row %0d unc=%b", w, r, unc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
