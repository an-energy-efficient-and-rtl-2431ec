// taec_dec16_tb: for random data words, encodes with the chunk encoder,
// corrupts the codeword with every single, double-adjacent and
// triple-adjacent error pattern and expects the original data back with the
// corrected flag; corrupts with 4- to 6-bit adjacent bursts and expects the
// uncorrectable flag; decodes the printed worked example (bits 4..6 in error,
// syndrome 0101 0011).
module taec_dec16_tb;
  import tb_ecc_pkg::*;
  import ecc_pkg::*;

  logic [15:0] data, dout;
  logic [23:0] cw, rc, eloc;
  logic [7:0]  syn, chk;
  err_class_e  cls;
  logic        corr, unc;
  int checks = 0, failures = 0;

  taec_enc16 u_enc (.data_i(data), .code_o(cw), .check_o(chk));
  taec_dec16 dut (.code_i(rc), .data_o(dout), .syn_o(syn), .eloc_o(eloc),
                  .err_class_o(cls), .corrected_o(corr), .uncorrectable_o(unc));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Printed example: rc = 01001 11001 11010 10101 0110.
    rc = rev24(24'b010011100111010101010110);
    #1;
    checks++;
    if (syn != 8'b01010011 || eloc != rev24(24'b000111000000000000000000)
        || dout != rev16(16'b1010101010101010) || !corr || unc) begin
      failures++;
      $display("FAIL worked example syn=%b eloc=%b", syn, rev24(eloc));
    end
    for (int t = 0; t < 40; t++) begin
      data = 16'($urandom);
      #1;
      rc = cw;
      #1;
      checks++;
      if (dout != data || corr || unc || syn != 0) begin failures++; $display("FAIL clean"); end
      for (int w = 1; w <= 6; w++)
        for (int p = 0; p + w <= 24; p++) begin
          rc = cw ^ burst(p, w);
          #1;
          checks++;
          if (w <= 3) begin
            if (dout != data || !corr || unc) begin
              failures++;
              $display("FAIL w=%0d p=%0d data=%h dout=%h", w, p, data, dout);
            end
          end else if (!unc || corr) begin
            failures++;
            $display("FAIL burst w=%0d p=%0d not detected", w, p);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
