// taec_syndrome_decoder_tb: drives the syndrome decoder with the syndrome of
// every single, double-adjacent and triple-adjacent error (computed with an
// independent copy of H) and expects exactly that error-location vector;
// expects a detected-uncorrectable flag for every 4-, 5- and 6-bit adjacent
// burst, no error for a zero syndrome, and for all random double errors that
// none is mistaken for a single-bit error.
module taec_syndrome_decoder_tb;
  import tb_ecc_pkg::*;
  import ecc_pkg::*;

  logic [7:0]  syn;
  logic [23:0] eloc;
  logic        unc;
  err_class_e  cls;
  int checks = 0, failures = 0;

  taec_syndrome_decoder dut (.syn_i(syn), .eloc_o(eloc), .uncorrectable_o(unc), .err_class_o(cls));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    syn = '0;
    #1;
    checks++;
    if (eloc != '0 || unc || cls != ERR_NONE) begin failures++; $display("FAIL zero syndrome"); end
    for (int w = 1; w <= 3; w++)
      for (int p = 0; p + w <= 24; p++) begin
        syn = syndrome(burst(p, w));
        #1;
        checks++;
        if (eloc != burst(p, w) || unc || int'(cls) != w) begin
          failures++;
          $display("FAIL w=%0d p=%0d eloc=%b unc=%b", w, p, rev24(eloc), unc);
        end
      end
    for (int w = 4; w <= 6; w++)
      for (int p = 0; p + w <= 24; p++) begin
        syn = syndrome(burst(p, w));
        #1;
        checks++;
        if (!unc || eloc != '0) begin
          failures++;
          $display("FAIL burst w=%0d p=%0d not detected", w, p);
        end
      end
    for (int a = 0; a < 24; a++)
      for (int b = a + 1; b < 24; b++) begin
        syn = syndrome(burst(a, 1) | burst(b, 1));
        #1;
        checks++;
        if (syn == 0 || cls == ERR_SINGLE) begin
          failures++;
          $display("FAIL double error %0d,%0d taken for a single", a, b);
        end
      end
    // Syndrome printed for the worked triple-error example (bits 4..6).
    syn = 8'b01010011;
    #1;
    checks++;
    if (eloc != rev24(24'b000111000000000000000000)) begin failures++; $display("FAIL example"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
