// flit_encoder_tb: encodes the printed 64-bit example flit and expects the
// printed 96-bit codeword row by row; for random flits checks that each
// 24-bit row has a zero syndrome and carries its 16 data bits.
module flit_encoder_tb;
  import tb_ecc_pkg::*;

  logic [63:0] data;
  logic [95:0] code;
  int checks = 0, failures = 0;

  flit_encoder dut (.data_i(data), .code_o(code));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = {rev16(16'b0000101101001111), rev16(16'b0011011010111001),
            rev16(16'b1100110110010100), rev16(16'b1111000011110000)};
    #1;
    checks++;
    if (code != {rev24(24'b100001100010111010011011), rev24(24'b100111011011000101110101),
                 rev24(24'b111001101100101100101000), rev24(24'b011111000100000111100000)}) begin
      failures++;
      $display("FAIL example flit code=%h", code);
    end
    for (int t = 0; t < 1000; t++) begin
      data = {$urandom, $urandom};
      #1;
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (syndrome(code[r*24 +: 24]) != 0 || extract(code[r*24 +: 24]) != data[r*16 +: 16]) begin
          failures++;
          $display("FAIL row %0d data=%h", r, data);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
