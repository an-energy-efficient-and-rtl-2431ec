// taec_enc16_tb: checks the (24,16) encoder against the two printed encoding
// examples (the 1010... data word and the four rows of the 64-bit example
// flit) and, for random data, that every codeword has a zero syndrome under
// an independently written H and carries the data bits in their places.
module taec_enc16_tb;
  import tb_ecc_pkg::*;

  logic [15:0] data;
  logic [23:0] code;
  logic [7:0]  check;
  int checks = 0, failures = 0;

  taec_enc16 dut (.data_i(data), .code_o(code), .check_o(check));

  task automatic expect_cw(input logic [15:0] d_lr, input logic [23:0] v_lr, input logic [7:0] c_lr);
    data = rev16(d_lr);
    #1;
    checks++;
    if (code !== rev24(v_lr) || check !== c_lr) begin
      failures++;
      $display("FAIL d=%b code=%b check=%b", d_lr, rev24(code), check);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example of the code: d = 1010..., C = 010 01011.
    expect_cw(16'b1010101010101010, 24'b010100100111010101010110, 8'b01001011);
    // Four rows of the 64-bit example flit.
    expect_cw(16'b1111000011110000, 24'b011111000100000111100000, 8'b00010001);
    expect_cw(16'b1100110110010100, 24'b111001101100101100101000, 8'b10110001);
    expect_cw(16'b0011011010111001, 24'b100111011011000101110101, 8'b11011100);
    expect_cw(16'b0000101101001111, 24'b100001100010111010011011, 8'b10110010);
    for (int t = 0; t < 2000; t++) begin
      data = 16'($urandom);
      #1;
      checks++;
      if (syndrome(code) != 8'h00 || extract(code) != data) begin
        failures++;
        $display("FAIL random d=%h code=%h", data, code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
