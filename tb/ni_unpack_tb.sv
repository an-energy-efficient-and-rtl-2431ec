// ni_unpack_tb: feeds decoded flits of packets interleaved over the four VCs,
// with random per-row corrected / uncorrectable flags, and checks that each
// flit reaches the PE one cycle later unchanged, that a credit for its VC is
// returned in the same cycle, and that the tail flit reports whether any
// flit of its own packet (and not of a packet on another VC) was corrected
// or had an uncorrectable error.
module ni_unpack_tb;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic fv, head, tail;
  vc_t  vc;
  logic [63:0] data;
  logic [3:0]  corr, unc;
  ni_rx_t  pe;
  credit_t cr;
  int checks = 0, failures = 0;

  ni_unpack dut (.clk, .rst_n, .flit_valid_i(fv), .head_i(head), .tail_i(tail), .vc_i(vc),
                 .data_i(data), .corrected_i(corr), .uncorrectable_i(unc), .pe_o(pe), .credit_o(cr));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  remaining [NUM_VC];
  bit  acc_c [NUM_VC], acc_u [NUM_VC];
  int  tails_corr = 0, tails_unc = 0, tails_clean = 0;

  initial begin
    fv = 0; head = 0; tail = 0; vc = 0; data = 0; corr = 0; unc = 0;
    for (int v = 0; v < NUM_VC; v++) begin remaining[v] = 0; acc_c[v] = 0; acc_u[v] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      bit exp_pc, exp_pu;
      @(negedge clk);
      fv = ($urandom_range(3, 0) != 0);
      vc = vc_t'($urandom_range(NUM_VC - 1, 0));
      head = (remaining[vc] == 0);
      if (head) remaining[vc] = $urandom_range(4, 1);
      tail = (remaining[vc] == 1);
      data = {$urandom, $urandom};
      corr = ($urandom_range(5, 0) == 0) ? 4'($urandom) : 4'h0;
      unc  = ($urandom_range(9, 0) == 0) ? 4'($urandom) : 4'h0;
      exp_pc = (|corr) || (!head && acc_c[vc]);
      exp_pu = (|unc)  || (!head && acc_u[vc]);
      if (fv) begin
        remaining[vc]--;
        acc_c[vc] = tail ? 0 : exp_pc;
        acc_u[vc] = tail ? 0 : exp_pu;
      end
      @(posedge clk);
      #1;
      checks++;
      if (pe.valid != fv || cr.valid != fv) begin
        failures++;
        $display("FAIL valid/credit");
      end else if (fv && (pe.data != data || pe.head != head || pe.tail != tail || pe.vc != vc
                 || cr.vc != vc || pe.corrected != corr || pe.uncorrectable != unc
                 || pe.pkt_corrected != (tail && exp_pc) || pe.pkt_uncorrectable != (tail && exp_pu))) begin
        failures++;
        $display("FAIL flit t=%0d tail=%b pc=%b/%b pu=%b/%b", t, tail, pe.pkt_corrected, exp_pc,
                 pe.pkt_uncorrectable, exp_pu);
      end
      if (fv && tail) begin
        if (exp_pc) tails_corr++;
        if (exp_pu) tails_unc++;
        if (!exp_pc && !exp_pu) tails_clean++;
      end
    end
    checks++;
    if (tails_corr == 0 || tails_unc == 0 || tails_clean == 0) begin
      failures++;
      $display("FAIL some packet status never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
