// noc_ni_tb: one network interface with its router port looped back by the
// testbench. Words sent by the PE side come out encoded on the router link;
// the testbench stores them (returning a credit as it takes each one), adds
// an error pattern (nothing; single, double or triple adjacent errors in any
// rows, up to twelve bit errors; or a 4..6-bit burst in row 0) and sends them
// back into the NI's ejection side. Checks that the PE receives every word
// back, corrected, with the per-row status that the injected pattern calls
// for, the head/tail markers of its packet, and the packet status on tails.
module noc_ni_tb;
  import noc_pkg::*;
  import tb_fault_pkg::*;

  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  ni_tx_t  tx;
  logic    tx_ready;
  ni_rx_t  rx;
  link_t   to_r, from_r;
  credit_t to_r_cr, from_r_cr;
  int checks = 0, failures = 0;

  noc_ni #(.VC_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .pe_tx_i(tx), .pe_tx_ready_o(tx_ready), .pe_rx_o(rx),
    .to_router_o(to_r), .to_router_credit_i(to_r_cr),
    .from_router_i(from_r), .from_router_credit_o(from_r_cr));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [63:0] data;
    logic        head, tail;
    logic [3:0]  exp_corr, exp_unc;
  } exp_t;

  flit_t link_q[$];
  exp_t  exp_q[$];
  int    sent_words = 0, got_words = 0;
  int    n_corr_rows = 0, n_unc = 0, n_twelve = 0, n_clean = 0;
  bit    pkt_c = 0, pkt_u = 0;

  // Loop-back "router": take flits, return credits, replay with errors.
  always @(posedge clk) if (rst_n) begin
    if (to_r.valid) link_q.push_back(to_r.flit);
  end

  always @(negedge clk) begin
    to_r_cr = '0;
    from_r  = '0;
    if (rst_n && link_q.size() != 0 && $urandom_range(2, 0) != 0) begin
      flit_t f;
      exp_t  e;
      int    w [4];
      f = link_q.pop_front();
      to_r_cr.valid = 1'b1;
      to_r_cr.vc    = f.vc;
      e.exp_corr = '0;
      e.exp_unc  = '0;
      for (int r = 0; r < 4; r++) w[r] = 0;
      case ($urandom_range(4, 0))
        0: ;                                             // clean
        1: w[$urandom_range(3, 0)] = 1;
        2: for (int r = 0; r < 4; r++) w[r] = $urandom_range(3, 0);
        3: for (int r = 0; r < 4; r++) w[r] = 3;        // twelve bit errors
        default: w[0] = $urandom_range(6, 4);            // detected only
      endcase
      for (int r = 0; r < 4; r++) begin
        e.exp_corr[r] = (w[r] >= 1 && w[r] <= 3);
        e.exp_unc[r]  = (w[r] >= 4);
      end
      if (w[0] == 3 && w[1] == 3 && w[2] == 3 && w[3] == 3) n_twelve++;
      e.data = 'x;
      e.head = f.head;
      e.tail = f.tail;
      exp_q.push_back(e);
      from_r.valid = 1'b1;
      from_r.flit  = f;
      from_r.flit.code = f.code ^ flit_mask(w);
    end
  end

  logic [63:0] word_q[$];

  always @(posedge clk) if (rst_n) begin
    if (tx.valid && tx_ready) word_q.push_back(tx.data);
    if (rx.valid) begin
      exp_t e;
      logic [63:0] wd;
      e  = exp_q.pop_front();
      wd = word_q.pop_front();
      got_words++;
      checks++;
      if (rx.corrected != e.exp_corr || rx.uncorrectable != e.exp_unc
          || rx.head != e.head || rx.tail != e.tail
          || (e.exp_unc == 0 && rx.data != wd)
          || (e.exp_unc != 0 && rx.data[63:16] != wd[63:16])) begin
        failures++;
        $display("FAIL word %0d: data=%h expected %h corr=%b/%b unc=%b/%b", got_words,
                 rx.data, wd, rx.corrected, e.exp_corr, rx.uncorrectable, e.exp_unc);
      end
      if (|e.exp_corr) n_corr_rows++;
      if (|e.exp_unc) n_unc++;
      if (e.exp_corr == 0 && e.exp_unc == 0) n_clean++;
      pkt_c = pkt_c || (|e.exp_corr);
      pkt_u = pkt_u || (|e.exp_unc);
      if (e.tail) begin
        checks++;
        if (rx.pkt_corrected != pkt_c || rx.pkt_uncorrectable != pkt_u) begin
          failures++;
          $display("FAIL packet status");
        end
        pkt_c = 0;
        pkt_u = 0;
      end
    end
  end

  initial begin
    tx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      int len;
      len = $urandom_range(4, 1);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        tx.valid = 1'b1;
        tx.last  = (i == len - 1);
        tx.dst_x = 4'd3;
        tx.dst_y = 4'd5;
        tx.data  = {$urandom, $urandom};
        sent_words++;
        @(posedge clk);
        while (!tx_ready) @(posedge clk);
      end
      @(negedge clk);
      tx = '0;
    end
    repeat (100) @(posedge clk);
    checks++;
    if (got_words != sent_words || n_corr_rows == 0 || n_unc == 0 || n_twelve == 0 || n_clean == 0) begin
      failures++;
      $display("FAIL sent=%0d got=%0d corr=%0d unc=%0d twelve=%0d clean=%0d",
               sent_words, got_words, n_corr_rows, n_unc, n_twelve, n_clean);
    end
    $display("words=%0d corrected_flits=%0d twelve_error_flits=%0d detected_flits=%0d",
             got_words, n_corr_rows, n_twelve, n_unc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
