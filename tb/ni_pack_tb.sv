// ni_pack_tb: a PE model offers packets of 1..5 words to random
// destinations; a router-side model counts credits per VC and returns them
// after a random delay (sometimes withheld to force stalls). Checks each
// flit: head on the first word, tail on the last, destination of the packet
// on every flit, data in order, one cycle from handshake to flit, one VC per
// packet, never more flits in flight on a VC than its buffer holds, and no VC
// reused before its tail. Counts that the PE was stalled by missing credits
// and that packets used more than one VC.
module ni_pack_tb;
  import noc_pkg::*;

  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  ni_tx_t    pe;
  logic      pe_ready, fv;
  raw_flit_t fl;
  credit_t   cr;
  int checks = 0, failures = 0;

  ni_pack #(.VC_DEPTH(DEPTH)) dut (.clk, .rst_n, .pe_i(pe), .pe_ready_o(pe_ready),
                                   .flit_valid_o(fv), .flit_o(fl), .credit_i(cr));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ni_tx_t exp_q[$];                 // words accepted, in order
  int     inflight [NUM_VC];
  int     ret_q[$];
  int     stalls = 0, vcs_used = 0, hold = 0, words = 0;
  bit     vc_seen [NUM_VC];
  bit     in_pkt = 0;
  vc_t    pkt_vc;
  coord_t pkt_x, pkt_y;

  // Credit return with delay; occasionally withheld.
  always @(negedge clk) begin
    cr = '0;
    if (hold > 0) hold--;
    else if (ret_q.size() != 0 && $urandom_range(1, 0) == 1) begin
      cr.valid = 1'b1;
      cr.vc = vc_t'(ret_q.pop_front());
    end
    if ($urandom_range(100, 0) == 0) hold = 20;
  end

  // Monitor: handshake at posedge, flit visible after it.
  always @(posedge clk) if (rst_n) begin
    if (cr.valid) inflight[cr.vc]--;
    if (fv) begin
      ni_tx_t w;
      checks++;
      w = exp_q.pop_front();
      if (fl.head != !in_pkt || fl.tail != w.last || fl.data != w.data) begin
        failures++;
        $display("FAIL flit head=%b tail=%b data=%h expected %h", fl.head, fl.tail, fl.data, w.data);
      end
      if (fl.head) begin
        pkt_vc = fl.vc; pkt_x = w.dst_x; pkt_y = w.dst_y;
        if (!vc_seen[fl.vc]) begin vc_seen[fl.vc] = 1; vcs_used++; end
      end
      if (fl.vc != pkt_vc || fl.dst_x != pkt_x || fl.dst_y != pkt_y) begin
        failures++;
        $display("FAIL flit vc/destination changed inside a packet");
      end
      inflight[fl.vc]++;
      if (inflight[fl.vc] > DEPTH) begin
        failures++;
        $display("FAIL more than %0d flits in flight on VC %0d", DEPTH, fl.vc);
      end
      ret_q.push_back(int'(fl.vc));
      in_pkt = !fl.tail;
    end
    if (pe.valid && pe_ready) exp_q.push_back(pe);
    else if (pe.valid) stalls++;
  end

  initial begin
    pe = '0;
    for (int v = 0; v < NUM_VC; v++) inflight[v] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      int len;
      coord_t x, y;
      len = $urandom_range(5, 1);
      x = coord_t'($urandom_range(7, 0));
      y = coord_t'($urandom_range(7, 0));
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        pe.valid = 1'b1;
        pe.last  = (i == len - 1);
        pe.dst_x = (i == 0) ? x : coord_t'($urandom);   // only the first word's counts
        pe.dst_y = (i == 0) ? y : coord_t'($urandom);
        pe.data  = {$urandom, $urandom};
        words++;
        @(posedge clk);
        while (!pe_ready) @(posedge clk);
      end
      @(negedge clk);
      pe = '0;
      if ($urandom_range(1, 0) == 0) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || stalls == 0 || vcs_used < 2) begin
      failures++;
      $display("FAIL left=%0d stalls=%0d vcs_used=%0d", exp_q.size(), stalls, vcs_used);
    end
    $display("words=%0d stall_cycles=%0d vcs_used=%0d", words, stalls, vcs_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
