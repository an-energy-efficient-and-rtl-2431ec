// vc_fifo_tb: random pushes and pops (never pushing a full buffer, as credit
// flow control guarantees) against a queue model; checks the head entry,
// empty and full every cycle, and that push and pop in one cycle work when
// full and when empty-plus-one.
module vc_fifo_tb;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, full_seen = 0, both_when_full = 0;

  vc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == D)
          || (q.size() != 0 && dout != q[0])) begin
        failures++;
        $display("FAIL t=%0d size=%0d empty=%b full=%b dout=%h", t, q.size(), empty, full, dout);
      end
      if (full) full_seen++;
      pop  = (q.size() != 0) && ($urandom_range(2, 0) != 0);
      push = ((q.size() < D) || pop) && ($urandom_range(2, 0) != 0);
      if (push && pop && full) both_when_full++;
      din  = W'($urandom);
      @(posedge clk);
      #1;
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (full_seen == 0 || both_when_full == 0) begin
      failures++;
      $display("FAIL full buffer never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
