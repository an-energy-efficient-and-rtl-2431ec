// noc_router_tb: one router at mesh position (1,1) with the testbench as the
// upstream sender on all five inputs and the downstream receiver on all five
// outputs. Senders inject packets of 1..4 flits to all five directions on
// random VCs, obeying credits and VC ownership; receivers return credits
// after a random delay (sometimes withheld for a while to force stalls).
// Checks: every flit leaves on the XY-routed port; the flits of a packet keep
// their order and stay together on one output VC; payloads are unchanged;
// every packet is delivered once; a lone head flit takes two cycles from
// the input link to the output link. Counts that VC contention, credit stalls
// and flits of different packets interleaving on one output all happened.
module noc_router_tb;
  import noc_pkg::*;

  localparam int RX = 1, RY = 1, DEPTH = 4, PKTS = 300;

  logic clk = 0, rst_n = 0;
  link_t   [NPORTS-1:0] in_link, out_link;
  credit_t [NPORTS-1:0] in_credit, out_credit;
  int checks = 0, failures = 0;

  noc_router #(.X(RX), .Y(RY), .VC_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Destination coordinates for each output direction.
  function automatic void dst_of(input port_e port, output int x, output int y);
    case (port)
      P_LOCAL: begin x = RX;     y = RY;     end
      P_NORTH: begin x = RX;     y = RY + 1; end
      P_EAST:  begin x = RX + 1; y = RY + 2; end   // X first: goes east
      P_SOUTH: begin x = RX;     y = RY - 1; end
      default: begin x = RX - 1; y = RY + 1; end   // goes west
    endcase
  endfunction

  // Payload: {src port, packet number, flit index, length, target port}.
  function automatic logic [95:0] payload(int src, int pkt, int idx, int len, int tgt);
    return {32'(src), 16'(pkt), 16'(idx), 16'(len), 16'(tgt)};
  endfunction

  // ------------------------------------------------------------- senders
  int up_credit [NPORTS][NUM_VC];
  int sent_pkts [NPORTS];
  int sent_total = 0;
  int recv_total = 0;
  int stall_cycles = 0;
  bit started = 0;

  initial begin
    for (int p = 0; p < NPORTS; p++) for (int v = 0; v < NUM_VC; v++) up_credit[p][v] = DEPTH;
  end

  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NPORTS; p++)
      if (in_credit[p].valid) up_credit[p][in_credit[p].vc]++;

  for (genvar gp = 0; gp < NPORTS; gp++) begin : g_src
    initial begin
      in_link[gp] = '0;
      @(posedge rst_n);
      wait (started);
      for (int k = 0; k < PKTS / NPORTS; k++) begin
        int len, tgt, x, y, v;
        len = $urandom_range(4, 1);
        tgt = $urandom_range(NPORTS - 1, 0);
        if (gp != 0 && tgt == gp) tgt = 0;   // no U-turns in XY routing
        v = $urandom_range(NUM_VC - 1, 0);
        dst_of(port_e'(tgt), x, y);
        for (int i = 0; i < len; i++) begin
          @(negedge clk);
          while (up_credit[gp][v] == 0 || $urandom_range(3, 0) == 0) begin
            in_link[gp] = '0;
            if (up_credit[gp][v] == 0) stall_cycles++;
            @(negedge clk);
          end
          in_link[gp].valid      = 1'b1;
          in_link[gp].flit.head  = (i == 0);
          in_link[gp].flit.tail  = (i == len - 1);
          in_link[gp].flit.dst_x = coord_t'(x);
          in_link[gp].flit.dst_y = coord_t'(y);
          in_link[gp].flit.vc    = vc_t'(v);
          in_link[gp].flit.code  = payload(gp, k, i, len, tgt);
          up_credit[gp][v]--;
          sent_total++;
        end
        @(negedge clk);
        in_link[gp] = '0;
      end
      sent_pkts[gp] = PKTS / NPORTS;
    end
  end

  // ----------------------------------------------------------- receivers
  int  ovc_src  [NPORTS][NUM_VC];   // packet owning each output VC, -1 idle
  int  ovc_next [NPORTS][NUM_VC];
  int  pending  [NPORTS][$];        // credit return times
  int  last_src [NPORTS];
  int  interleaved = 0;
  int  cycle = 0;
  int  hold_until [NPORTS];

  initial begin
    for (int p = 0; p < NPORTS; p++) begin
      for (int v = 0; v < NUM_VC; v++) begin ovc_src[p][v] = -1; ovc_next[p][v] = 0; end
      last_src[p] = -1;
      hold_until[p] = 0;
    end
  end

  always @(posedge clk) cycle++;

  always @(negedge clk) begin
    for (int o = 0; o < NPORTS; o++) begin
      out_credit[o] = '0;
      if (cycle >= hold_until[o] && pending[o].size() != 0) begin
        out_credit[o].valid = 1'b1;
        out_credit[o].vc    = vc_t'(pending[o].pop_front());
      end
      if ($urandom_range(400, 0) == 0) hold_until[o] = cycle + 30;
    end
  end

  always @(posedge clk) if (rst_n && !started) begin
    for (int o = 0; o < NPORTS; o++)
      if (out_link[o].valid) pending[o].push_back(int'(out_link[o].flit.vc));
  end

  always @(posedge clk) if (rst_n && started) begin
    for (int o = 0; o < NPORTS; o++) if (out_link[o].valid) begin
      automatic flit_t f = out_link[o].flit;
      automatic int src = int'(f.code[95:64]);
      automatic int pkt = int'(f.code[63:48]);
      automatic int idx = int'(f.code[47:32]);
      automatic int len = int'(f.code[31:16]);
      automatic int tgt = int'(f.code[15:0]);
      automatic int tag = src * 1000 + pkt;
      checks++;
      recv_total++;
      pending[o].push_back(int'(f.vc));
      if (tgt != o) begin
        failures++;
        $display("FAIL flit for port %0d left on port %0d", tgt, o);
      end
      if (f.head != (idx == 0) || f.tail != (idx == len - 1)) begin
        failures++;
        $display("FAIL head/tail markers wrong src=%0d pkt=%0d idx=%0d", src, pkt, idx);
      end
      if (f.head) begin
        if (ovc_src[o][f.vc] != -1) begin
          failures++;
          $display("FAIL output VC %0d of port %0d reused before tail", f.vc, o);
        end
        ovc_src[o][f.vc] = tag;
        ovc_next[o][f.vc] = 0;
      end
      if (ovc_src[o][f.vc] != tag || ovc_next[o][f.vc] != idx) begin
        failures++;
        $display("FAIL port %0d vc %0d: flit %0d of %0d out of order", o, f.vc, idx, tag);
      end
      ovc_next[o][f.vc] = idx + 1;
      if (last_src[o] != -1 && last_src[o] != tag && !f.head) interleaved++;
      last_src[o] = tag;
      if (f.tail) ovc_src[o][f.vc] = -1;
    end
  end

  // --------------------------------------------------------------- main
  initial begin
    int t0, lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Lone single-flit packet from west to east: latency check.
    @(negedge clk);
    in_link[P_WEST].valid      = 1'b1;
    in_link[P_WEST].flit.head  = 1'b1;
    in_link[P_WEST].flit.tail  = 1'b1;
    in_link[P_WEST].flit.dst_x = coord_t'(RX + 1);
    in_link[P_WEST].flit.dst_y = coord_t'(RY);
    in_link[P_WEST].flit.vc    = '0;
    in_link[P_WEST].flit.code  = 96'h1234;
    up_credit[P_WEST][0]--;
    t0 = cycle;
    @(negedge clk);
    in_link[P_WEST] = '0;
    while (!out_link[P_EAST].valid && cycle < t0 + 20) @(negedge clk);
    lat = cycle - t0;
    checks++;
    if (lat != 2 || out_link[P_EAST].flit.code != 96'h1234) begin
      failures++;
      $display("FAIL lone flit latency %0d cycles (expected 2)", lat);
    end
    repeat (5) @(negedge clk);
    started = 1;
    for (int p = 0; p < NPORTS; p++) wait (sent_pkts[p] == PKTS / NPORTS);
    repeat (500) @(posedge clk);
    checks++;
    if (recv_total != sent_total) begin
      failures++;
      $display("FAIL sent %0d flits, received %0d", sent_total, recv_total);
    end
    $display("flits=%0d credit_stall_cycles=%0d interleaved=%0d", recv_total, stall_cycles, interleaved);
    checks++;
    if (stall_cycles == 0 || interleaved == 0) begin
      failures++;
      $display("FAIL stalls or interleaving never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
