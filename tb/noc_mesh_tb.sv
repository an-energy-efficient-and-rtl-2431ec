// noc_mesh_tb: end-to-end test of the mesh, reduced to 4 x 4 nodes so that
// it builds quickly (noc_mesh_full_tb runs the same checks on the 8 x 8
// default). Every node's PE model sends packets of 1..4 flits under four
// traffic phases: uniform random at a low (0.1) and a saturating (1.0 flit /
// node / cycle) injection rate, shuffle (destination = source index rotated
// left by one bit) and transpose ((x, y) -> (y, x)) at 0.3. While flits
// eject, the testbench flips bits of their codewords: single, double and
// triple adjacent errors in any rows (up to twelve per flit) and, now and
// then, a 4..6-bit burst in row 0, which may only be detected.
//
// Each 64-bit word carries {source, destination, packet number, flit index,
// check value}, so the receiver can check that it arrived at the right node,
// in order within its packet, with the right contents after correction, and
// that the status flags match the injected errors. At the end every flit
// sent must have been received once. Counted and required to happen:
// corrections, twelve-bit corrections, detected-only errors, PE stalls from
// missing credits, packets interleaving at an ejection port, and local
// (same-node) delivery.
module noc_mesh_tb;
  import noc_pkg::*;
  import tb_fault_pkg::*;

  localparam int MX = 4, MY = 4, NODES = MX * MY, NB = $clog2(NODES);
  localparam int PHASES = 4;
  localparam int PKTS [PHASES] = '{40, 40, 20, 20};       // packets per node per phase
  localparam int RATE [PHASES] = '{10, 100, 30, 30};   // injection, % of cycles

  logic clk = 0, rst_n = 0;
  ni_tx_t              tx [NODES];
  logic [NODES-1:0]    tx_ready;
  ni_rx_t              rx [NODES];
  logic [95:0]         fault [NODES];
  int checks = 0, failures = 0;

  noc_mesh #(.MESH_X(MX), .MESH_Y(MY)) dut (.clk, .rst_n, .pe_tx_i(tx), .pe_tx_ready_o(tx_ready), .pe_rx_o(rx),
                .fault_mask_i(fault));

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] chk(int src, int dst, int pkt, int idx);
    logic [31:0] h;
    h = 32'(src) * 32'd2654435761 ^ 32'(dst) * 32'd40503 ^ 32'(pkt) * 32'd69069 ^ 32'(idx) * 32'd7919;
    return h[31:8];
  endfunction

  function automatic int dest_of(int phase, int src);
    int x, y;
    x = src % MX;
    y = src / MX;
    case (phase)
      0, 1: return $urandom_range(NODES - 1, 0);
      2: return ((src << 1) | (src >> (NB - 1))) & (NODES - 1);   // shuffle
      default: return x * MX + y;                         // transpose
    endcase
  endfunction

  // ------------------------------------------------------------ PE models
  int sent_flits = 0, recv_flits = 0, stalls = 0, done_nodes = 0, local_pkts = 0;
  int phase = 0;

  for (genvar gn = 0; gn < NODES; gn++) begin : g_pe
    initial begin
      int pkt;
      tx[gn] = '0;
      pkt = 0;
      wait (rst_n);
      for (int ph = 0; ph < PHASES; ph++) begin
        wait (phase == ph);
        for (int k = 0; k < PKTS[ph]; k++) begin
          int len, dst;
          len = $urandom_range(4, 1);
          dst = dest_of(ph, gn);
          if (dst == gn) local_pkts++;
          for (int i = 0; i < len; i++) begin
            @(negedge clk);
            while ($urandom_range(99, 0) >= RATE[ph]) begin
              tx[gn] = '0;
              @(negedge clk);
            end
            tx[gn].valid = 1'b1;
            tx[gn].last  = (i == len - 1);
            tx[gn].dst_x = coord_t'(dst % MX);
            tx[gn].dst_y = coord_t'(dst / MX);
            tx[gn].data  = {8'(gn), 8'(dst), 16'(pkt), 8'(i), chk(gn, dst, pkt, i)};
            @(posedge clk);
            while (!tx_ready[gn]) begin
              stalls++;
              @(posedge clk);
            end
            sent_flits++;
          end
          pkt++;
        end
        @(negedge clk);
        tx[gn] = '0;
        done_nodes++;
      end
    end
  end

  // ------------------------------------------------- error injection
  logic [3:0] exp_corr [NODES], exp_unc [NODES];
  logic       exp_twelve [NODES], prev_twelve [NODES];
  int n_corr = 0, n_twelve = 0, n_unc = 0;

  always @(negedge clk) begin
    for (int n = 0; n < NODES; n++) begin
      int w [4];
      for (int r = 0; r < 4; r++) w[r] = 0;
      case ($urandom_range(9, 0))
        0: w[$urandom_range(3, 0)] = 1;
        1: w[$urandom_range(3, 0)] = 2;
        2: w[$urandom_range(3, 0)] = 3;
        3: for (int r = 0; r < 4; r++) w[r] = $urandom_range(3, 0);
        4: for (int r = 0; r < 4; r++) w[r] = 3;
        5: w[0] = $urandom_range(6, 4);
        default: ;
      endcase
      fault[n] = flit_mask(w);
      exp_twelve[n] = (w[0] == 3 && w[1] == 3 && w[2] == 3 && w[3] == 3);
      for (int r = 0; r < 4; r++) begin
        exp_corr[n][r] = (w[r] >= 1 && w[r] <= 3);
        exp_unc[n][r]  = (w[r] >= 4);
      end
    end
  end

  // ----------------------------------------------------------- receivers
  // The NI reports a flit one cycle after its codeword passed the fault mask.
  logic [3:0] prev_corr [NODES], prev_unc [NODES];
  int next_idx [NODES][NUM_VC];
  int cur_tag  [NODES][NUM_VC];
  int last_tag [NODES];
  int interleaved = 0;

  initial for (int n = 0; n < NODES; n++) begin
    last_tag[n] = -1;
    for (int v = 0; v < NUM_VC; v++) begin next_idx[n][v] = 0; cur_tag[n][v] = -1; end
  end

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      if (rx[n].valid) begin
        automatic int src = int'(rx[n].data[63:56]);
        automatic int dst = int'(rx[n].data[55:48]);
        automatic int pkt = int'(rx[n].data[47:32]);
        automatic int idx = int'(rx[n].data[31:24]);
        automatic int tag = src * 65536 + pkt;
        automatic int v   = int'(rx[n].vc);
        recv_flits++;
        checks++;
        if (rx[n].corrected != prev_corr[n] || rx[n].uncorrectable != prev_unc[n]) begin
          failures++;
          $display("FAIL node %0d status corr=%b/%b unc=%b/%b", n, rx[n].corrected, prev_corr[n],
                   rx[n].uncorrectable, prev_unc[n]);
        end
        if (dst != n || (prev_unc[n] == 0 && rx[n].data[23:0] != chk(src, dst, pkt, idx))) begin
          failures++;
          $display("FAIL node %0d received %h", n, rx[n].data);
        end
        if (rx[n].head) begin
          cur_tag[n][v]  = tag;
          next_idx[n][v] = 0;
        end
        if (cur_tag[n][v] != tag || next_idx[n][v] != idx) begin
          failures++;
          $display("FAIL node %0d vc %0d flit %0d of packet %0d/%0d out of order", n, v, idx, src, pkt);
        end
        next_idx[n][v] = idx + 1;
        if (last_tag[n] != -1 && last_tag[n] != tag && !rx[n].head) interleaved++;
        last_tag[n] = tag;
        if (|prev_corr[n]) n_corr++;
        if (prev_twelve[n]) n_twelve++;
        if (|prev_unc[n]) n_unc++;
      end
    end
  end

  // Remember what was applied to flits ejecting in this cycle.
  always @(posedge clk) begin
    for (int n = 0; n < NODES; n++) begin
      prev_corr[n]   <= exp_corr[n];
      prev_unc[n]    <= exp_unc[n];
      prev_twelve[n] <= exp_twelve[n];
    end
  end

  // ----------------------------------------------------------------- main
  initial begin
    int t0;
    for (int n = 0; n < NODES; n++) begin
      fault[n] = '0; prev_corr[n] = '0; prev_unc[n] = '0; prev_twelve[n] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ph = 0; ph < PHASES; ph++) begin
      phase = ph;
      t0 = cycle;
      wait (done_nodes == NODES * (ph + 1));
      wait (recv_flits == sent_flits);
      repeat (20) @(posedge clk);
      $display("phase %0d: %0d cycles, %0d flits delivered so far", ph, cycle - t0, recv_flits);
    end
    repeat (50) @(posedge clk);
    checks++;
    if (recv_flits != sent_flits) begin
      failures++;
      $display("FAIL sent %0d flits, received %0d", sent_flits, recv_flits);
    end
    $display("corrected=%0d twelve_bit=%0d detected=%0d stalls=%0d interleaved=%0d local=%0d",
             n_corr, n_twelve, n_unc, stalls, interleaved, local_pkts);
    checks++;
    if (n_corr == 0 || n_twelve == 0 || n_unc == 0 || stalls == 0 || interleaved == 0 || local_pkts == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
