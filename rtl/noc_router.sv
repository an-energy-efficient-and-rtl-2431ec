// noc_router: five-port virtual-channel wormhole router of the 2D mesh.
//
// Ports: 0 local (to the NI), 1 north (y+1), 2 east (x+1), 3 south (y-1),
// 4 west (x-1). Each input port has NUM_VC = 4 virtual channels of VC_DEPTH
// = 4 flits. The router only moves flits; the 96-bit payload stays encoded.
//
// All stages are evaluated together in one cycle and the result is
// registered at the outputs (the output registers are the router's output
// buffers):
//   * route computation: dimension-ordered XY routing from the head flit's
//     destination (X first, then Y);
//   * VC allocation: per output port, one waiting head flit (round robin
//     over the 20 input VCs) is given the lowest-numbered free output VC;
//   * switch allocation: per input port one ready VC is picked (round robin)
//     and per output port one of the requesting input ports (round robin);
//     a VC is ready when it holds an output VC, or is being given one in
//     this cycle, and that output VC has a credit;
//   * switch traversal: the winning flit is written to the output register
//     with its new VC, and a credit for the freed slot goes upstream.
// A flit written into an input buffer at one clock edge can thus be in the
// output register at the next: two edges from input link to output link,
// for head, body and tail flits alike, when there is no contention. An
// output VC is freed when the tail flit of its packet leaves.
//
// Taken from the evaluated configuration: five ports, four VCs of four
// flits, XY routing, the allocation stages done within one cycle. The
// allocator details and credit flow control are this design's choices.
//
// The linter notes that rst_n feeds both the asynchronous reset and the
// `disable iff` of the assertions below. That second use is inside
// simulation-only checking, not logic, so the warning is left as it is.
module noc_router
  import noc_pkg::*;
#(
  parameter int X        = 0,
  parameter int Y        = 0,
  parameter int VC_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  link_t   [NPORTS-1:0] in_link,
  output credit_t [NPORTS-1:0] in_credit,
  output link_t   [NPORTS-1:0] out_link,
  input  credit_t [NPORTS-1:0] out_credit
);

  localparam int NIVC  = NPORTS * NUM_VC;
  localparam int CNT_W = $clog2(VC_DEPTH + 1);
  localparam int IDX_W = $clog2(NIVC);

  // ---------------------------------------------------------------- buffers
  flit_t fifo_dout  [NPORTS][NUM_VC];
  logic  fifo_empty [NPORTS][NUM_VC];
  logic  fifo_pop   [NPORTS][NUM_VC];

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      logic unused_full;
      vc_fifo #(.WIDTH($bits(flit_t)), .DEPTH(VC_DEPTH)) u_buf (
        .clk   (clk),
        .rst_n (rst_n),
        .push  (in_link[p].valid && in_link[p].flit.vc == vc_t'(v)),
        .din   (in_link[p].flit),
        .pop   (fifo_pop[p][v]),
        .dout  (fifo_dout[p][v]),
        .empty (fifo_empty[p][v]),
        .full  (unused_full)
      );
    end
  end

  // ------------------------------------------------------------------ state
  logic              vc_act  [NPORTS][NUM_VC];   // input VC holds an output VC
  port_e             vc_op   [NPORTS][NUM_VC];   // its output port
  vc_t               vc_ov   [NPORTS][NUM_VC];   // its output VC
  logic              ovc_busy[NPORTS][NUM_VC];   // output VC owned by a packet
  logic [CNT_W-1:0]  credits [NPORTS][NUM_VC];   // free slots downstream
  logic [IDX_W-1:0]  va_ptr  [NPORTS];
  logic [VC_W-1:0]   sa_in_ptr [NPORTS];
  logic [2:0]        sa_out_ptr[NPORTS];

  // XY routing.
  function automatic port_e route(input flit_t f);
    if      (int'(f.dst_x) > X) return P_EAST;
    else if (int'(f.dst_x) < X) return P_WEST;
    else if (int'(f.dst_y) > Y) return P_NORTH;
    else if (int'(f.dst_y) < Y) return P_SOUTH;
    else                            return P_LOCAL;
  endfunction

  // ----------------------------------------------------------- VC allocation
  logic             va_gnt  [NPORTS];            // per output port
  logic [IDX_W-1:0] va_idx  [NPORTS];            // winning input VC
  vc_t              va_ovc  [NPORTS];            // output VC given to it

  always_comb begin
    automatic int idx, p, v;
    idx = 0;
    p   = 0;
    v   = 0;
    for (int o = 0; o < NPORTS; o++) begin
      va_gnt[o] = 1'b0;
      va_idx[o] = '0;
      va_ovc[o] = '0;
      for (int k = 0; k < NIVC; k++) begin
        idx = (int'(va_ptr[o]) + k) % NIVC;
        p   = idx / NUM_VC;
        v   = idx % NUM_VC;
        if (!va_gnt[o] && !fifo_empty[p][v] && fifo_dout[p][v].head && !vc_act[p][v]
            && route(fifo_dout[p][v]) == port_e'(o)) begin
          for (int w = NUM_VC - 1; w >= 0; w--)
            if (!ovc_busy[o][w]) begin
              va_gnt[o] = 1'b1;
              va_ovc[o] = vc_t'(w);
            end
          va_idx[o] = IDX_W'(idx);
        end
      end
    end
  end

  // Allocation of every input VC as seen by switch allocation: what it held
  // already, or what VC allocation grants it in this same cycle.
  logic  eff_act [NPORTS][NUM_VC];
  port_e eff_op  [NPORTS][NUM_VC];
  vc_t   eff_ov  [NPORTS][NUM_VC];

  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      for (int j = 0; j < NUM_VC; j++) begin
        eff_act[i][j] = vc_act[i][j];
        eff_op[i][j]  = vc_op[i][j];
        eff_ov[i][j]  = vc_ov[i][j];
      end
    for (int o = 0; o < NPORTS; o++)
      if (va_gnt[o]) begin
        eff_act[int'(va_idx[o]) / NUM_VC][int'(va_idx[o]) % NUM_VC] = 1'b1;
        eff_op [int'(va_idx[o]) / NUM_VC][int'(va_idx[o]) % NUM_VC] = port_e'(o);
        eff_ov [int'(va_idx[o]) / NUM_VC][int'(va_idx[o]) % NUM_VC] = va_ovc[o];
      end
  end

  // ------------------------------------------------------- switch allocation
  logic        in_sel   [NPORTS];                // input port has a ready VC
  vc_t         in_vc    [NPORTS];                // which one
  logic        sa_gnt   [NPORTS];                // per output port
  logic [2:0]  sa_in    [NPORTS];                // winning input port

  always_comb begin
    automatic int v, p;
    v = 0;
    p = 0;
    for (int i = 0; i < NPORTS; i++) begin
      in_sel[i] = 1'b0;
      in_vc[i]  = '0;
      for (int k = 0; k < NUM_VC; k++) begin
        v = (int'(sa_in_ptr[i]) + k) % NUM_VC;
        if (!in_sel[i] && eff_act[i][v] && !fifo_empty[i][v]
            && credits[eff_op[i][v]][eff_ov[i][v]] != 0) begin
          in_sel[i] = 1'b1;
          in_vc[i]  = vc_t'(v);
        end
      end
    end
    for (int o = 0; o < NPORTS; o++) begin
      sa_gnt[o] = 1'b0;
      sa_in[o]  = '0;
      for (int k = 0; k < NPORTS; k++) begin
        p = (int'(sa_out_ptr[o]) + k) % NPORTS;
        if (!sa_gnt[o] && in_sel[p] && eff_op[p][in_vc[p]] == port_e'(o)) begin
          sa_gnt[o] = 1'b1;
          sa_in[o]  = 3'(p);
        end
      end
    end
    for (int i = 0; i < NPORTS; i++)
      for (int j = 0; j < NUM_VC; j++)
        fifo_pop[i][j] = 1'b0;
    for (int o = 0; o < NPORTS; o++)
      if (sa_gnt[o]) fifo_pop[sa_in[o]][in_vc[sa_in[o]]] = 1'b1;
  end

  // Next credit counts and the flits crossing the switch.
  logic [CNT_W-1:0] credits_nxt [NPORTS][NUM_VC];
  flit_t            st_flit     [NPORTS];        // per output port
  vc_t              st_ivc      [NPORTS];        // input VC it leaves

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      st_ivc[o]     = in_vc[sa_in[o]];
      st_flit[o]    = fifo_dout[sa_in[o]][st_ivc[o]];
      st_flit[o].vc = eff_ov[sa_in[o]][st_ivc[o]];
      for (int w = 0; w < NUM_VC; w++)
        credits_nxt[o][w] = credits[o][w]
          + CNT_W'(out_credit[o].valid && out_credit[o].vc == vc_t'(w))
          - CNT_W'(sa_gnt[o] && st_flit[o].vc == vc_t'(w));
    end
  end

  // -------------------------------------------------------- state registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++)
        for (int j = 0; j < NUM_VC; j++) begin
          vc_act[i][j]   <= 1'b0;
          vc_op[i][j]    <= P_LOCAL;
          vc_ov[i][j]    <= '0;
          ovc_busy[i][j] <= 1'b0;
          credits[i][j]  <= CNT_W'(VC_DEPTH);
        end
      va_ptr     <= '{default: '0};
      sa_in_ptr  <= '{default: '0};
      sa_out_ptr <= '{default: '0};
      out_link   <= '0;
      in_credit  <= '0;
    end else begin
      out_link  <= '0;
      in_credit <= '0;
      // VC allocation results.
      for (int o = 0; o < NPORTS; o++) begin
        if (va_gnt[o]) begin
          vc_act[int'(va_idx[o]) / NUM_VC][int'(va_idx[o]) % NUM_VC] <= 1'b1;
          vc_op [int'(va_idx[o]) / NUM_VC][int'(va_idx[o]) % NUM_VC] <= port_e'(o);
          vc_ov [int'(va_idx[o]) / NUM_VC][int'(va_idx[o]) % NUM_VC] <= va_ovc[o];
          ovc_busy[o][va_ovc[o]] <= 1'b1;
          va_ptr[o] <= (int'(va_idx[o]) == NIVC - 1) ? '0 : va_idx[o] + 1'b1;
        end
      end
      credits <= credits_nxt;
      // Switch traversal.
      for (int o = 0; o < NPORTS; o++) begin
        if (sa_gnt[o]) begin
          out_link[o].valid <= 1'b1;
          out_link[o].flit  <= st_flit[o];
          in_credit[sa_in[o]].valid <= 1'b1;
          in_credit[sa_in[o]].vc    <= st_ivc[o];
          if (st_flit[o].tail) begin
            vc_act[sa_in[o]][st_ivc[o]] <= 1'b0;
            ovc_busy[o][st_flit[o].vc]  <= 1'b0;
          end
          sa_in_ptr[sa_in[o]] <= st_ivc[o] + 1'b1;
          sa_out_ptr[o] <= (int'(sa_in[o]) == NPORTS - 1) ? '0 : sa_in[o] + 1'b1;
        end
      end
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    for (genvar w = 0; w < NUM_VC; w++) begin : g_vc
      a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
        credits[o][w] <= CNT_W'(VC_DEPTH));
    end
  end

endmodule
