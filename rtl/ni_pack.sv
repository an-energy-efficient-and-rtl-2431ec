// ni_pack: packing unit of the network interface (injection side).
//
// The processing element (PE) offers one 64-bit data word per cycle with a
// valid/ready handshake, the destination coordinates and a `last` marker.
// The pack unit turns the words of one packet into flits: the first becomes
// the head flit, the one marked last the tail flit (a one-word packet is a
// single head+tail flit). At the start of a packet it claims a free virtual
// channel of the router's local input port and keeps it until the tail has
// been sent; flits go out only while that VC has a credit (free buffer
// slot). The flit leaves through an output register one cycle after the
// handshake, still in clear; the NI encodes it on its way to the router.
//
// Only the existence of a pack unit between PE and encoder is given; the
// handshake, the VC choice (lowest free VC) and credit tracking are this
// design's choices. The destination of a packet is taken from its first word.
module ni_pack
  import noc_pkg::*;
#(
  parameter int VC_DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ni_tx_t    pe_i,
  output logic      pe_ready_o,
  output logic      flit_valid_o,
  output raw_flit_t flit_o,
  input  credit_t   credit_i
);

  localparam int CNT_W = $clog2(VC_DEPTH + 1);

  logic             in_pkt;              // between head and tail of a packet
  vc_t              cur_vc;
  coord_t           cur_x, cur_y;
  logic [CNT_W-1:0] credits [NUM_VC];
  logic             vc_busy [NUM_VC];
  logic             free_found;
  vc_t              free_vc;
  vc_t              use_vc;
  logic             fire;

  always_comb begin
    free_found = 1'b0;
    free_vc    = '0;
    for (int v = NUM_VC - 1; v >= 0; v--)
      if (!vc_busy[v] && credits[v] != 0) begin
        free_found = 1'b1;
        free_vc    = vc_t'(v);
      end
    use_vc     = in_pkt ? cur_vc : free_vc;
    pe_ready_o = in_pkt ? (credits[cur_vc] != 0) : free_found;
    fire       = pe_i.valid && pe_ready_o;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt       <= 1'b0;
      cur_vc       <= '0;
      cur_x        <= '0;
      cur_y        <= '0;
      flit_valid_o <= 1'b0;
      flit_o       <= '0;
      for (int i = 0; i < NUM_VC; i++) begin
        credits[i] <= CNT_W'(VC_DEPTH);
        vc_busy[i] <= 1'b0;
      end
    end else begin
      flit_valid_o <= fire;
      for (int i = 0; i < NUM_VC; i++)
        credits[i] <= credits[i]
          + CNT_W'(credit_i.valid && credit_i.vc == vc_t'(i))
          - CNT_W'(fire && use_vc == vc_t'(i));
      if (fire) begin
        flit_o.head  <= !in_pkt;
        flit_o.tail  <= pe_i.last;
        flit_o.dst_x <= in_pkt ? cur_x : pe_i.dst_x;
        flit_o.dst_y <= in_pkt ? cur_y : pe_i.dst_y;
        flit_o.vc    <= use_vc;
        flit_o.data  <= pe_i.data;
        if (!in_pkt) begin
          cur_vc <= free_vc;
          cur_x  <= pe_i.dst_x;
          cur_y  <= pe_i.dst_y;
        end
        in_pkt          <= !pe_i.last;
        vc_busy[use_vc] <= !pe_i.last;
      end
    end
  end

endmodule
