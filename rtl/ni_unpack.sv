// ni_unpack: unpacking unit of the network interface (ejection side).
//
// Takes each flit after the decoder has corrected it and hands it to the
// processing element one cycle later, with head/tail markers, the VC it
// arrived on and the per-row status from the decoder. Because flits of
// packets on different VCs may interleave at the ejection port, it keeps,
// per VC, whether any flit of the packet in progress needed a correction or
// showed an uncorrectable error, and reports both with the tail flit. Each
// accepted flit frees a buffer slot, so it returns a credit to the router at
// once; the PE is assumed always to accept.
//
// Only the existence of an unpack unit between decoder and PE is given; its
// per-packet status and credit return are this design's choices.
module ni_unpack
  import noc_pkg::*;
  import ecc_pkg::FLIT_W;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flit_valid_i,
  input  logic              head_i,
  input  logic              tail_i,
  input  vc_t               vc_i,
  input  logic [FLIT_W-1:0] data_i,
  input  logic [3:0]        corrected_i,
  input  logic [3:0]        uncorrectable_i,
  output ni_rx_t            pe_o,
  output credit_t           credit_o
);

  logic acc_corr [NUM_VC];
  logic acc_unc  [NUM_VC];
  logic pkt_corr, pkt_unc;

  // Status of the packet including the current flit.
  assign pkt_corr = (|corrected_i)     || (!head_i && acc_corr[vc_i]);
  assign pkt_unc  = (|uncorrectable_i) || (!head_i && acc_unc[vc_i]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pe_o     <= '0;
      credit_o <= '0;
      for (int i = 0; i < NUM_VC; i++) begin
        acc_corr[i] <= 1'b0;
        acc_unc[i]  <= 1'b0;
      end
    end else begin
      pe_o.valid    <= flit_valid_i;
      credit_o.valid <= flit_valid_i;
      credit_o.vc    <= vc_i;
      if (flit_valid_i) begin
        pe_o.head              <= head_i;
        pe_o.tail              <= tail_i;
        pe_o.vc                <= vc_i;
        pe_o.data              <= data_i;
        pe_o.corrected         <= corrected_i;
        pe_o.uncorrectable     <= uncorrectable_i;
        pe_o.pkt_corrected     <= tail_i && pkt_corr;
        pe_o.pkt_uncorrectable <= tail_i && pkt_unc;
        acc_corr[vc_i]         <= !tail_i && pkt_corr;
        acc_unc[vc_i]          <= !tail_i && pkt_unc;
      end
    end
  end

endmodule
