// noc_ni: network interface with the end-to-end error-correction codec.
//
// Injection: PE word -> pack unit -> 64-to-96-bit flit encoder -> router
// local input. Ejection: router local output -> 96-to-64-bit flit decoder
// -> unpack unit -> PE. This is the only place where flits are encoded and
// decoded: routers carry the 96-bit codeword untouched, so an error picked up
// anywhere on the path from the source NI to the destination NI is corrected
// once, at the destination (up to a triple-adjacent error per 16-bit row).
// Latency: one cycle through the pack register, one through the unpack
// register; encoder and decoder are combinational between them and the
// router. Placing encoder and decoder only in the NI, with no per-port
// detectors, follows the published scheme; the handshakes are this design's.
module noc_ni
  import noc_pkg::*;
#(
  parameter int VC_DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  // processing element side
  input  ni_tx_t  pe_tx_i,
  output logic    pe_tx_ready_o,
  output ni_rx_t  pe_rx_o,
  // router local port side
  output link_t   to_router_o,
  input  credit_t to_router_credit_i,
  input  link_t   from_router_i,
  output credit_t from_router_credit_o
);

  import ecc_pkg::FLIT_W;
  import ecc_pkg::CODE_W;

  logic              tx_valid;
  raw_flit_t         tx_flit;
  logic [CODE_W-1:0] tx_code;
  logic [FLIT_W-1:0] rx_data;
  logic [31:0]       rx_syn;
  logic [3:0]        rx_corr, rx_unc;

  ni_pack #(.VC_DEPTH(VC_DEPTH)) u_pack (
    .clk          (clk),
    .rst_n        (rst_n),
    .pe_i         (pe_tx_i),
    .pe_ready_o   (pe_tx_ready_o),
    .flit_valid_o (tx_valid),
    .flit_o       (tx_flit),
    .credit_i     (to_router_credit_i)
  );

  flit_encoder u_enc (
    .data_i (tx_flit.data),
    .code_o (tx_code)
  );

  always_comb begin
    to_router_o.valid      = tx_valid;
    to_router_o.flit.head  = tx_flit.head;
    to_router_o.flit.tail  = tx_flit.tail;
    to_router_o.flit.dst_x = tx_flit.dst_x;
    to_router_o.flit.dst_y = tx_flit.dst_y;
    to_router_o.flit.vc    = tx_flit.vc;
    to_router_o.flit.code  = tx_code;
  end

  flit_decoder u_dec (
    .code_i          (from_router_i.flit.code),
    .data_o          (rx_data),
    .syn_o           (rx_syn),
    .corrected_o     (rx_corr),
    .uncorrectable_o (rx_unc)
  );

  ni_unpack u_unpack (
    .clk             (clk),
    .rst_n           (rst_n),
    .flit_valid_i    (from_router_i.valid),
    .head_i          (from_router_i.flit.head),
    .tail_i          (from_router_i.flit.tail),
    .vc_i            (from_router_i.flit.vc),
    .data_i          (rx_data),
    .corrected_i     (rx_corr),
    .uncorrectable_i (rx_unc),
    .pe_o            (pe_rx_o),
    .credit_o        (from_router_credit_o)
  );

endmodule
