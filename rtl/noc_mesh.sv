// noc_mesh: MESH_X x MESH_Y mesh network-on-chip with end-to-end error
// correction in the network interfaces (the top of this design).
//
// Node (x, y) has index y*MESH_X + x and holds one five-port router and one
// NI. Router (x, y) north port connects to the south port of (x, y+1), its
// east port to the west port of (x+1, y); ports on the mesh edge are left
// unconnected (no flits in, no credits in). Every NI encodes the flits its
// PE sends and decodes the flits it receives; routers only forward.
//
// fault_mask_i[n] is XORed onto the 96-bit codeword of every flit that
// arrives at node n's NI from its router. It stands for the bit flips a flit
// can pick up on the links and buffers of its path (crosstalk, single-event
// upsets); tie it to zero in normal use.
//
// The 8 x 8 mesh of five-port routers with NI-only codec placement is the
// evaluated configuration; the fault-injection input is this design's
// addition for testing.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int MESH_X   = 8,
  parameter int MESH_Y   = 8,
  parameter int VC_DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  ni_tx_t                    pe_tx_i       [MESH_X*MESH_Y],
  output logic [MESH_X*MESH_Y-1:0]  pe_tx_ready_o,
  output ni_rx_t                    pe_rx_o       [MESH_X*MESH_Y],
  input  logic [ecc_pkg::CODE_W-1:0] fault_mask_i [MESH_X*MESH_Y]
);

  localparam int NODES = MESH_X * MESH_Y;

  link_t   [NPORTS-1:0] r_in_link   [NODES];
  credit_t [NPORTS-1:0] r_in_credit [NODES];
  link_t   [NPORTS-1:0] r_out_link  [NODES];
  credit_t [NPORTS-1:0] r_out_credit[NODES];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int ID = y * MESH_X + x;
      link_t ej_link;

      noc_router #(.X(x), .Y(y), .VC_DEPTH(VC_DEPTH)) u_router (
        .clk        (clk),
        .rst_n      (rst_n),
        .in_link    (r_in_link[ID]),
        .in_credit  (r_in_credit[ID]),
        .out_link   (r_out_link[ID]),
        .out_credit (r_out_credit[ID])
      );

      always_comb begin
        ej_link = r_out_link[ID][P_LOCAL];
        ej_link.flit.code = ej_link.flit.code ^ (ej_link.valid ? fault_mask_i[ID] : '0);
      end

      noc_ni #(.VC_DEPTH(VC_DEPTH)) u_ni (
        .clk                  (clk),
        .rst_n                (rst_n),
        .pe_tx_i              (pe_tx_i[ID]),
        .pe_tx_ready_o        (pe_tx_ready_o[ID]),
        .pe_rx_o              (pe_rx_o[ID]),
        .to_router_o          (r_in_link[ID][P_LOCAL]),
        .to_router_credit_i   (r_in_credit[ID][P_LOCAL]),
        .from_router_i        (ej_link),
        .from_router_credit_o (r_out_credit[ID][P_LOCAL])
      );

      // North / south neighbours.
      if (y < MESH_Y - 1) begin : g_n
        assign r_in_link[ID][P_NORTH]    = r_out_link[ID + MESH_X][P_SOUTH];
        assign r_out_credit[ID][P_NORTH] = r_in_credit[ID + MESH_X][P_SOUTH];
      end else begin : g_n_edge
        assign r_in_link[ID][P_NORTH]    = '0;
        assign r_out_credit[ID][P_NORTH] = '0;
      end
      if (y > 0) begin : g_s
        assign r_in_link[ID][P_SOUTH]    = r_out_link[ID - MESH_X][P_NORTH];
        assign r_out_credit[ID][P_SOUTH] = r_in_credit[ID - MESH_X][P_NORTH];
      end else begin : g_s_edge
        assign r_in_link[ID][P_SOUTH]    = '0;
        assign r_out_credit[ID][P_SOUTH] = '0;
      end
      // East / west neighbours.
      if (x < MESH_X - 1) begin : g_e
        assign r_in_link[ID][P_EAST]    = r_out_link[ID + 1][P_WEST];
        assign r_out_credit[ID][P_EAST] = r_in_credit[ID + 1][P_WEST];
      end else begin : g_e_edge
        assign r_in_link[ID][P_EAST]    = '0;
        assign r_out_credit[ID][P_EAST] = '0;
      end
      if (x > 0) begin : g_w
        assign r_in_link[ID][P_WEST]    = r_out_link[ID - 1][P_EAST];
        assign r_out_credit[ID][P_WEST] = r_in_credit[ID - 1][P_EAST];
      end else begin : g_w_edge
        assign r_in_link[ID][P_WEST]    = '0;
        assign r_out_credit[ID][P_WEST] = '0;
      end
    end
  end

endmodule
