// noc_mesh: a MESH_X x MESH_Y mesh of hermes_router instances (3x3 in the
// platform). Router (x, y) has node address {x, y} in the low byte of a
// flit and sits at index n = x*MESH_Y + y of the local-port arrays, so for
// the 3x3 mesh the order is 00, 01, 02, 10, 11, 12, 20, 21, 22.
//
// Neighbouring routers are joined East-West and North-South (North is
// y+1). Ports on the mesh edge receive nothing and grant no credit, so XY
// routing never uses them for addresses inside the mesh. The local ports
// are brought out: l_rx/l_din/l_credit_o inject flits into the NoC,
// l_tx/l_dout/l_credit_i deliver them to the attached IP.
module noc_mesh
  import hnplus_pkg::*;
#(
  parameter int unsigned MESH_X    = 3,
  parameter int unsigned MESH_Y    = 3,
  parameter int unsigned BUF_DEPTH = 8,
  localparam int unsigned N = MESH_X * MESH_Y
) (
  input  logic           clk,
  input  logic           reset,
  input  logic  [N-1:0]  l_rx,
  input  flit_t [N-1:0]  l_din,
  output logic  [N-1:0]  l_credit_o,
  output logic  [N-1:0]  l_tx,
  output flit_t [N-1:0]  l_dout,
  input  logic  [N-1:0]  l_credit_i
);

  logic  [N-1:0][NPORTS-1:0] r_rx, r_credit_o, r_tx, r_credit_i;
  flit_t [N-1:0][NPORTS-1:0] r_din, r_dout;

  for (genvar x = 0; x < MESH_X; x++) begin : g_x
    for (genvar y = 0; y < MESH_Y; y++) begin : g_y
      localparam int unsigned n = x * MESH_Y + y;

      hermes_router #(.X(x), .Y(y), .BUF_DEPTH(BUF_DEPTH)) u_router (
        .clk(clk), .reset(reset),
        .rx(r_rx[n]), .data_in(r_din[n]), .credit_o(r_credit_o[n]),
        .tx(r_tx[n]), .data_out(r_dout[n]), .credit_i(r_credit_i[n])
      );

      // local port
      assign r_rx[n][P_LOCAL]       = l_rx[n];
      assign r_din[n][P_LOCAL]      = l_din[n];
      assign l_credit_o[n]          = r_credit_o[n][P_LOCAL];
      assign l_tx[n]                = r_tx[n][P_LOCAL];
      assign l_dout[n]              = r_dout[n][P_LOCAL];
      assign r_credit_i[n][P_LOCAL] = l_credit_i[n];

      // east neighbour (x+1, y)
      if (x + 1 < MESH_X) begin : g_e
        localparam int unsigned e = (x + 1) * MESH_Y + y;
        assign r_rx[n][P_EAST]       = r_tx[e][P_WEST];
        assign r_din[n][P_EAST]      = r_dout[e][P_WEST];
        assign r_credit_i[n][P_EAST] = r_credit_o[e][P_WEST];
      end else begin : g_e_edge
        assign r_rx[n][P_EAST]       = 1'b0;
        assign r_din[n][P_EAST]      = '0;
        assign r_credit_i[n][P_EAST] = 1'b0;
      end
      // west neighbour (x-1, y)
      if (x > 0) begin : g_w
        localparam int unsigned w = (x - 1) * MESH_Y + y;
        assign r_rx[n][P_WEST]       = r_tx[w][P_EAST];
        assign r_din[n][P_WEST]      = r_dout[w][P_EAST];
        assign r_credit_i[n][P_WEST] = r_credit_o[w][P_EAST];
      end else begin : g_w_edge
        assign r_rx[n][P_WEST]       = 1'b0;
        assign r_din[n][P_WEST]      = '0;
        assign r_credit_i[n][P_WEST] = 1'b0;
      end
      // north neighbour (x, y+1)
      if (y + 1 < MESH_Y) begin : g_n
        localparam int unsigned nn = x * MESH_Y + y + 1;
        assign r_rx[n][P_NORTH]       = r_tx[nn][P_SOUTH];
        assign r_din[n][P_NORTH]      = r_dout[nn][P_SOUTH];
        assign r_credit_i[n][P_NORTH] = r_credit_o[nn][P_SOUTH];
      end else begin : g_n_edge
        assign r_rx[n][P_NORTH]       = 1'b0;
        assign r_din[n][P_NORTH]      = '0;
        assign r_credit_i[n][P_NORTH] = 1'b0;
      end
      // south neighbour (x, y-1)
      if (y > 0) begin : g_s
        localparam int unsigned s = x * MESH_Y + y - 1;
        assign r_rx[n][P_SOUTH]       = r_tx[s][P_NORTH];
        assign r_din[n][P_SOUTH]      = r_dout[s][P_NORTH];
        assign r_credit_i[n][P_SOUTH] = r_credit_o[s][P_NORTH];
      end else begin : g_s_edge
        assign r_rx[n][P_SOUTH]       = 1'b0;
        assign r_din[n][P_SOUTH]      = '0;
        assign r_credit_i[n][P_SOUTH] = 1'b0;
      end
    end
  end

endmodule
