// noc_mesh: NX x NY mesh of noc_router instances with XY routing.
//
// Node (x, y) has id {y, x}; east is x+1, south is y+1. Each router's local
// port is brought out as a flit stream with credits: loc_in_* injects into the
// router (the NI must hold a credit counter initialised to DEPTH and spend
// one per flit; loc_in_credit returns them), loc_out_* ejects (the NI owns a
// DEPTH-deep buffer and pulses loc_out_credit when it frees an entry). Ports at
// the mesh border are tied off. Per-node arrival counts and buffer occupancy
// are exported for the DoS monitors.
//
// The same module builds the 8x8 data NoC and the service NoC (a second,
// physically separate network with narrow single-flit messages), as in the
// architecture's two-network SoC.
module noc_mesh
  import nocsec_pkg::*;
#(
  parameter int unsigned NX    = MESH_X,
  parameter int unsigned NY    = MESH_Y,
  parameter int unsigned FW    = DATA_FW,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned N    = NX * NY
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         loc_in_valid,
  input  logic [N-1:0][FW-1:0] loc_in_flit,
  output logic [N-1:0]         loc_in_credit,
  output logic [N-1:0]         loc_out_valid,
  output logic [N-1:0][FW-1:0] loc_out_flit,
  input  logic [N-1:0]         loc_out_credit,
  output logic [N-1:0][2:0]    arrivals,
  output logic [N-1:0][7:0]    occupancy
);
  logic [N-1:0][NPORTS-1:0]         r_in_valid, r_in_credit, r_out_valid, r_out_credit;
  logic [N-1:0][NPORTS-1:0][FW-1:0] r_in_flit, r_out_flit;

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned ID = y * NX + x;
      node_id_t id;
      assign id = '{y: COORD_W'(y), x: COORD_W'(x)};

      noc_router #(.FW(FW), .DEPTH(DEPTH)) u_router (
        .clk, .rst_n, .my_id(id),
        .in_valid(r_in_valid[ID]), .in_flit(r_in_flit[ID]), .in_credit(r_in_credit[ID]),
        .out_valid(r_out_valid[ID]), .out_flit(r_out_flit[ID]), .out_credit(r_out_credit[ID]),
        .arrivals(arrivals[ID]), .occupancy(occupancy[ID]));

      // local port
      assign r_in_valid[ID][P_LOCAL]   = loc_in_valid[ID];
      assign r_in_flit[ID][P_LOCAL]    = loc_in_flit[ID];
      assign loc_in_credit[ID]         = r_in_credit[ID][P_LOCAL];
      assign loc_out_valid[ID]         = r_out_valid[ID][P_LOCAL];
      assign loc_out_flit[ID]          = r_out_flit[ID][P_LOCAL];
      assign r_out_credit[ID][P_LOCAL] = loc_out_credit[ID];

      // east neighbour (x+1) / west border
      if (x + 1 < NX) begin : g_e
        assign r_in_valid[ID][P_EAST]   = r_out_valid[ID+1][P_WEST];
        assign r_in_flit[ID][P_EAST]    = r_out_flit[ID+1][P_WEST];
        assign r_out_credit[ID][P_EAST] = r_in_credit[ID+1][P_WEST];
      end else begin : g_e_edge
        assign r_in_valid[ID][P_EAST]   = 1'b0;
        assign r_in_flit[ID][P_EAST]    = '0;
        assign r_out_credit[ID][P_EAST] = 1'b0;
      end
      if (x > 0) begin : g_w
        assign r_in_valid[ID][P_WEST]   = r_out_valid[ID-1][P_EAST];
        assign r_in_flit[ID][P_WEST]    = r_out_flit[ID-1][P_EAST];
        assign r_out_credit[ID][P_WEST] = r_in_credit[ID-1][P_EAST];
      end else begin : g_w_edge
        assign r_in_valid[ID][P_WEST]   = 1'b0;
        assign r_in_flit[ID][P_WEST]    = '0;
        assign r_out_credit[ID][P_WEST] = 1'b0;
      end
      if (y + 1 < NY) begin : g_s
        assign r_in_valid[ID][P_SOUTH]   = r_out_valid[ID+NX][P_NORTH];
        assign r_in_flit[ID][P_SOUTH]    = r_out_flit[ID+NX][P_NORTH];
        assign r_out_credit[ID][P_SOUTH] = r_in_credit[ID+NX][P_NORTH];
      end else begin : g_s_edge
        assign r_in_valid[ID][P_SOUTH]   = 1'b0;
        assign r_in_flit[ID][P_SOUTH]    = '0;
        assign r_out_credit[ID][P_SOUTH] = 1'b0;
      end
      if (y > 0) begin : g_n
        assign r_in_valid[ID][P_NORTH]   = r_out_valid[ID-NX][P_SOUTH];
        assign r_in_flit[ID][P_NORTH]    = r_out_flit[ID-NX][P_SOUTH];
        assign r_out_credit[ID][P_NORTH] = r_in_credit[ID-NX][P_SOUTH];
      end else begin : g_n_edge
        assign r_in_valid[ID][P_NORTH]   = 1'b0;
        assign r_in_flit[ID][P_NORTH]    = '0;
        assign r_out_credit[ID][P_NORTH] = 1'b0;
      end
    end
  end
endmodule
