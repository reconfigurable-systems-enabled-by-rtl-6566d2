// artemis_noc: NX x NY mesh of Artemis routers.
//
// Router (x, y) has address {x, y} (X in the upper nibble of a header flit,
// Y in the lower) and sits at index r = y*NX + x of the local-port arrays.
// Each router's East port connects to the West port of (x+1, y) and its
// North port to the South port of (x, y+1); every link carries tx, ctrl and
// an 8-bit flit one way and ack the other way. Ports at the mesh edge are
// tied off (no flits in, no ack out); XY routing never uses them for an
// address inside the mesh. reconf[r] is router r's isolation state for the
// core on its local port. The 2x2 default is the size of the case-study
// system.
module artemis_noc
  import artemis_pkg::*;
#(
  parameter int unsigned NX        = 2,
  parameter int unsigned NY        = 2,
  parameter int unsigned BUF_DEPTH = 16
) (
  input  logic  clk,
  input  logic  reset,
  input  link_t loc_in      [NX*NY],
  output logic  loc_in_ack  [NX*NY],
  output link_t loc_out     [NX*NY],
  input  logic  loc_out_ack [NX*NY],
  output logic  reconf      [NX*NY]
);

  localparam int unsigned NR = NX * NY;

  link_t r_in   [NR][NPORTS];
  logic  r_iack [NR][NPORTS];
  link_t r_out  [NR][NPORTS];
  logic  r_oack [NR][NPORTS];

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned R = y * NX + x;

      artemis_router #(
        .ADDR     (8'((x << 4) | y)),
        .BUF_DEPTH(BUF_DEPTH)
      ) u_router (
        .clk, .reset,
        .in_link (r_in[R]),
        .in_ack  (r_iack[R]),
        .out_link(r_out[R]),
        .out_ack (r_oack[R]),
        .reconf  (reconf[R])
      );

      // local port
      assign r_in[R][LOCAL]   = loc_in[R];
      assign loc_in_ack[R]    = r_iack[R][LOCAL];
      assign loc_out[R]       = r_out[R][LOCAL];
      assign r_oack[R][LOCAL] = loc_out_ack[R];

      // east / west
      if (x + 1 < NX) begin : g_e
        assign r_in[R][EAST]   = r_out[R+1][WEST];
        assign r_oack[R][EAST] = r_iack[R+1][WEST];
      end else begin : g_e_edge
        assign r_in[R][EAST]   = '0;
        assign r_oack[R][EAST] = 1'b0;
      end
      if (x > 0) begin : g_w
        assign r_in[R][WEST]   = r_out[R-1][EAST];
        assign r_oack[R][WEST] = r_iack[R-1][EAST];
      end else begin : g_w_edge
        assign r_in[R][WEST]   = '0;
        assign r_oack[R][WEST] = 1'b0;
      end
      // north / south
      if (y + 1 < NY) begin : g_n
        assign r_in[R][NORTH]   = r_out[R+NX][SOUTH];
        assign r_oack[R][NORTH] = r_iack[R+NX][SOUTH];
      end else begin : g_n_edge
        assign r_in[R][NORTH]   = '0;
        assign r_oack[R][NORTH] = 1'b0;
      end
      if (y > 0) begin : g_s
        assign r_in[R][SOUTH]   = r_out[R-NX][NORTH];
        assign r_oack[R][SOUTH] = r_iack[R-NX][NORTH];
      end else begin : g_s_edge
        assign r_in[R][SOUTH]   = '0;
        assign r_oack[R][SOUTH] = 1'b0;
      end
    end
  end

endmodule
