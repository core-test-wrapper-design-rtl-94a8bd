// mesh_noc: 4x4 two-dimensional mesh of routers.
//
// Router (x,y) has node address {y,x}: 0000 top-left, 0011 top-right,
// 1100 bottom-left. Neighbouring routers are joined by a pair of opposite
// links (32-bit flit, head/tail marks, valid/ready). Each router's local port
// is brought out for the node attached to it (index = node address), and each
// port on the mesh boundary is brought out as an edge port for the
// peripheral In/Out config circuits. Edge port numbering:
//   0..3   north side, x = 0..3        4..7   east side, y = 0..3
//   8..11  south side, x = 0..3        12..15 west side, y = 0..3
// fork_pulse/stall_pulse collect the routers' event flags.
// The mesh size, the addresses and the use of edge ports for the test
// interface follow the description; the link protocol is this design's.
module mesh_noc
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  // local ports, index = node address
  input  logic  loc_in_valid  [NODES],
  input  flit_t loc_in_flit   [NODES],
  output logic  loc_in_ready  [NODES],
  output logic  loc_out_valid [NODES],
  output flit_t loc_out_flit  [NODES],
  input  logic  loc_out_ready [NODES],
  // edge ports
  input  logic  edge_in_valid  [4*DIM],
  input  flit_t edge_in_flit   [4*DIM],
  output logic  edge_in_ready  [4*DIM],
  output logic  edge_out_valid [4*DIM],
  output flit_t edge_out_flit  [4*DIM],
  input  logic  edge_out_ready [4*DIM],
  output logic  [NODES-1:0] fork_pulse,
  output logic  [NODES-1:0] stall_pulse
);
  // per-router port signals, [node][port]
  logic  iv [NODES][NPORT];
  flit_t ifl[NODES][NPORT];
  logic  ir [NODES][NPORT];
  logic  ov [NODES][NPORT];
  flit_t ofl[NODES][NPORT];
  logic  orr[NODES][NPORT];

  for (genvar y = 0; y < DIM; y++) begin : g_y
    for (genvar x = 0; x < DIM; x++) begin : g_x
      localparam int unsigned N = y * DIM + x;

      router #(.ADDR(ADDR_W'(N)), .FIFO_DEPTH(FIFO_DEPTH)) u_router (
        .clk, .rst_n,
        .in_valid(iv[N]), .in_flit(ifl[N]), .in_ready(ir[N]),
        .out_valid(ov[N]), .out_flit(ofl[N]), .out_ready(orr[N]),
        .fork_pulse(fork_pulse[N]), .stall_pulse(stall_pulse[N])
      );

      // local port
      assign iv[N][P_LOCAL]  = loc_in_valid[N];
      assign ifl[N][P_LOCAL] = loc_in_flit[N];
      assign loc_in_ready[N] = ir[N][P_LOCAL];
      assign loc_out_valid[N] = ov[N][P_LOCAL];
      assign loc_out_flit[N]  = ofl[N][P_LOCAL];
      assign orr[N][P_LOCAL]  = loc_out_ready[N];

      // north
      if (y == 0) begin : g_n_edge
        assign iv[N][P_NORTH]  = edge_in_valid[x];
        assign ifl[N][P_NORTH] = edge_in_flit[x];
        assign edge_in_ready[x] = ir[N][P_NORTH];
        assign edge_out_valid[x] = ov[N][P_NORTH];
        assign edge_out_flit[x]  = ofl[N][P_NORTH];
        assign orr[N][P_NORTH]   = edge_out_ready[x];
      end else begin : g_n_link
        assign iv[N][P_NORTH]  = ov[N-DIM][P_SOUTH];
        assign ifl[N][P_NORTH] = ofl[N-DIM][P_SOUTH];
        assign orr[N][P_NORTH] = ir[N-DIM][P_SOUTH];
      end
      // south
      if (y == DIM - 1) begin : g_s_edge
        assign iv[N][P_SOUTH]  = edge_in_valid[2*DIM+x];
        assign ifl[N][P_SOUTH] = edge_in_flit[2*DIM+x];
        assign edge_in_ready[2*DIM+x] = ir[N][P_SOUTH];
        assign edge_out_valid[2*DIM+x] = ov[N][P_SOUTH];
        assign edge_out_flit[2*DIM+x]  = ofl[N][P_SOUTH];
        assign orr[N][P_SOUTH]         = edge_out_ready[2*DIM+x];
      end else begin : g_s_link
        assign iv[N][P_SOUTH]  = ov[N+DIM][P_NORTH];
        assign ifl[N][P_SOUTH] = ofl[N+DIM][P_NORTH];
        assign orr[N][P_SOUTH] = ir[N+DIM][P_NORTH];
      end
      // east
      if (x == DIM - 1) begin : g_e_edge
        assign iv[N][P_EAST]  = edge_in_valid[DIM+y];
        assign ifl[N][P_EAST] = edge_in_flit[DIM+y];
        assign edge_in_ready[DIM+y] = ir[N][P_EAST];
        assign edge_out_valid[DIM+y] = ov[N][P_EAST];
        assign edge_out_flit[DIM+y]  = ofl[N][P_EAST];
        assign orr[N][P_EAST]        = edge_out_ready[DIM+y];
      end else begin : g_e_link
        assign iv[N][P_EAST]  = ov[N+1][P_WEST];
        assign ifl[N][P_EAST] = ofl[N+1][P_WEST];
        assign orr[N][P_EAST] = ir[N+1][P_WEST];
      end
      // west
      if (x == 0) begin : g_w_edge
        assign iv[N][P_WEST]  = edge_in_valid[3*DIM+y];
        assign ifl[N][P_WEST] = edge_in_flit[3*DIM+y];
        assign edge_in_ready[3*DIM+y] = ir[N][P_WEST];
        assign edge_out_valid[3*DIM+y] = ov[N][P_WEST];
        assign edge_out_flit[3*DIM+y]  = ofl[N][P_WEST];
        assign orr[N][P_WEST]          = edge_out_ready[3*DIM+y];
      end else begin : g_w_link
        assign iv[N][P_WEST]  = ov[N-1][P_EAST];
        assign ifl[N][P_WEST] = ofl[N-1][P_EAST];
        assign orr[N][P_WEST] = ir[N-1][P_EAST];
      end
    end
  end
endmodule
