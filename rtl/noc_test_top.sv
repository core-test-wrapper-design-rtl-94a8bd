// noc_test_top: 4x4 mesh network-on-chip whose sixteen IP cores are tested
// through the network, each through its own core test wrapper.
//
// Contents: the mesh of routers (mesh_noc), one core site per router
// (ip_node: NI, NA, WIC, wrapper) and one peripheral In/Out config circuit
// (port_config) on each of the sixteen edge ports of the mesh.
// A tester drives test packets into any edge port (ate_*). A unicast packet
// names one core, a multicast packet several, in its destination mask; the
// routers copy multicast packets along an XY tree, each addressed core runs
// the test in its wrapper, compares the response with the expected one
// inside the wrapper and sends a single result flit to the edge port the
// packet named, where the Out config circuit hands it to the tester (res_*).
// Dividing the mesh into 2, 4 or 8 subnets for parallel unicast testing needs
// no special hardware: each subnet is fed through its own edge port and
// XY routes between nodes of a rectangular subnet stay inside it.
//
// The wrapped cores are not part of this design: their signals are ports
// (core_*, index = node address), as are their chip-side functional
// terminals (fn_in/fn_out). Every core site has two scan chains; its
// number of functional inputs and outputs is NODE_IN[n] / NODE_OUT[n], by
// default N_IN / N_OUT (the S444 example) everywhere. Port widths are
// N_IN / N_OUT; a smaller core uses the low bits, and the bits above are
// ignored (inputs) or zero (outputs). The NoC 1 arrangement of four
// different benchmark cores is obtained by overriding these parameters
// (see tb_noc1).
// Edge port numbering is mesh_noc's: 0..3 north (x), 4..7 east (y),
// 8..11 south (x), 12..15 west (y).
module noc_test_top
  import wrap_pkg::*;
  import noc_pkg::*;
#(
  parameter int unsigned N_IN       = 3,
  parameter int unsigned N_OUT      = 6,
  parameter int unsigned FIFO_DEPTH = 4,
  // per-node core geometry, each at most N_IN / N_OUT
  parameter int unsigned NODE_IN  [NODES] = '{default: N_IN},
  parameter int unsigned NODE_OUT [NODES] = '{default: N_OUT}
) (
  input  logic                clk,
  input  logic                rst_n,
  // tester channels, one per edge port
  input  logic                ate_valid   [4*DIM],
  input  flit_t               ate_flit    [4*DIM],
  output logic                ate_ready   [4*DIM],
  output logic                res_valid   [4*DIM],
  output logic [ADDR_W-1:0]   res_src     [4*DIM],
  output logic [RESULT_W-1:0] res_value   [4*DIM],
  output logic                res_pass    [4*DIM],
  input  logic                res_ready   [4*DIM],
  output logic [15:0]         res_count   [4*DIM],
  output logic [15:0]         fail_count  [4*DIM],
  // functional terminals and wrapped cores, index = node address
  input  logic [N_IN-1:0]     fn_in       [NODES],
  output logic [N_OUT-1:0]    fn_out      [NODES],
  output logic [N_IN-1:0]     core_in     [NODES],
  input  logic [N_OUT-1:0]    core_out    [NODES],
  output logic [1:0]          core_sc_in  [NODES],
  input  logic [1:0]          core_sc_out [NODES],
  output logic                core_se     [NODES],
  output logic                core_ce     [NODES],
  output logic                core_test_mode [NODES],
  output logic                core_fail   [NODES],
  output mode_e               core_mode   [NODES],
  // event flags
  output logic [NODES-1:0]    drop_pulse,
  output logic [NODES-1:0]    fork_pulse,
  output logic [NODES-1:0]    stall_pulse
);
  logic  loc_in_valid  [NODES];
  flit_t loc_in_flit   [NODES];
  logic  loc_in_ready  [NODES];
  logic  loc_out_valid [NODES];
  flit_t loc_out_flit  [NODES];
  logic  loc_out_ready [NODES];
  logic  e_in_valid  [4*DIM];
  flit_t e_in_flit   [4*DIM];
  logic  e_in_ready  [4*DIM];
  logic  e_out_valid [4*DIM];
  flit_t e_out_flit  [4*DIM];
  logic  e_out_ready [4*DIM];

  mesh_noc #(.FIFO_DEPTH(FIFO_DEPTH)) u_mesh (
    .clk, .rst_n,
    .loc_in_valid, .loc_in_flit, .loc_in_ready,
    .loc_out_valid, .loc_out_flit, .loc_out_ready,
    .edge_in_valid(e_in_valid), .edge_in_flit(e_in_flit), .edge_in_ready(e_in_ready),
    .edge_out_valid(e_out_valid), .edge_out_flit(e_out_flit), .edge_out_ready(e_out_ready),
    .fork_pulse, .stall_pulse
  );

  for (genvar n = 0; n < NODES; n++) begin : g_node
    localparam int unsigned NI = NODE_IN[n];
    localparam int unsigned NO = NODE_OUT[n];
    logic [NO-1:0] node_fn_out;
    logic [NI-1:0] node_core_in;
    // the bits above a node's own width are unused inputs / zero outputs
    assign fn_out[n]  = N_OUT'(node_fn_out);
    assign core_in[n] = N_IN'(node_core_in);

    ip_node #(.NODE_ADDR(ADDR_W'(n)), .N_IN(NI), .N_OUT(NO)) u_node (
      .clk, .rst_n,
      .rt_valid(loc_out_valid[n]), .rt_flit(loc_out_flit[n]), .rt_ready(loc_out_ready[n]),
      .to_rt_valid(loc_in_valid[n]), .to_rt_flit(loc_in_flit[n]), .to_rt_ready(loc_in_ready[n]),
      .fn_in(fn_in[n][NI-1:0]), .fn_out(node_fn_out),
      .core_in(node_core_in), .core_out(core_out[n][NO-1:0]),
      .core_sc_in(core_sc_in[n]), .core_sc_out(core_sc_out[n]),
      .core_se(core_se[n]), .core_ce(core_ce[n]),
      .core_test_mode(core_test_mode[n]), .last_fail(core_fail[n]),
      .drop_pulse(drop_pulse[n]), .mode(core_mode[n])
    );
  end

  for (genvar e = 0; e < 4*DIM; e++) begin : g_edge
    port_config u_port (
      .clk, .rst_n,
      .ate_valid(ate_valid[e]), .ate_flit(ate_flit[e]), .ate_ready(ate_ready[e]),
      .res_valid(res_valid[e]), .res_src(res_src[e]), .res_value(res_value[e]),
      .res_pass(res_pass[e]), .res_ready(res_ready[e]),
      .results(res_count[e]), .fails(fail_count[e]),
      .edge_in_valid(e_in_valid[e]), .edge_in_flit(e_in_flit[e]), .edge_in_ready(e_in_ready[e]),
      .edge_out_valid(e_out_valid[e]), .edge_out_flit(e_out_flit[e]),
      .edge_out_ready(e_out_ready[e])
    );
  end
endmodule
