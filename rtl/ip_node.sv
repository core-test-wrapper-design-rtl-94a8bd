// ip_node: one core site of the test network: network interface (ni),
// network adapter (na), wrapper interface circuit (wic) and the core test
// wrapper, chained in that order from the router's local port to the core.
//
// A test packet addressed to this node is kept by the NI, interpreted by the
// NA, and applied to the wrapper by the WIC; the result comes back the same
// way and leaves as a one-flit result packet. The wrapped core itself is
// outside: its functional, scan and control signals are ports (core_*), and
// so are the functional terminals on the chip side (fn_in/fn_out).
// Timing is that of the parts; see their files.
// The chain NI - NA - WIC - wrapper - core is the node drawing's.
module ip_node
  import wrap_pkg::*;
  import noc_pkg::*;
#(
  parameter logic [ADDR_W-1:0] NODE_ADDR = '0,
  parameter int unsigned       N_IN      = 3,
  parameter int unsigned       N_OUT     = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  // router local port
  input  logic             rt_valid,
  input  flit_t            rt_flit,
  output logic             rt_ready,
  output logic             to_rt_valid,
  output flit_t            to_rt_flit,
  input  logic             to_rt_ready,
  // chip-side functional terminals of the core
  input  logic [N_IN-1:0]  fn_in,
  output logic [N_OUT-1:0] fn_out,
  // core side
  output logic [N_IN-1:0]  core_in,
  input  logic [N_OUT-1:0] core_out,
  output logic [1:0]       core_sc_in,
  input  logic [1:0]       core_sc_out,
  output logic             core_se,
  output logic             core_ce,
  // state
  output logic             core_test_mode,
  output logic             last_fail,
  output logic             drop_pulse,
  output mode_e            mode
);
  // NI <-> NA
  logic                rx_valid, rx_ready;
  flit_t               rx_flit;
  logic                res_valid, res_ready;
  logic [ADDR_W-1:0]   res_dest;
  logic [2:0]          res_port;
  logic [RESULT_W-1:0] res_value;
  // NA <-> WIC
  logic                wic_start, wic_has_payload, pl_valid, pl_last, pl_ready, wic_done;
  logic [INSTR_W-1:0]  wic_instr;
  logic [FLIT_W-1:0]   pl_data;
  logic [RESULT_W-1:0] wic_result;
  logic                wic_busy;
  // WIC <-> wrapper
  wsc_t       wsc;
  logic       si, so, com_si, se, test_en, configured;
  logic [2:0] pi, po, com_pi;

  ni #(.NODE_ADDR(NODE_ADDR)) u_ni (
    .clk, .rst_n,
    .in_valid(rt_valid), .in_flit(rt_flit), .in_ready(rt_ready),
    .out_valid(to_rt_valid), .out_flit(to_rt_flit), .out_ready(to_rt_ready),
    .rx_valid, .rx_flit, .rx_ready,
    .res_valid, .res_dest, .res_port, .res_value, .res_ready,
    .drop_pulse
  );

  na u_na (
    .clk, .rst_n,
    .rx_valid, .rx_flit, .rx_ready,
    .res_valid, .res_dest, .res_port, .res_value, .res_ready,
    .wic_start, .wic_instr, .wic_has_payload,
    .pl_valid, .pl_data, .pl_last, .pl_ready,
    .wic_done, .wic_result,
    .core_test_mode, .last_fail
  );

  wic u_wic (
    .clk, .rst_n,
    .start(wic_start), .instr(wic_instr), .has_payload(wic_has_payload),
    .pl_valid, .pl_data, .pl_last, .pl_ready,
    .done(wic_done), .result(wic_result), .busy(wic_busy),
    .wsc, .si, .pi, .com_si, .com_pi, .se, .test_en, .so, .po
  );

  wrapper #(.N_IN(N_IN), .N_OUT(N_OUT)) u_wrapper (
    .clk, .rst_n, .test_en,
    .wsc, .si, .so, .pi, .po, .com_si, .com_pi, .se,
    .fn_in, .fn_out,
    .core_in, .core_out, .core_sc_in, .core_sc_out, .core_se, .core_ce,
    .mode, .configured
  );

  // the WIC is only ever busy while the adapter is in a test
  assert property (@(posedge clk) disable iff (!rst_n) wic_busy |-> core_test_mode)
    else $error("ip_node: wrapper interface busy outside a test");
  // a test mode is only configured while a test packet is being served
  assert property (@(posedge clk) disable iff (!rst_n) configured |-> core_test_mode)
    else $error("ip_node: wrapper left in a test mode");
endmodule
