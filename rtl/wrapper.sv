// wrapper: core test wrapper for a scan-inserted IP core on a NoC.
//
// The wrapper surrounds a core that has N_IN functional inputs, N_OUT
// functional outputs and two internal scan chains (the default geometry is
// the ISCAS'89 S444 example: 3 inputs, 6 outputs). It contains
//   * an input WBR (one wbc per functional input) and an output WBR (one per
//     output), which isolate the core and give access to its terminals;
//   * a serial bypass register (one wby bit) from Si;
//   * a parallel bypass register (three wby bits) from Pi[2:0];
//   * the wrapper instruction register (wir), loaded from Si;
//   * the test response comparator: XOR gates between the ends of the test
//     chains and the expected-response inputs Com_si / Com_pi[2:0]. When the
//     tester supplies the expected response while the actual one is shifted
//     out, So / Po carry the bitwise difference: all zero for a good core;
//   * the multiplexers m0..m11, whose selects come from the decoded WIR.
//
// Test paths per mode (m-select meanings are listed in wrap_pkg):
//   serial bypass     Si -> WBY -> So
//   parallel bypass   Pi[k] -> bypass bit k -> Po[k]
//   serial in-test    Si -> inWBR -> scan chain 2 -> scan chain 1 -> outWBR -> XOR Com_si -> So
//   serial ex-test    Si -> inWBR -> outWBR -> XOR Com_si -> So
//   parallel in-test  Pi[0] -> scan chain 1 -> XOR Com_pi[0] -> Po[0]
//                     Pi[1] -> scan chain 2 -> XOR Com_pi[1] -> Po[1]
//                     Pi[2] -> inWBR -> outWBR -> XOR Com_pi[2] -> Po[2]
//   parallel ex-test  Pi[2] -> inWBR -> outWBR -> XOR Com_pi[2] -> Po[2],
//                     Pi[0], Pi[1] through the parallel bypass register
//   normal            In -> core -> Out, boundary cells transparent
// The boundary cells shift when the mode allows it and Se is high, and
// capture when Se is low; Se also goes straight to the core's scan enable.
//
// test_en is this design's addition: when low, every wrapper register keeps
// its value (boundary cells held, bypass registers not loading) and core_ce
// tells the core to hold its state too, so the network interface may stall
// between payload flits without disturbing a test. The WIR is not affected.
// Timing: one clock per shift; outputs So/Po are combinational from the last
// register of the selected path and the Com inputs.
//
// From the block diagram: the register set, the XOR comparator on the serial
// output and on each parallel output, Com_si/Com_pi, and the numbering m0..m11
// where it is printed. The diagram labels three multiplexers m6; the one
// steering Pi[2] is taken as m3 and the one feeding the output WBR as m4.
// Its six-wire control bundle Wrap[5:0] is taken as the clock plus the five
// serial control signals carried in wsc. core_se and core_ce are Se and
// test_en passed straight to the core. The exact wiring of each multiplexer, in particular
// which chain feeds the output WBR, is this design's reading.
module wrapper
  import wrap_pkg::*;
#(
  parameter int unsigned N_IN  = 3,
  parameter int unsigned N_OUT = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             test_en,
  // wrapper serial control and test terminals
  input  wsc_t             wsc,
  input  logic             si,
  output logic             so,
  input  logic [2:0]       pi,
  output logic [2:0]       po,
  input  logic             com_si,
  input  logic [2:0]       com_pi,
  input  logic             se,
  // functional terminals of the wrapped core, chip side
  input  logic [N_IN-1:0]  fn_in,
  output logic [N_OUT-1:0] fn_out,
  // core side
  output logic [N_IN-1:0]  core_in,
  input  logic [N_OUT-1:0] core_out,
  output logic [1:0]       core_sc_in,
  input  logic [1:0]       core_sc_out,
  output logic             core_se,
  output logic             core_ce,
  // status
  output mode_e            mode,
  output logic             configured
);
  wctrl_t ctrl;
  logic   wir_so;

  wir u_wir (
    .clk, .rst_n, .wsc, .si, .so(wir_so), .ctrl, .mode, .configured
  );

  // effective enables
  logic wbc_scan, hold_in, hold_out, wby_hold, pby_hold;
  assign wbc_scan = test_en & ctrl.scan_en & se;
  assign hold_in  = ctrl.hold_in  | ~test_en;
  assign hold_out = ctrl.hold_out | ~test_en;
  assign wby_hold = test_en & ctrl.wby_hold;
  assign pby_hold = test_en & ctrl.pby_hold;

  // Pi steering (m1..m3): to the core chains or to the parallel bypass register
  logic [2:0] pi_chain, pi_byp;
  for (genvar k = 0; k < 3; k++) begin : g_steer
    assign pi_chain[k] =  ctrl.m[S_M1+k] & pi[k];
    assign pi_byp[k]   = ~ctrl.m[S_M1+k] & pi[k];
  end

  // input WBR
  logic [N_IN:0] in_chain;
  assign in_chain[0] = ctrl.m[S_M0] ? pi_chain[2] : si;
  for (genvar i = 0; i < N_IN; i++) begin : g_in
    wbc u_wbc (
      .clk, .scan_en(wbc_scan), .hold_en(hold_in),
      .cfi(fn_in[i]), .cti(in_chain[i]), .cfo(core_in[i]), .cto(in_chain[i+1])
    );
  end

  // core scan chains (m5, m6)
  assign core_sc_in[1] = ctrl.m[S_M6] ? in_chain[N_IN] : pi_chain[1];
  assign core_sc_in[0] = ctrl.m[S_M5] ? core_sc_out[1] : pi_chain[0];
  assign core_se       = se;
  assign core_ce       = test_en;

  // output WBR (m4)
  logic [N_OUT:0] out_chain;
  assign out_chain[0] = ctrl.m[S_M4] ? core_sc_out[0] : in_chain[N_IN];
  for (genvar i = 0; i < N_OUT; i++) begin : g_out
    wbc u_wbc (
      .clk, .scan_en(wbc_scan), .hold_en(hold_out),
      .cfi(core_out[i]), .cti(out_chain[i]), .cfo(fn_out[i]), .cto(out_chain[i+1])
    );
  end

  // bypass registers
  logic       sby_out;
  logic [2:0] pby_out;
  wby u_sby (.clk, .hold_en(wby_hold), .wby_in(si), .wby_out(sby_out));
  for (genvar k = 0; k < 3; k++) begin : g_pby
    wby u_pby (.clk, .hold_en(pby_hold), .wby_in(pi_byp[k]), .wby_out(pby_out[k]));
  end

  // test response comparator
  logic       cmp_s;
  logic [2:0] cmp_p;
  assign cmp_s    = out_chain[N_OUT] ^ com_si;
  assign cmp_p[0] = core_sc_out[0]   ^ com_pi[0];
  assign cmp_p[1] = core_sc_out[1]   ^ com_pi[1];
  assign cmp_p[2] = out_chain[N_OUT] ^ com_pi[2];

  // output multiplexers m7..m11
  logic s7;
  assign s7 = ctrl.m[S_M7] ? cmp_s : sby_out;
  assign so = (ctrl.m[S_M8] | wsc.select_wir) ? wir_so : s7;
  for (genvar k = 0; k < 3; k++) begin : g_po
    assign po[k] = ctrl.m[S_M9+k] ? cmp_p[k] : pby_out[k];
  end
endmodule
