// tb_noc_schemes: the test schemes of the evaluation, run on the full-size
// test network (default parameters).
//
// Subnet (unicast) schemes a-d divide the mesh into 8, 4, 2 and 1 rectangular
// subnets; every subnet has its own In port and Out port on the mesh edge
// and tests its nodes one after the other with unicast packets, all subnets
// at once. Multicast schemes a-d send one packet per subnet, addressed to
// all 2, 4, 8 or 16 nodes of that subnet, through the same ports. Every node
// runs the same kind of test (serial in-test, two patterns) in all schemes.
//
// For each scheme the testbench measures the test time (clocks from the
// first flit sent to the last result received) and the hop count: head flits
// crossing router-to-router links, test and result packets together. The
// hop counts are checked against values worked out by hand from the XY
// routes and the port placement: 16/32/64/96 for subnets and 16/28/46/63 for
// multicast. It also checks the expected orderings: subnet test time grows
// from scheme a to d, and multicast is faster than subnet testing in every
// scheme. Every result is checked against the reference model, as in
// tb_noc_test_top (same model, same defective node).
//
// Port placement, taken from the subnet drawings where they show it:
//   a: half rows; the west half uses the west port of its row for both
//      directions, the east half the east port;
//   b: quadrants, In/Out ports at mesh corners;
//   c: upper half In at the north port of 0011, Out at the west port of 0100;
//      lower half In at the south port of 1100, Out at the east port of 1011;
//   d: In at the west port of 1100, Out at the east port of 0011.
module tb_noc_schemes;
  import wrap_pkg::*;
  import noc_pkg::*;
  localparam int L1 = 11, L2 = 10;
  localparam int DEFECT_NODE = 5;

  logic clk = 0, rst_n = 0;
  logic                ate_valid   [16];
  flit_t               ate_flit    [16];
  logic                ate_ready   [16];
  logic                res_valid   [16];
  logic [3:0]          res_src     [16];
  logic [13:0]         res_value   [16];
  logic                res_pass    [16];
  logic                res_ready   [16];
  logic [15:0]         res_count   [16];
  logic [15:0]         fail_count  [16];
  logic [2:0]          fn_in       [16];
  logic [5:0]          fn_out      [16];
  logic [2:0]          core_in     [16];
  logic [5:0]          core_out    [16];
  logic [1:0]          core_sc_in  [16];
  logic [1:0]          core_sc_out [16];
  logic                core_se     [16];
  logic                core_ce     [16];
  logic                core_test_mode [16];
  logic                core_fail   [16];
  mode_e               core_mode   [16];
  logic [15:0]         drop_pulse, fork_pulse, stall_pulse;

  noc_test_top dut (.*);

  for (genvar n = 0; n < 16; n++) begin : g_core
    scan_core_model #(.N_IN(3), .N_OUT(6), .L1(L1), .L2(L2), .DEFECT(n == DEFECT_NODE)) u_core (
      .clk, .ce(core_ce[n]), .se(core_se[n]), .sc_in(core_sc_in[n]), .sc_out(core_sc_out[n]),
      .fn_in(core_in[n]), .fn_out(core_out[n])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------------
  // reference model of one wrapper with its core
  typedef struct packed {
    logic [2:0]  inw;
    logic [9:0]  c2;
    logic [10:0] c1;
    logic [5:0]  outw;
    logic        sby;
    logic [2:0]  pby;
  } mst_t;

  localparam logic [2:0] FN = 3'b101;  // chip-side inputs of every core

  function automatic mst_t core_capture(mst_t s, logic [2:0] cin, bit defect);
    mst_t r;
    r = s;
    for (int j = 0; j < L1; j++) r.c1[j] = s.c1[j] ^ s.c2[j % L2] ^ cin[j % 3];
    r.c2 = ~s.c2;
    if (defect) r.c1[0] = 1'b0;
    return r;
  endfunction

  // raw output (before the comparator) and next state for one slot
  task automatic mstep(input int mode, input logic se, input logic [2:0] d, input bit defect,
                       inout mst_t s, output logic [2:0] raw);
    mst_t n;
    n = s;
    raw = '0;
    case (mode)
      M_SER_BYPASS: begin raw[0] = s.sby; n.sby = d[0]; end
      M_PAR_BYPASS: begin raw = s.pby; n.pby = d; end
      M_SER_INTEST, M_PAR_INTEST: begin
        if (mode == M_SER_INTEST) raw[0] = s.outw[5];
        else raw = {s.outw[5], s.c2[9], s.c1[10]};
        if (se) begin
          if (mode == M_SER_INTEST) begin
            n.inw  = {s.inw[1:0], d[0]};
            n.c2   = {s.c2[8:0], s.inw[2]};
            n.c1   = {s.c1[9:0], s.c2[9]};
            n.outw = {s.outw[4:0], s.c1[10]};
          end else begin
            n.c1   = {s.c1[9:0], d[0]};
            n.c2   = {s.c2[8:0], d[1]};
            n.inw  = {s.inw[1:0], d[2]};
            n.outw = {s.outw[4:0], s.inw[2]};
          end
        end else begin
          n = core_capture(s, s.inw, defect);
          for (int k = 0; k < 6; k++) n.outw[k] = s.c1[k] ^ s.c2[k];
        end
      end
      M_SER_EXTEST, M_PAR_EXTEST: begin
        if (mode == M_SER_EXTEST) raw[0] = s.outw[5];
        else raw = {s.outw[5], s.pby[1], s.pby[0]};
        if (mode == M_PAR_EXTEST) n.pby = {1'b0, d[1], d[0]};
        if (se) begin
          n.inw  = {s.inw[1:0], (mode == M_SER_EXTEST) ? d[0] : d[2]};
          n.outw = {s.outw[4:0], s.inw[2]};
          n.c1   = {s.c1[9:0], 1'b0};
          n.c2   = {s.c2[8:0], 1'b0};
        end else begin
          mst_t t;
          t = core_capture(s, FN, defect);
          n.c1 = t.c1; n.c2 = t.c2;
          n.inw = FN;
        end
      end
      default: ;
    endcase
    s = n;
  endtask

  function automatic int chain_len(int mode);
    case (mode)
      M_SER_INTEST: return 30;
      M_PAR_INTEST: return 11;
      M_SER_EXTEST, M_PAR_EXTEST: return 9;
      default: return 1;
    endcase
  endfunction

  // Build the payload of one test: fill, then npat x (capture, unload),
  // or for the bypass modes a stream. flips: expected bits inverted on
  // purpose. Returns the words and the results a good and the defective core
  // give.
  task automatic build_test(input int mode, input int npat, input int flips,
                            output logic [31:0] words [$], output int res_good,
                            output int res_bad);
    logic [7:0] slots [$];
    mst_t sg, sb;
    int len, nflip;
    slots = {};
    sg = '0; sb = '0;
    res_good = 0; res_bad = 0; nflip = 0;
    len = chain_len(mode);
    // slot list: {cmp, se, d}
    begin
      logic [4:0] plan [$];  // {cmp, se, d[2:0]}
      plan = {};
      if (mode == M_SER_BYPASS || mode == M_PAR_BYPASS) begin
        plan.push_back({1'b0, 1'b1, 3'($urandom)});
        for (int i = 0; i < 8 * npat; i++) plan.push_back({1'b1, 1'($urandom), 3'($urandom)});
      end else begin
        for (int i = 0; i < len; i++) plan.push_back({1'b0, 1'b1, 3'($urandom)});
        for (int p = 0; p < npat; p++) begin
          plan.push_back({1'b0, 1'b0, 3'b000});
          for (int i = 0; i < len; i++) plan.push_back({1'b1, 1'b1, 3'($urandom)});
        end
      end
      while (plan.size() % 4 != 0) plan.push_back({1'b0, 1'b1, 3'b000});
      foreach (plan[i]) begin
        logic [2:0] rg, rb, e;
        logic cmp, se;
        logic [2:0] d;
        {cmp, se, d} = plan[i];
        mstep(mode, se, d, 1'b0, sg, rg);
        mstep(mode, se, d, 1'b1, sb, rb);
        e = rg;
        if (cmp && nflip < flips && i % 3 == 0) begin e[0] = ~e[0]; nflip++; end
        // outputs that bypass the comparator are counted as they are
        if (mode == M_SER_BYPASS || mode == M_PAR_BYPASS) e = 3'b000;
        if (mode == M_PAR_EXTEST) e[1:0] = 2'b00;
        if (mode == M_SER_BYPASS || mode == M_SER_INTEST || mode == M_SER_EXTEST) begin
          if (cmp) begin
            res_good += int'(rg[0] ^ e[0]);
            res_bad  += int'(rb[0] ^ e[0]);
          end
          slots.push_back({cmp, se, 2'b00, d[0], 2'b00, cmp ? e[0] : 1'b0});
        end else begin
          if (cmp) begin
            res_good += $countones(rg ^ e);
            res_bad  += $countones(rb ^ e);
          end
          slots.push_back({cmp, se, d, cmp ? e : 3'b000});
        end
      end
    end
    words = {};
    for (int i = 0; i < slots.size(); i += 4)
      words.push_back({slots[i+3], slots[i+2], slots[i+1], slots[i]});
  endtask

  // ---------------------------------------------------------------------
  // tester side
  function automatic logic [6:0] edge_loc(int e);
    if (e < 4)  return {4'(e), 3'(P_NORTH)};
    if (e < 8)  return {4'((e - 4) * 4 + 3), 3'(P_EAST)};
    if (e < 12) return {4'(12 + e - 8), 3'(P_SOUTH)};
    return {4'((e - 12) * 4), 3'(P_WEST)};
  endfunction

  int exp_res [16][$];       // expected results per node
  int exp_port [16][$];      // edge port each result must arrive at
  int outstanding = 0;
  int n_mode [8];
  int n_unicast = 0, n_multicast = 0, n_nonzero = 0, n_defect_found = 0;
  int n_forks = 0, n_rstall = 0, n_istall = 0, max_busy_subnets = 0;

  task automatic send(input int port, input logic [15:0] mask, input int out_port,
                      input int mode, input logic [31:0] words [$]);
    logic [6:0] loc;
    int n;
    loc = edge_loc(out_port);
    n = words.size();
    if ($countones(mask) > 1) n_multicast++; else n_unicast++;
    n_mode[mode] += $countones(mask);
    for (int i = 0; i <= n; i++) begin
      @(negedge clk);
      ate_valid[port] = 1;
      ate_flit[port] = '{head: i == 0, tail: i == n,
                         data: (i == 0) ? make_test_head($countones(mask) > 1, mask, loc[6:3],
                                                         loc[2:0], 3'(mode))
                                        : words[i-1]};
      @(posedge clk); while (!ate_ready[port]) @(posedge clk);
    end
    @(negedge clk); ate_valid[port] = 0;
  endtask

  // schedule one test on the nodes of `mask`
  task automatic test(input int port, input logic [15:0] mask, input int out_port,
                      input int mode, input int npat, input int flips);
    logic [31:0] words [$];
    int rg, rb;
    if (mode == M_NORMAL) begin words = {}; rg = 0; rb = 0; end
    else build_test(mode, npat, flips, words, rg, rb);
    for (int n = 0; n < 16; n++) if (mask[n]) begin
      exp_res[n].push_back(n == DEFECT_NODE ? rb : rg);
      exp_port[n].push_back(out_port);
      outstanding++;
    end
    send(port, mask, out_port, mode, words);
  endtask

  // result collection
  always @(posedge clk) if (rst_n) begin
    int busy;
    for (int e = 0; e < 16; e++) if (res_valid[e] && res_ready[e]) begin
      int n, idx;
      n = int'(res_src[e]);
      idx = -1;
      for (int i = 0; i < exp_res[n].size(); i++)
        if (idx < 0 && exp_res[n][i] == int'(res_value[e]) && exp_port[n][i] == e) idx = i;
      check($sformatf("result %0d from node %0d at port %0d expected", res_value[e], n, e), idx >= 0);
      if (idx >= 0) begin
        exp_res[n].delete(idx); exp_port[n].delete(idx); outstanding--;
      end
      check("pass flag", res_pass[e] == (res_value[e] == 0));
      if (res_value[e] != 0) n_nonzero++;
      if (res_value[e] != 0 && n == DEFECT_NODE) n_defect_found++;
    end
    n_forks += $countones(fork_pulse);
    if (stall_pulse != 0) n_rstall++;
    for (int n = 0; n < 16; n++) if (core_test_mode[n] && !core_ce[n]) n_istall++;
    busy = 0;
    for (int q = 0; q < 4; q++) begin
      bit b;
      b = 0;
      for (int n = 0; n < 16; n++) if (((n / 8) * 2 + (n % 4) / 2) == q && core_test_mode[n]) b = 1;
      busy += int'(b);
    end
    if (busy > max_busy_subnets) max_busy_subnets = busy;
  end
  always @(negedge clk) for (int e = 0; e < 16; e++) res_ready[e] <= ($urandom % 3) != 0;

  task automatic wait_done(input int limit);
    int t;
    t = 0;
    while (outstanding > 0 && t < limit) begin @(negedge clk); t++; end
    check("all results returned", outstanding == 0);
  endtask

  // ---------------------------------------------------------------------
  // schemes
  // Subnet s of scheme k (k = 0..3 for a..d): node mask, In port, Out port.
  int q_in  [4] = '{12, 3, 9, 6};   // quadrant In ports
  int q_out [4] = '{0, 4, 14, 11};  // quadrant Out ports

  function automatic int n_subnets(int k);
    return 8 >> k;
  endfunction

  task automatic subnet_of(input int k, input int s, output logic [15:0] m,
                           output int pin, output int pout);
    m = '0;
    case (k)
      0: begin  // half rows
        for (int i = 0; i < 2; i++) m[(s / 2) * 4 + (s % 2) * 2 + i] = 1'b1;
        pin  = (s % 2 == 0) ? 12 + s / 2 : 4 + s / 2;
        pout = pin;
      end
      1: begin  // quadrants
        for (int n = 0; n < 16; n++) if (((n / 8) * 2 + (n % 4) / 2) == s) m[n] = 1'b1;
        pin  = q_in[s];
        pout = q_out[s];
      end
      2: begin  // upper and lower half
        for (int n = 0; n < 8; n++) m[s * 8 + n] = 1'b1;
        pin  = (s == 0) ? 3 : 8;
        pout = (s == 0) ? 13 : 6;
      end
      default: begin
        m = '1;
        pin  = 15;
        pout = 4;
      end
    endcase
  endtask

  task automatic run_subnet(input int k, input int s, input bit multicast);
    logic [15:0] m;
    int pin, pout;
    subnet_of(k, s, m, pin, pout);
    if (multicast) test(pin, m, pout, M_SER_INTEST, 2, 0);
    else
      for (int n = 0; n < 16; n++) if (m[n]) test(pin, 16'(1) << n, pout, M_SER_INTEST, 2, 0);
  endtask

  // hop counter: head flits on router-to-router links
  int hops = 0;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < 16; n++) begin
      int x, y;
      x = n % 4; y = n / 4;
      if (y > 0 && dut.u_mesh.ov[n][P_NORTH] && dut.u_mesh.orr[n][P_NORTH] && dut.u_mesh.ofl[n][P_NORTH].head) hops++;
      if (y < 3 && dut.u_mesh.ov[n][P_SOUTH] && dut.u_mesh.orr[n][P_SOUTH] && dut.u_mesh.ofl[n][P_SOUTH].head) hops++;
      if (x < 3 && dut.u_mesh.ov[n][P_EAST]  && dut.u_mesh.orr[n][P_EAST]  && dut.u_mesh.ofl[n][P_EAST].head)  hops++;
      if (x > 0 && dut.u_mesh.ov[n][P_WEST]  && dut.u_mesh.orr[n][P_WEST]  && dut.u_mesh.ofl[n][P_WEST].head)  hops++;
    end
  end

  int exp_hops_sub [4] = '{16, 32, 64, 96};
  int exp_hops_mc  [4] = '{16, 28, 46, 63};
  longint t_sub [4], t_mc [4];

  task automatic run_scheme(input int k, input bit multicast, output longint clocks);
    longint t0;
    int h0;
    string nm;
    nm = multicast ? "multicast" : "subnet";
    h0 = hops;
    t0 = longint'($time);
    for (int s = 0; s < n_subnets(k); s++) begin
      automatic int ss = s;
      fork
        run_subnet(k, ss, multicast);
      join_none
    end
    wait fork;
    wait_done(200000);
    clocks = (longint'($time) - t0) / 10;
    repeat (5) @(negedge clk);
    check($sformatf("%s scheme %0d hop count %0d", nm, k, hops - h0),
          hops - h0 == (multicast ? exp_hops_mc[k] : exp_hops_sub[k]));
    $display("%-9s scheme (%s): %0d subnets, %0d hops, %0d clocks",
             nm, string'(8'("a") + 8'(k)), n_subnets(k), hops - h0, clocks);
  endtask

  initial begin
    for (int e = 0; e < 16; e++) begin ate_valid[e] = 0; ate_flit[e] = '0; end
    for (int n = 0; n < 16; n++) fn_in[n] = FN;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);

    for (int k = 0; k < 4; k++) run_scheme(k, 1'b0, t_sub[k]);
    for (int k = 0; k < 4; k++) run_scheme(k, 1'b1, t_mc[k]);

    for (int k = 1; k < 4; k++)
      check($sformatf("subnet time grows, scheme %0d", k), t_sub[k] > t_sub[k-1]);
    for (int k = 0; k < 4; k++)
      check($sformatf("multicast faster than subnet, scheme %0d", k), t_mc[k] < t_sub[k]);
    check("defective core found", n_defect_found > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
