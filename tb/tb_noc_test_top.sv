// tb_noc_test_top: end-to-end test of the 4x4 test network at its default
// size. The testbench is the tester: it builds test packets, sends them into
// edge ports, and checks the one-flit results that come back.
//
// Sixteen behavioural scan cores (chains of 11 and 10 flip-flops, S444-like
// 3 inputs / 6 outputs) sit behind the wrappers; the core at node DEFECT_NODE
// has a stuck-at-0 flip-flop. A reference model written here predicts, slot by
// slot, what each wrapper shifts out in each mode. Test packets carry the
// predicted (good-core) response as expected data, so a good core returns
// result 0 and the defective one returns the number of bits that differ,
// which the model also predicts. Bypass outputs do not pass the comparator:
// there the result is the number of ones shifted out, also predicted.
//
// Phases:
//   1. subnet (unicast) testing: the mesh is used as four 2x2 subnets, each
//      with its own In and Out port; every node receives a serial in-test
//      packet; all four subnets run at the same time;
//   2. multicast: one packet with 16 destination addresses (parallel
//      in-test) from a single port, then one with 4 addresses;
//   3. the remaining modes by unicast: serial/parallel bypass, serial/
//      parallel ex-test, normal, and a packet whose expected data has
//      deliberately flipped bits (result must equal the flips).
// Every result must come back once, at the edge port named in its packet,
// with the predicted value. Counted and required at least once: each of the
// seven modes, unicast and multicast packets, nonzero results, the defective
// core found, router forks and stalls, interface stalls (core clock enable
// low during a test), two or more subnets busy at once.
module tb_noc_test_top;
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

  // quadrant q: nodes, In port and Out port (as in the 4-subnet scheme)
  function automatic logic [15:0] qmask(int q);
    logic [15:0] m;
    m = '0;
    for (int n = 0; n < 16; n++) if (((n / 8) * 2 + (n % 4) / 2) == q) m[n] = 1'b1;
    return m;
  endfunction
  int q_in  [4] = '{12, 3, 9, 6};
  int q_out [4] = '{0, 4, 14, 11};

  task automatic subnet(input int q);
    logic [15:0] m;
    m = qmask(q);
    for (int n = 0; n < 16; n++) if (m[n]) test(q_in[q], 16'(1) << n, q_out[q], M_SER_INTEST, 2, 0);
  endtask

  initial begin
    for (int e = 0; e < 16; e++) begin ate_valid[e] = 0; ate_flit[e] = '0; end
    for (int n = 0; n < 16; n++) fn_in[n] = FN;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    for (int n = 0; n < 16; n++) check("normal mode after reset", core_mode[n] == M_NORMAL);

    // 1. four subnets in parallel, unicast serial in-test of every node
    fork
      subnet(0); subnet(1); subnet(2); subnet(3);
    join
    wait_done(20000);
    $display("phase 1 done at %0t", $time);

    // 2. multicast: broadcast to all 16, then 4 addresses
    test(12, 16'hffff, 0, M_PAR_INTEST, 3, 0);
    wait_done(20000);
    test(1, 16'b0000_0000_0110_0110, 2, M_PAR_INTEST, 2, 0);
    wait_done(20000);
    $display("phase 2 done at %0t", $time);

    // 3. other modes, unicast, and a deliberate expected-data error
    test(12, 16'(1) << 0,  13, M_SER_BYPASS, 2, 0);
    test(12, 16'(1) << 9,  13, M_PAR_BYPASS, 2, 0);
    test(12, 16'(1) << 6,  13, M_SER_EXTEST, 2, 0);
    test(12, 16'(1) << 15, 13, M_PAR_EXTEST, 2, 0);
    test(12, 16'(1) << 3,  13, M_NORMAL, 0, 0);
    test(12, 16'(1) << 10, 13, M_SER_INTEST, 2, 3);
    wait_done(20000);
    repeat (20) @(negedge clk);
    for (int n = 0; n < 16; n++) begin
      check("every core back in normal mode", core_mode[n] == M_NORMAL && !core_test_mode[n]);
      check("functional path open again", core_in[n] == FN && fn_out[n] == core_out[n]);
    end

    // mechanisms
    for (int m = 0; m <= 6; m++) check($sformatf("mode %0d used", m), n_mode[m] > 0);
    check("unicast used", n_unicast > 0);
    check("multicast used", n_multicast > 0);
    check("nonzero result seen", n_nonzero > 0);
    check("defective core found", n_defect_found > 0);
    check("router fork", n_forks > 0);
    check("router stall", n_rstall > 0);
    check("interface stall", n_istall > 0);
    check("subnets in parallel", max_busy_subnets >= 2);
    $display("unicast %0d multicast %0d nonzero %0d defect %0d forks %0d router-stall %0d wic-stall %0d subnets %0d",
             n_unicast, n_multicast, n_nonzero, n_defect_found, n_forks, n_rstall, n_istall,
             max_busy_subnets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
