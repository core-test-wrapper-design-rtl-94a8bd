// tb_noc1: the test network populated as NoC 1 of the evaluation, with four
// different benchmark core types placed as in the node drawing:
//   A = S386 (7 inputs, 7 outputs)   B = S444 (3, 6)
//   C = S526 (3, 6)                  D = S1238 (14, 14)
//   row 0: A C B D   row 1: D B A C   row 2: D C C B   row 3: A B D A
// (the input/output counts are those of the ISCAS'89 circuits). The top is
// built with N_IN = N_OUT = 14 and per-node NODE_IN / NODE_OUT; behind each
// wrapper sits a behavioural scan core of two 16-bit chains.
//
// The test is a serial ex-test stream: Se stays high, random bits enter at
// Si and leave So after exactly NODE_IN + NODE_OUT clocks (input WBR, then
// output WBR). The packet's expected bits are the input stream delayed by
// that length, so a correctly sized wrapper returns result 0. Checked:
//   * every node by unicast, with the expected data of its own geometry:
//     result 0;
//   * one node of each size with the expected data of another size: the
//     result must be nonzero (the path length really differs per node);
//   * multicast: one packet to all D cores and one to all B and C cores,
//     which share a geometry: every addressed node returns 0;
//   * every result arrives once, from the right node, at the named port.
module tb_noc1;
  import wrap_pkg::*;
  import noc_pkg::*;
  localparam int W = 14;
  localparam int unsigned NOC1_IN  [16] = '{7, 3, 3, 14, 14, 3, 7, 3, 14, 3, 3, 3, 7, 3, 14, 7};
  localparam int unsigned NOC1_OUT [16] = '{7, 6, 6, 14, 14, 6, 7, 6, 14, 6, 6, 6, 7, 6, 14, 7};

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
  logic [W-1:0]        fn_in       [16];
  logic [W-1:0]        fn_out      [16];
  logic [W-1:0]        core_in     [16];
  logic [W-1:0]        core_out    [16];
  logic [1:0]          core_sc_in  [16];
  logic [1:0]          core_sc_out [16];
  logic                core_se     [16];
  logic                core_ce     [16];
  logic                core_test_mode [16];
  logic                core_fail   [16];
  mode_e               core_mode   [16];
  logic [15:0]         drop_pulse, fork_pulse, stall_pulse;

  noc_test_top #(.N_IN(W), .N_OUT(W), .NODE_IN(NOC1_IN), .NODE_OUT(NOC1_OUT)) dut (.*);

  for (genvar n = 0; n < 16; n++) begin : g_core
    localparam int unsigned NI = NOC1_IN[n];
    localparam int unsigned NO = NOC1_OUT[n];
    logic [NO-1:0] co;
    scan_core_model #(.N_IN(NI), .N_OUT(NO), .L1(16), .L2(16)) u_core (
      .clk, .ce(core_ce[n]), .se(core_se[n]), .sc_in(core_sc_in[n]), .sc_out(core_sc_out[n]),
      .fn_in(core_in[n][NI-1:0]), .fn_out(co)
    );
    assign core_out[n] = W'(co);
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // payload of a serial ex-test stream whose expected bits assume path length
  // `len`; `n` compared slots follow the fill
  function automatic void stream(input int len, input int n, output logic [31:0] words [$]);
    logic [7:0] slots [$];
    logic bits [$];
    slots = {};
    bits = {};
    for (int i = 0; i < len + n; i++) begin
      logic b, cmp, e;
      b = 1'($urandom);
      cmp = i >= len;
      e = cmp ? bits[i - len] : 1'b0;
      bits.push_back(b);
      slots.push_back({cmp, 1'b1, 2'b00, b, 2'b00, e});
    end
    while (slots.size() % 4 != 0) slots.push_back({1'b0, 1'b1, 6'b0});
    words = {};
    for (int i = 0; i < slots.size(); i += 4)
      words.push_back({slots[i+3], slots[i+2], slots[i+1], slots[i]});
  endfunction

  localparam int IN_PORT = 12, OUT_PORT = 12;  // west port of node 0000

  // expected result per node: 0 = must pass, 1 = must be nonzero
  int exp_kind [16][$];
  int outstanding = 0;

  task automatic send(input logic [15:0] mask, input int len, input int nonzero);
    logic [31:0] words [$];
    int n;
    stream(len, 40, words);
    n = words.size();
    for (int k = 0; k < 16; k++) if (mask[k]) begin
      exp_kind[k].push_back(nonzero);
      outstanding++;
    end
    for (int i = 0; i <= n; i++) begin
      @(negedge clk);
      ate_valid[IN_PORT] = 1;
      ate_flit[IN_PORT] = '{head: i == 0, tail: i == n,
                            data: (i == 0) ? make_test_head($countones(mask) > 1, mask, 4'd0,
                                                            3'(P_WEST), 3'(M_SER_EXTEST))
                                           : words[i-1]};
      @(posedge clk); while (!ate_ready[IN_PORT]) @(posedge clk);
    end
    @(negedge clk); ate_valid[IN_PORT] = 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < 16; e++) if (res_valid[e] && res_ready[e]) begin
      int n;
      n = int'(res_src[e]);
      check($sformatf("result from node %0d at the named port", n), e == OUT_PORT);
      check($sformatf("result from node %0d was expected", n), exp_kind[n].size() > 0);
      if (exp_kind[n].size() > 0) begin
        if (exp_kind[n][0] != 0)
          check($sformatf("node %0d: wrong-length stream gives nonzero result", n), res_value[e] != 0);
        else
          check($sformatf("node %0d: result %0d, expected 0", n, res_value[e]), res_value[e] == 0);
        void'(exp_kind[n].pop_front());
        outstanding--;
      end
    end
  end
  always @(negedge clk) for (int e = 0; e < 16; e++) res_ready[e] <= 1'b1;

  task automatic wait_done();
    int t;
    t = 0;
    while (outstanding > 0 && t < 50000) begin @(negedge clk); t++; end
    check("all results returned", outstanding == 0);
  endtask

  function automatic int plen(int n);
    return int'(NOC1_IN[n] + NOC1_OUT[n]);
  endfunction

  initial begin
    logic [15:0] m_d, m_bc;
    for (int e = 0; e < 16; e++) begin ate_valid[e] = 0; ate_flit[e] = '0; end
    for (int n = 0; n < 16; n++) fn_in[n] = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);

    // every node, its own geometry
    for (int n = 0; n < 16; n++) send(16'(1) << n, plen(n), 0);
    wait_done();
    // a node of each size, with the expected data of another size
    send(16'(1) << 0, plen(1), 1);   // A (14) tested as B/C (9)
    send(16'(1) << 1, plen(3), 1);   // C (9) tested as D (28)
    send(16'(1) << 3, plen(0), 1);   // D (28) tested as A (14)
    wait_done();
    // multicast to cores of one geometry
    m_d = '0; m_bc = '0;
    for (int n = 0; n < 16; n++) begin
      if (plen(n) == 28) m_d[n] = 1'b1;
      if (plen(n) == 9)  m_bc[n] = 1'b1;
    end
    send(m_d, 28, 0);
    wait_done();
    send(m_bc, 9, 0);
    wait_done();
    check("D cores", $countones(m_d) == 4);
    check("B and C cores", $countones(m_bc) == 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
