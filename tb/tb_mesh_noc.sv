// tb_mesh_noc: self-checking testbench of the 4x4 mesh.
// The mesh is used as four 2x2 subnets (quadrants): in each, one edge port
// injects test packets with random destination masks inside its quadrant
// while every node injects result packets to random edge ports of its own
// quadrant, all at the same time. A final phase broadcasts to all sixteen
// nodes from one port. Local and edge outputs are ready at
// random. Checked: every node named in a mask receives exactly one copy of
// that packet, whose mask then names only that node, complete and in order;
// no node receives a packet not meant for it; every result packet leaves the
// mesh at the edge port it names, once, with its source and value intact.
module tb_mesh_noc;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  loc_in_valid  [NODES];
  flit_t loc_in_flit   [NODES];
  logic  loc_in_ready  [NODES];
  logic  loc_out_valid [NODES];
  flit_t loc_out_flit  [NODES];
  logic  loc_out_ready [NODES];
  logic  edge_in_valid  [16];
  flit_t edge_in_flit   [16];
  logic  edge_in_ready  [16];
  logic  edge_out_valid [16];
  flit_t edge_out_flit  [16];
  logic  edge_out_ready [16];
  logic [15:0] fork_pulse, stall_pulse;
  int checks = 0, failures = 0, forks = 0, stalls = 0;

  mesh_noc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog: %0d deliveries pending", pend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // (router, exit port) of edge port e
  function automatic logic [6:0] edge_loc(int e);
    if (e < 4)  return {4'(e), 3'(P_NORTH)};
    if (e < 8)  return {4'((e - 4) * 4 + 3), 3'(P_EAST)};
    if (e < 12) return {4'(12 + e - 8), 3'(P_SOUTH)};
    return {4'((e - 12) * 4), 3'(P_WEST)};
  endfunction

  int exp_len [int];     // key node*65536+id -> payload length
  int exp_res [int];     // key edge*65536+id -> source node
  int pend = 0;

  logic [31:0] hd [NODES];
  int cnt [NODES], pid [NODES];
  always @(posedge clk) begin
    if (rst_n) begin
    forks  += $countones(fork_pulse);
    stalls += (stall_pulse != 0);
    for (int n = 0; n < NODES; n++) if (loc_out_valid[n] && loc_out_ready[n]) begin
      flit_t f;
      f = loc_out_flit[n];
      if (f.head) begin
        hd[n] = f.data; cnt[n] = 0;
        check("copy carries only its node", f_mask(f.data) == 16'(1) << n);
      end else begin
        if (cnt[n] == 0) begin
          pid[n] = int'(f.data[31:16]);
          check($sformatf("node %0d expects packet %0d", n, pid[n]), exp_len.exists(n * 65536 + pid[n]));
        end
        check("payload intact", f.data == {16'(pid[n]), 16'(cnt[n])});
        cnt[n]++;
        if (f.tail) begin
          int key;
          key = n * 65536 + pid[n];
          if (exp_len.exists(key)) begin
            check("length", exp_len[key] == cnt[n]);
            exp_len.delete(key); pend--;
          end
        end
      end
    end
    for (int e = 0; e < 16; e++) if (edge_out_valid[e] && edge_out_ready[e]) begin
      flit_t f;
      int key;
      f = edge_out_flit[e];
      key = e * 65536 + int'(f.data[13:0]);
      check("result flit", f.head && f.tail && f_type(f.data) == T_RESULT);
      check($sformatf("result at edge %0d expected", e), exp_res.exists(key));
      if (exp_res.exists(key)) begin
        check("result source", int'(f_rsrc(f.data)) == exp_res[key]);
        exp_res.delete(key); pend--;
      end
    end
    end
  end
  always @(negedge clk) begin
    for (int n = 0; n < NODES; n++) loc_out_ready[n] <= ($urandom % 3) != 0;
    for (int e = 0; e < 16; e++) edge_out_ready[e] <= ($urandom % 3) != 0;
  end

  // quadrant of node n, and the edge ports that border each quadrant
  function automatic int quad(int n);
    return ((n / 4) / 2) * 2 + (n % 4) / 2;
  endfunction
  function automatic logic [15:0] quad_mask(int q);
    logic [15:0] m;
    m = '0;
    for (int i = 0; i < 16; i++) if (quad(i) == q) m[i] = 1'b1;
    return m;
  endfunction
  int qedge [4][4] = '{'{0, 1, 12, 13}, '{2, 3, 4, 5}, '{8, 9, 14, 15}, '{10, 11, 6, 7}};

  task automatic src_edge(input int e, input logic [15:0] region, input int npk);
    for (int k = 0; k < npk; k++) begin
      int id, n;
      logic [15:0] m;
      id = e * 100 + k;
      n = $urandom_range(1, 3);
      m = (k % 3 == 0) ? 16'(1) << $urandom_range(0, 15) : 16'($urandom);
      if (k == 5) m = 16'hffff;
      m &= region;
      for (int i = 0; i < 16; i++) if (m[i]) begin exp_len[i * 65536 + id] = n; pend++; end
      for (int i = 0; i <= n; i++) begin
        @(negedge clk);
        edge_in_valid[e] = 1;
        edge_in_flit[e] = '{head: i == 0, tail: i == n,
                            data: (i == 0) ? make_test_head(1'b1, m, 4'd0, 3'd0, 3'd1)
                                           : {16'(id), 16'(i - 1)}};
        @(posedge clk); while (!edge_in_ready[e]) @(posedge clk);
      end
      @(negedge clk); edge_in_valid[e] = 0;
    end
  endtask

  task automatic src_node(input int n);
    for (int k = 0; k < 4; k++) begin
      int e, id;
      logic [6:0] loc;
      e = qedge[quad(n)][$urandom_range(0, 3)];
      id = 5000 + n * 10 + k;
      loc = edge_loc(e);
      exp_res[e * 65536 + id] = n; pend++;
      @(negedge clk);
      loc_in_valid[n] = 1;
      loc_in_flit[n] = '{head: 1'b1, tail: 1'b1,
                         data: make_result_head(loc[6:3], loc[2:0], 4'(n), 14'(id))};
      @(posedge clk); while (!loc_in_ready[n]) @(posedge clk);
      @(negedge clk); loc_in_valid[n] = 0;
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
  endtask

  initial begin
    for (int n = 0; n < NODES; n++) begin loc_in_valid[n] = 0; loc_in_flit[n] = '0; end
    for (int e = 0; e < 16; e++) begin edge_in_valid[e] = 0; edge_in_flit[e] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      src_edge(1, quad_mask(0), 12); src_edge(4, quad_mask(1), 12);
      src_edge(9, quad_mask(2), 12); src_edge(7, quad_mask(3), 12);
      begin
        for (int n = 0; n < NODES; n++)
          fork
            automatic int nn = n;
            src_node(nn);
          join_none
        wait fork;
      end
    join
    repeat (300) @(negedge clk);
    src_edge(12, 16'hffff, 4);
    repeat (500) @(negedge clk);
    check("all deliveries done", pend == 0 && exp_len.size() == 0 && exp_res.size() == 0);
    check("forks and stalls", forks > 0 && stalls > 0);
    $display("pending %0d forks %0d stall clocks %0d", pend, forks, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
