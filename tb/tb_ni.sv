// tb_ni: self-checking testbench of the network interface (node 0110).
// A random mix of unicast and multicast test packets, some addressed to this
// node and some not, arrives from the router while the adapter side takes
// flits at random moments. Every flit of a kept packet must reach the adapter
// in order and nothing of a foreign packet may; foreign heads must raise
// drop_pulse. Result requests must come out as one-flit result packets with
// this node as source and the result in bits 13..0, also when the router
// side is not ready.
module tb_ni;
  import noc_pkg::*;
  localparam logic [3:0] ME = 4'b0110;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, rx_valid, rx_ready;
  flit_t in_flit, out_flit, rx_flit;
  logic res_valid, res_ready, drop_pulse;
  logic [3:0] res_dest;
  logic [2:0] res_port;
  logic [13:0] res_value;
  int checks = 0, failures = 0, drops = 0, kept_pkts = 0;

  ni #(.NODE_ADDR(ME)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  flit_t expq [$];
  always @(posedge clk) begin
    if (rx_valid && rx_ready) begin
      check("kept flit expected", expq.size() > 0);
      if (expq.size() > 0) check("kept flit in order", rx_flit == expq.pop_front());
    end
    if (drop_pulse && in_ready) drops++;
  end
  always @(negedge clk) rx_ready <= 1'($urandom);

  initial begin
    int exp_drops;
    in_valid = 0; in_flit = '0; out_ready = 0; res_valid = 0;
    res_dest = 0; res_port = 0; res_value = 0;
    exp_drops = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 40; p++) begin
      logic [15:0] mask;
      int n;
      bit mine;
      mask = (p % 3 == 0) ? 16'(1) << ME : 16'($urandom);
      if (p % 5 == 1) mask[ME] = 1'b0;
      mine = mask[ME];
      n = $urandom_range(0, 4);
      for (int i = 0; i <= n; i++) begin
        flit_t f;
        f.head = i == 0; f.tail = i == n;
        f.data = (i == 0) ? make_test_head(p[0], mask, 4'd3, 3'd2, 3'd1) : $urandom;
        @(negedge clk);
        in_valid = 1; in_flit = f;
        if (mine) expq.push_back(f);
        @(posedge clk); while (!in_ready) @(posedge clk);
      end
      @(negedge clk); in_valid = 0;
      if (mine) kept_pkts++; else exp_drops++;
    end
    repeat (5) @(negedge clk);
    check("all kept flits delivered", expq.size() == 0);
    check("drops counted", drops == exp_drops);
    check("both kinds seen", kept_pkts > 0 && exp_drops > 0);
    // result packing with back-pressure
    for (int r = 0; r < 5; r++) begin
      logic [3:0] d; logic [2:0] pt; logic [13:0] v;
      d = 4'($urandom); pt = 3'($urandom); v = 14'($urandom);
      @(negedge clk);
      res_valid = 1; res_dest = d; res_port = pt; res_value = v;
      @(posedge clk); while (!res_ready) @(posedge clk);
      @(negedge clk); res_valid = 0;
      repeat (r) begin check("held while not ready", out_valid); @(negedge clk); end
      check("result flit", out_valid && out_flit.head && out_flit.tail &&
            f_type(out_flit.data) == T_RESULT && f_rdest(out_flit.data) == d &&
            f_rport(out_flit.data) == pt && f_rsrc(out_flit.data) == ME &&
            out_flit.data[13:0] == v);
      out_ready = 1; @(negedge clk); out_ready = 0;
      check("flit taken", !out_valid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
