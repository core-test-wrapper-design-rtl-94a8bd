// tb_port_config: self-checking testbench of the In/Out config circuit.
// In direction: 60 random flits offered by the tester at random moments must
// enter the edge port unchanged and in order while the mesh side is ready at
// random; the buffer must fill up at least once (tester held off).
// Out direction: result packets and other flits leave the mesh through the
// port; each result packet must become one record with its source, value and
// pass flag, other flits must vanish, and the counters must match.
module tb_port_config;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ate_valid, ate_ready, res_valid, res_pass, res_ready;
  flit_t ate_flit, edge_in_flit, edge_out_flit;
  logic [3:0] res_src;
  logic [13:0] res_value;
  logic [15:0] results, fails;
  logic edge_in_valid, edge_in_ready, edge_out_valid, edge_out_ready;
  int checks = 0, failures = 0, full_seen = 0;

  port_config dut (.*);

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

  flit_t inq [$];
  logic [17:0] recq [$];   // {src, value}
  always @(posedge clk) if (rst_n) begin
    if (edge_in_valid && edge_in_ready) begin
      check("in flit expected", inq.size() > 0);
      if (inq.size() > 0) check("in flit order", edge_in_flit == inq.pop_front());
    end
    if (res_valid && res_ready) begin
      check("record expected", recq.size() > 0);
      if (recq.size() > 0) begin
        logic [17:0] r;
        r = recq.pop_front();
        check("record", {res_src, res_value} == r && res_pass == (r[13:0] == 0));
      end
    end
    if (ate_valid && !ate_ready) full_seen++;
  end
  always @(negedge clk) begin
    edge_in_ready <= ($urandom % 4) == 0;
    res_ready <= 1'($urandom);
  end

  int nres = 0, nfail = 0;
  initial begin
    ate_valid = 0; ate_flit = '0; edge_out_valid = 0; edge_out_flit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      for (int i = 0; i < 60; i++) begin
        flit_t f;
        f = '{head: 1'($urandom), tail: 1'($urandom), data: $urandom};
        @(negedge clk);
        ate_valid = 1; ate_flit = f; inq.push_back(f);
        @(posedge clk); while (!ate_ready) @(posedge clk);
        @(negedge clk); ate_valid = 0;
      end
      for (int i = 0; i < 40; i++) begin
        flit_t f;
        logic [13:0] v;
        logic [3:0] s;
        v = (i % 3 == 0) ? 14'd0 : 14'($urandom);
        s = 4'($urandom);
        if (i % 4 == 3) f = '{head: 1'b0, tail: 1'b1, data: $urandom};
        else begin
          f = '{head: 1'b1, tail: 1'b1, data: make_result_head(4'd3, 3'd2, s, v)};
          recq.push_back({s, v}); nres++; if (v != 0) nfail++;
        end
        @(negedge clk);
        edge_out_valid = 1; edge_out_flit = f;
        @(posedge clk); while (!edge_out_ready) @(posedge clk);
        @(negedge clk); edge_out_valid = 0;
      end
    join
    repeat (20) @(negedge clk);
    check("all flits in", inq.size() == 0);
    check("all records out", recq.size() == 0);
    check("counters", results == 16'(nres) && fails == 16'(nfail));
    check("buffer filled", full_seen > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
