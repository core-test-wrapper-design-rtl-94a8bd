// tb_router: self-checking testbench of the five-port router (address 0101,
// x = 1, y = 1). All five inputs send packets at once: test packets with
// random destination masks (empty, single node, several, all) and result
// packets to random routers and exit ports, each with 1..4 payload flits
// whose first word carries a packet id. Outputs are ready at random.
// An XY reference written here gives, for every packet, the outputs it must
// leave by and the destination mask each copy must carry. Checked: every
// expected copy arrives exactly once, complete and in order, flits of a
// packet are contiguous at an output, no other copies appear, and forks and
// stalls happen.
module tb_router;
  import noc_pkg::*;
  localparam logic [3:0] ME = 4'b0101;
  logic clk = 0, rst_n = 0;
  logic  in_valid  [NPORT];
  flit_t in_flit   [NPORT];
  logic  in_ready  [NPORT];
  logic  out_valid [NPORT];
  flit_t out_flit  [NPORT];
  logic  out_ready [NPORT];
  logic  fork_pulse, stall_pulse;
  int checks = 0, failures = 0, forks = 0, stalls = 0;

  router #(.ADDR(ME)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference XY direction of one destination from (1,1)
  function automatic int ref_dir(int dest, int at_dest);
    int dx, dy;
    dx = dest % 4; dy = dest / 4;
    if (dx > 1) return 2;       // east
    if (dx < 1) return 4;       // west
    if (dy < 1) return 1;       // north
    if (dy > 1) return 3;       // south
    return at_dest;
  endfunction

  // expected copies: key = out*65536 + id -> {head data, length}
  logic [31:0] exp_head [int];
  int          exp_len  [int];
  int          outstanding = 0;

  // output monitors
  logic [31:0] cur_head [NPORT];
  int          cur_id   [NPORT];
  int          cur_cnt  [NPORT];
  bit          in_pkt   [NPORT];
  always @(posedge clk) begin
    if (fork_pulse) forks++;
    if (stall_pulse) stalls++;
    for (int o = 0; o < NPORT; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        flit_t f;
        f = out_flit[o];
        if (f.head) begin
          check("head only between packets", !in_pkt[o]);
          in_pkt[o] = 1; cur_head[o] = f.data; cur_cnt[o] = 0;
          check("no single-flit packet here", !f.tail);
        end else begin
          check("body inside a packet", in_pkt[o]);
          if (cur_cnt[o] == 0) begin
            int key;
            cur_id[o] = int'(f.data[31:16]);
            key = o * 65536 + cur_id[o];
            check($sformatf("copy expected out %0d id %0d", o, cur_id[o]), exp_head.exists(key));
            if (exp_head.exists(key)) begin
              check("head of copy", cur_head[o] == exp_head[key]);
            end
          end
          check("payload id and index", f.data == {16'(cur_id[o]), 16'(cur_cnt[o])});
          cur_cnt[o]++;
          if (f.tail) begin
            int key;
            key = o * 65536 + cur_id[o];
            in_pkt[o] = 0;
            if (exp_head.exists(key)) begin
              check("copy length", cur_cnt[o] == exp_len[key]);
              exp_head.delete(key);
              outstanding--;
            end
          end
        end
      end
    end
  end
  always @(negedge clk) for (int o = 0; o < NPORT; o++) out_ready[o] <= ($urandom % 4) != 0;

  task automatic driver(input int p);
    for (int k = 0; k < 30; k++) begin
      int id, n, kind;
      logic [31:0] h;
      id = p * 1000 + k;
      n = $urandom_range(1, 4);
      kind = $urandom % 6;
      if (kind == 0) begin
        logic [3:0] d; logic [2:0] ep;
        d = 4'($urandom); ep = 3'($urandom_range(0, 4));
        h = make_result_head(d, ep, 4'd0, 14'(id));
        begin
          int dir, key;
          dir = ref_dir(int'(d), int'(ep));
          key = dir * 65536 + id;
          exp_head[key] = h; exp_len[key] = n; outstanding++;
        end
      end else begin
        logic [15:0] m;
        case (kind)
          1: m = 16'(1) << $urandom_range(0, 15);
          2: m = 16'hffff;
          3: m = (k % 4 == 0) ? 16'h0000 : 16'($urandom);
          default: m = 16'($urandom);
        endcase
        h = make_test_head(1'b1, m, 4'd0, 3'd0, 3'd3);
        for (int o = 0; o < NPORT; o++) begin
          logic [15:0] sub;
          sub = '0;
          for (int i = 0; i < 16; i++) if (m[i] && ref_dir(i, 0) == o) sub[i] = 1'b1;
          if (sub != 0) begin
            int key;
            key = o * 65536 + id;
            exp_head[key] = {h[31:30], sub, h[13:0]};
            exp_len[key] = n; outstanding++;
          end
        end
      end
      for (int i = 0; i <= n; i++) begin
        @(negedge clk);
        in_valid[p] = 1;
        in_flit[p] = '{head: i == 0, tail: i == n, data: (i == 0) ? h : {16'(id), 16'(i - 1)}};
        @(posedge clk); while (!in_ready[p]) @(posedge clk);
      end
      @(negedge clk); in_valid[p] = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  initial begin
    for (int p = 0; p < NPORT; p++) begin in_valid[p] = 0; in_flit[p] = '0; in_pkt[p] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      driver(0); driver(1); driver(2); driver(3); driver(4);
    join
    repeat (300) @(negedge clk);
    check("every expected copy arrived", outstanding == 0 && exp_head.size() == 0);
    check("forks happened", forks > 0);
    check("stalls happened", stalls > 0);
    $display("forks %0d stalls %0d", forks, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
