// tb_na: self-checking testbench of the network adapter.
// The testbench plays the NI (offering packet flits) and the WIC (taking
// payload words at random moments, then reporting done with a result).
// Checked per packet: one start with the head flit's instruction, the
// has_payload flag, every payload word in order with the last one marked,
// the result request carrying the head flit's sink router/port and the
// result, core_test_mode high for the whole packet, last_fail. A stray
// non-test head flit must be consumed without starting anything.
module tb_na;
  import wrap_pkg::*;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_valid, rx_ready, res_valid, res_ready;
  flit_t rx_flit;
  logic [3:0] res_dest;
  logic [2:0] res_port;
  logic [13:0] res_value;
  logic wic_start, wic_has_payload, pl_valid, pl_last, pl_ready, wic_done;
  logic [2:0] wic_instr;
  logic [31:0] pl_data;
  logic [13:0] wic_result;
  logic core_test_mode, last_fail;
  int checks = 0, failures = 0;

  na dut (.*);

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

  // WIC side model: collects words, random ready
  logic [31:0] got [$];
  logic        got_last [$];
  int starts = 0;
  logic [2:0] st_instr;
  logic st_pl;
  always @(posedge clk) begin
    if (wic_start) begin starts++; st_instr <= wic_instr; st_pl <= wic_has_payload; end
    if (pl_valid && pl_ready) begin got.push_back(pl_data); got_last.push_back(pl_last); end
  end
  always @(negedge clk) pl_ready <= 1'($urandom);

  task automatic packet(input int nwords, input logic [13:0] resv);
    logic [31:0] words [$];
    logic [3:0] sink;
    logic [2:0] sport, ins;
    sink = 4'($urandom); sport = 3'($urandom); ins = 3'($urandom_range(1, 6));
    got = {}; got_last = {}; starts = 0;
    words = {};
    for (int i = 0; i < nwords; i++) words.push_back($urandom);
    // head
    @(negedge clk);
    rx_valid = 1;
    rx_flit = '{head: 1'b1, tail: nwords == 0,
                data: make_test_head(1'b1, 16'h00ff, sink, sport, ins)};
    @(posedge clk); while (!rx_ready) @(posedge clk);
    for (int i = 0; i < nwords; i++) begin
      @(negedge clk);
      rx_flit = '{head: 1'b0, tail: i == nwords - 1, data: words[i]};
      @(posedge clk); while (!rx_ready) @(posedge clk);
      #1 check("test mode shown to core", core_test_mode);
    end
    @(negedge clk); rx_valid = 0;
    repeat (3) @(negedge clk);
    check("one start", starts == 1);
    check("instruction", st_instr == ins);
    check("has_payload", st_pl == (nwords > 0));
    check("word count", got.size() == nwords);
    for (int i = 0; i < nwords && i < got.size(); i++) begin
      check("word", got[i] == words[i]);
      check("last flag", got_last[i] == (i == nwords - 1));
    end
    check("no result before done", !res_valid);
    wic_result = resv; wic_done = 1; @(negedge clk); wic_done = 0;
    repeat (2) @(negedge clk);
    check("result request", res_valid && res_dest == sink && res_port == sport && res_value == resv);
    res_ready = 1; @(negedge clk); res_ready = 0;
    check("idle after result", !res_valid && !core_test_mode);
    check("last_fail", last_fail == (resv != 0));
  endtask

  initial begin
    rx_valid = 0; rx_flit = '0; res_ready = 0; wic_done = 0; wic_result = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 12; p++) packet(p % 5, (p % 3 == 0) ? 14'd0 : 14'($urandom));
    // a stray result-type head is swallowed
    starts = 0;
    @(negedge clk);
    rx_valid = 1; rx_flit = '{head: 1'b1, tail: 1'b1, data: make_result_head(4'd1, 3'd1, 4'd2, 14'd5)};
    @(negedge clk); rx_valid = 0;
    repeat (2) @(negedge clk);
    check("stray head ignored", starts == 0 && !core_test_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
