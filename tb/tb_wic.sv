// tb_wic: self-checking testbench of the wrapper interface circuit.
// The WIC drives a wrapper instruction register (wir) so that its
// configuration sequence is checked by the mode it produces. The wrapper's
// outputs are looped back from the expected-response inputs (So = Com_si,
// Po = Com_pi), so the result must equal the number of ones the testbench put
// in the e field of slots that have cmp set. Checked per packet: the decoded
// mode, every slot applied in order and exactly once (se, Si or Pi, Com),
// the 10-clock configuration time, no idle clock between back-to-back words,
// test_en low while words are late, the result value, one done pulse, and
// the return to normal mode. Packets with no payload return zero.
module tb_wic;
  import wrap_pkg::*;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, has_payload, pl_valid, pl_last, pl_ready, done, busy;
  logic [2:0] instr;
  logic [31:0] pl_data;
  logic [13:0] result;
  wsc_t wsc;
  logic si, com_si, se, test_en, so;
  logic [2:0] pi, com_pi, po;
  wctrl_t ctrl;
  mode_e mode;
  logic configured, wir_so;
  int checks = 0, failures = 0;
  int stalls = 0, pkts = 0;

  wic dut (.*);
  wir u_wir (.clk, .rst_n, .wsc, .si, .so(wir_so), .ctrl, .mode, .configured);
  assign so = com_si;
  assign po = com_pi;

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t (first %0d start %0d)", what, $time, first_apply, start_time); end
  endtask

  // monitor: record applied slots
  logic [7:0] seen [$];
  int first_apply, start_time, idle_between;
  bit in_apply;
  always @(posedge clk) begin
    if (busy && configured && test_en) begin
      logic [7:0] s;
      if (is_parallel(instr))
        s = {1'b0, se, pi, com_pi};
      else
        s = {1'b0, se, 2'b00, si, 2'b00, com_si};
      seen.push_back(s);
      if (first_apply < 0) first_apply = int'($time);
    end
    if (busy && configured && !test_en && !done) stalls++;
  end

  task automatic run_packet(input logic [2:0] code, input int nwords, input bit late);
    logic [31:0] words [$];
    logic [7:0]  exp_slots [$];
    int exp_result, t_done;
    bit got_done;
    words = {};
    exp_slots = {};
    exp_result = 0;
    for (int w = 0; w < nwords; w++) begin
      logic [31:0] d;
      d = $urandom;
      words.push_back(d);
      for (int k = 0; k < 4; k++) begin
        logic [7:0] s;
        s = d[8*k +: 8];
        if (is_parallel(code)) begin
          exp_slots.push_back({1'b0, s[6:0]});
          if (s[7]) exp_result += int'(s[0]) + int'(s[1]) + int'(s[2]);
        end else begin
          exp_slots.push_back({1'b0, s[6], 2'b00, s[3], 2'b00, s[0]});
          if (s[7]) exp_result += int'(s[0]);
        end
      end
    end
    seen = {};
    first_apply = -1;
    @(negedge clk);
    start = 1; instr = code; has_payload = nwords > 0;
    start_time = int'($time) + 5;
    @(negedge clk);
    start = 0;
    fork
      begin
        for (int w = 0; w < nwords; w++) begin
          if (late && w % 2 == 1) repeat (3) @(negedge clk);
          pl_valid = 1; pl_data = words[w]; pl_last = (w == nwords - 1);
          @(posedge clk);
          while (!pl_ready) @(posedge clk);
          @(negedge clk);
          pl_valid = 0;
        end
      end
      begin
        got_done = 0;
        while (!got_done) begin
          @(posedge clk); #1;
          if (code != 0 && code != 7 && busy && configured)
            check("mode configured", mode == mode_e'(code));
          if (done) begin got_done = 1; t_done = int'($time); end
        end
      end
    join
    pkts++;
    check($sformatf("result of instr %0d", code), int'(result) == exp_result);
    check("slot count", seen.size() == exp_slots.size() || code == 0 || code == 7);
    if (code != 0 && code != 7) begin
      for (int i = 0; i < exp_slots.size() && i < seen.size(); i++)
        check($sformatf("slot %0d", i), seen[i] == exp_slots[i]);
      if (nwords > 0) begin
        // configuration takes 10 clocks, one more to take the first word; the first slot is applied in the 12th clock
        check("configuration time", first_apply - start_time == 12 * 10);
        if (!late) check("no idle clock between words",
                         t_done - first_apply == (4 * nwords) * 10 + 10 - 9);
      end
    end
    @(posedge clk); #1;
    @(posedge clk); #1;
    @(posedge clk); #1;
    check("back to normal", mode == M_NORMAL && !busy);
  endtask

  initial begin
    start = 0; has_payload = 0; pl_valid = 0; pl_last = 0; pl_data = 0; instr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int code = 1; code <= 6; code++) begin
      run_packet(3'(code), 5, 0);
      run_packet(3'(code), 4, 1);
    end
    run_packet(3'd3, 0, 0);
    check("stalls seen", stalls > 0);
    $display("packets %0d stall clocks %0d", pkts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
