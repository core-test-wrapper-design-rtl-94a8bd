// tb_wrapper_geom: the core test wrapper at a second core geometry, that of
// the larger benchmark core S1238 (14 functional inputs, 14 outputs), with a
// behavioural scan core of two 16-bit chains.
//
// Each mode is loaded through the instruction register, then a stream of
// random bits is shifted in with Se high and every output bit is checked
// against the input bit that entered the path exactly one path length
// earlier. Path lengths follow from the geometry alone:
//   serial bypass 1, parallel bypass 1 per lane,
//   serial in-test 14 + 16 + 16 + 14 = 60 (inWBR, chain 2, chain 1, outWBR),
//   serial ex-test 14 + 14 = 28,
//   parallel in-test 16 / 16 / 28 on Po[0] / Po[1] / Po[2],
//   parallel ex-test 1 / 1 (bypass) / 28.
// Each test path is streamed twice: raw, and against the expected bits on
// Com_si / Com_pi, where the comparator output must stay all zero. Normal
// mode must connect In to the core and the core to Out. The parallel in-test
// stream includes a pause with test_en low.
module tb_wrapper_geom;
  import wrap_pkg::*;
  localparam int L1 = 16, L2 = 16, NI = 14, NO = 14;

  logic clk = 0, rst_n = 0, test_en = 1;
  wsc_t wsc;
  logic si, so, com_si, se;
  logic [2:0] pi, po, com_pi;
  logic [NI-1:0] fn_in, core_in;
  logic [NO-1:0] fn_out, core_out;
  logic [1:0] core_sc_in, core_sc_out;
  logic core_se, core_ce;
  mode_e mode;
  logic configured;
  int checks = 0, failures = 0;

  wrapper #(.N_IN(NI), .N_OUT(NO)) dut (.*);
  scan_core_model #(.N_IN(NI), .N_OUT(NO), .L1(L1), .L2(L2)) core (
    .clk, .ce(core_ce), .se(core_se), .sc_in(core_sc_in), .sc_out(core_sc_out),
    .fn_in(core_in), .fn_out(core_out)
  );


  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t (mode %0d)", what, $time, mode); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic load(input logic [2:0] code);
    wsc = '0; repeat (2) tick();       // function mode first
    wsc.wrstn = 1; wsc.select_wir = 1;
    repeat (3) tick();
    wsc.capture_wr = 1; tick(); wsc.capture_wr = 0;
    wsc.shift_wr = 1; tick();
    for (int b = 0; b < 3; b++) begin si = code[b]; tick(); end
    wsc.shift_wr = 0; si = 0;
    wsc.update_wr = 1; tick(); wsc.update_wr = 0;
    wsc.select_wir = 0; tick();
    check($sformatf("mode %0d loaded", code), mode == mode_e'(code));
  endtask

  // stream test: n clocks of random input bits on (si or pi[lane]); checks
  // the output bit of (so or po[lane]) against the input `lat` clocks earlier
  logic hist [3][$];
  task automatic stream(input bit serial, input int lat0, input int lat1, input int lat2,
                        input int n, input bit use_com, input int pause_at);
    int lat [3];
    lat = '{lat0, lat1, lat2};
    for (int k = 0; k < 3; k++) hist[k] = {};
    for (int t = 0; t < n; t++) begin
      logic [2:0] b;
      b = 3'($urandom);
      if (t == pause_at) begin
        // pause: random input, test_en low for 4 clocks, nothing may move
        test_en = 0;
        repeat (4) begin si = 1'($urandom); pi = 3'($urandom); se = 1'($urandom); tick(); end
        test_en = 1;
        se = 1;
      end
      if (serial) si = b[0]; else pi = b;
      com_si = 0; com_pi = 0;
      for (int k = 0; k < 3; k++) begin
        if (lat[k] > 0 && hist[k].size() >= lat[k]) begin
          logic e;
          e = hist[k][hist[k].size() - lat[k]];
          if (use_com) begin
            if (serial) com_si = e; else com_pi[k] = e;
          end
          #1;
          if (serial) check($sformatf("serial stream t=%0d", t), so == (use_com ? 1'b0 : e));
          else        check($sformatf("lane %0d t=%0d", k, t), po[k] == (use_com ? 1'b0 : e));
        end
      end
      for (int k = 0; k < 3; k++) hist[k].push_back(serial ? b[0] : b[k]);
      tick();
    end
  endtask

  initial begin
    wsc = '0; si = 0; pi = 0; com_si = 0; com_pi = 0; se = 1; fn_in = '0;
    repeat (3) tick();
    rst_n = 1;
    tick();
    check("normal after reset", mode == M_NORMAL);
    for (int i = 0; i < 8; i++) begin
      fn_in = NI'($urandom);
      #1;
      check("normal: In reaches the core", core_in == fn_in);
      check("normal: core reaches Out", fn_out == core_out);
      tick();
    end

    se = 1;
    load(M_SER_BYPASS);  stream(1, 1, 0, 0, 40, 0, -1);
    load(M_PAR_BYPASS);  stream(0, 1, 1, 1, 40, 0, -1);
    load(M_SER_INTEST);  stream(1, NI + L2 + L1 + NO, 0, 0, 200, 0, -1);
                         stream(1, NI + L2 + L1 + NO, 0, 0, 200, 1, -1);
    load(M_SER_EXTEST);  stream(1, NI + NO, 0, 0, 100, 0, -1);
                         stream(1, NI + NO, 0, 0, 100, 1, -1);
    load(M_PAR_INTEST);  stream(0, L1, L2, NI + NO, 100, 0, 50);
                         stream(0, L1, L2, NI + NO, 100, 1, -1);
    load(M_PAR_EXTEST);  stream(0, 1, 1, NI + NO, 100, 0, -1);
    load(M_NORMAL);
    fn_in = NI'($urandom);
    #1;
    check("normal again: In reaches the core", core_in == fn_in);
    check("normal again: core reaches Out", fn_out == core_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
