// tb_wrapper: self-checking testbench of the core test wrapper, with the
// behavioural scan core (chains of 11 and 10 flip-flops) attached.
// Every operating mode is loaded through the instruction register and then
// exercised:
//   normal            core_in follows In, Out follows the core
//   serial bypass     So is Si one clock late
//   parallel bypass   Po is Pi one clock late
//   serial ex-test    9-bit path In-WBR/Out-WBR; a full load / capture of In /
//                     unload cycle is predicted cell by cell
//   serial in-test    30-bit path through both scan chains; load, one capture
//                     clock of the core and both WBRs, unload, predicted here
//                     from the core's capture rule; unloaded once against the
//                     expected response on Com_si (So must stay 0) and once
//                     with one expected bit flipped (exactly one 1 on So)
//   parallel in-test  Po[0] = Pi[0] 11 clocks late, Po[1] = Pi[1] 10 late,
//                     Po[2] = Pi[2] 9 late, and zero against Com_pi
//   parallel ex-test  Po[2] 9 late, Po[0]/Po[1] through the bypass, 1 late
//   test_en low       a pause in the middle of a shift loses nothing
module tb_wrapper;
  import wrap_pkg::*;
  localparam int L1 = 11, L2 = 10, NI = 3, NO = 6;

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

  logic [29:0] v, e;
  logic [2:0]  f;
  logic [L1-1:0] c1;
  logic [L2-1:0] c2;
  logic [NI-1:0] cin;
  initial begin
    wsc = '0; si = 0; pi = 0; com_si = 0; com_pi = 0; se = 0; fn_in = 0;
    repeat (3) tick();
    rst_n = 1;
    repeat (3) tick();

    // ---- normal function mode
    for (int t = 0; t < 10; t++) begin
      fn_in = 3'($urandom); tick();
      check("normal: core_in = In", core_in == fn_in);
      check("normal: Out = core", fn_out == core_out);
    end

    // ---- serial bypass
    load(M_SER_BYPASS);
    stream(1, 1, 0, 0, 40, 0, -1);
    // ---- parallel bypass
    load(M_PAR_BYPASS);
    stream(0, 1, 1, 1, 40, 0, -1);

    // ---- serial ex-test: load, capture In, unload
    load(M_SER_EXTEST);
    se = 1;
    stream(1, 9, 0, 0, 30, 0, -1);
    stream(1, 9, 0, 0, 30, 1, -1);
    v = 30'($urandom);
    for (int j = 0; j < 9; j++) begin si = v[j]; tick(); end
    // out cell k holds v[5-k] and drives Out
    for (int k = 0; k < NO; k++) check("extest: Out from WBR", fn_out[k] == v[5-k]);
    com_si = 0;
    f = 3'($urandom); fn_in = f; se = 0; tick(); se = 1;
    for (int j = 0; j < 9; j++) begin
      #1;
      check($sformatf("extest unload %0d", j), so == (j < 6 ? v[j] : f[8-j]));
      si = 0; tick();
    end

    // ---- serial in-test: load 30 bits, capture, unload against Com_si
    load(M_SER_INTEST);
    se = 1;
    stream(1, 30, 0, 0, 60, 0, 20);
    for (int rep = 0; rep < 2; rep++) begin
      v = 30'($urandom);
      for (int j = 0; j < 30; j++) begin si = v[j]; tick(); end
      // predicted contents before capture
      for (int i = 0; i < NI; i++) cin[i] = v[29-i];
      for (int j = 0; j < L2; j++) c2[j] = v[29-(3+j)];
      for (int j = 0; j < L1; j++) c1[j] = v[29-(13+j)];
      check("intest: core_in held from WBR", core_in == cin);
      // after capture: positions 0..2 in-WBR unchanged, 3..12 ch2, 13..23 ch1, 24..29 out-WBR
      for (int i = 0; i < NI; i++) e[i] = cin[i];
      for (int j = 0; j < L2; j++) e[3+j] = ~c2[j];
      for (int j = 0; j < L1; j++) e[13+j] = c1[j] ^ c2[j % L2] ^ cin[j % NI];
      for (int k = 0; k < NO; k++) e[24+k] = c1[k] ^ c2[k];
      se = 0; tick(); se = 1;
      for (int j = 0; j < 30; j++) begin
        com_si = e[29-j] ^ (rep == 1 && j == 17);
        #1;
        check($sformatf("intest unload rep %0d bit %0d", rep, j), so == (rep == 1 && j == 17));
        si = 0; tick();
      end
      com_si = 0;
    end

    // ---- parallel in-test
    load(M_PAR_INTEST);
    se = 1;
    stream(0, L1, L2, 9, 50, 0, 25);
    stream(0, L1, L2, 9, 40, 1, -1);

    // ---- parallel ex-test
    load(M_PAR_EXTEST);
    se = 1;
    stream(0, 1, 1, 9, 40, 0, -1);

    // ---- back to normal
    wsc = '0; se = 0; repeat (3) tick();
    fn_in = 3'b101; tick();
    check("normal again", mode == M_NORMAL && core_in == 3'b101 && fn_out == core_out);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
