// tb_wir: self-checking testbench of the wrapper instruction register.
// Loads every instruction through the configuration sequence (SelectWIR,
// CaptureWR, ShiftWR with three bits on Si, UpdateWR, SelectWIR low) and
// compares the decoded multiplexer selects and enables with a table written
// out here, independently of the decoder. Also checks: the controls do not
// change before the update; they appear exactly two clocks after UpdateWR;
// they persist while WRSTN stays high; WRSTN low returns normal mode; the
// displaced instruction bits appear on so.
module tb_wir;
  import wrap_pkg::*;
  logic   clk = 0, rst_n = 0, si, so;
  wsc_t   wsc;
  wctrl_t ctrl;
  mode_e  mode;
  logic   configured;
  int checks = 0, failures = 0;
  logic [16:0] ctl_prev;

  wir dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {m[11:0], scan_en, hold_in, hold_out, wby_hold, pby_hold}
  function automatic logic [16:0] expect_ctrl(int code);
    case (code)
      1: return {12'h000, 5'b00010};
      2: return {12'h000, 5'b00001};
      3: return {12'h0F0, 5'b11000};
      4: return {12'h080, 5'b10100};
      5: return {12'hE0F, 5'b11000};
      6: return {12'h809, 5'b10101};
      default: return {12'h100, 5'b00000};
    endcase
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  // configuration sequence; returns the bits seen on so during the shift
  task automatic load(input logic [2:0] code, output logic [2:0] shifted_out);
    wsc = '0; wsc.wrstn = 1; wsc.select_wir = 1;
    repeat (3) tick();
    wsc.capture_wr = 1; tick(); wsc.capture_wr = 0;
    wsc.shift_wr = 1; tick();
    for (int b = 0; b < 3; b++) begin
      si = code[b]; tick();
      shifted_out[b] = so;
    end
    wsc.shift_wr = 0; si = 0;
    check("controls unchanged before update", ctrl == ctl_prev);
    wsc.update_wr = 1; tick(); wsc.update_wr = 0;
    wsc.select_wir = 0; tick();
  endtask

  logic [2:0]  sh;
  logic [2:0]  prev_code;
  initial begin
    wsc = '0; si = 0;
    repeat (3) tick();
    rst_n = 1;
    repeat (4) tick();
    check("reset gives normal mode", mode == M_NORMAL && ctrl == 17'(expect_ctrl(0)));
    prev_code = 3'd0;
    for (int code = 1; code <= 7; code++) begin
      // start from function mode: WRSTN low for a few clocks
      wsc = '0; repeat (3) tick();
      check("normal after WRSTN low", ctrl == 17'(expect_ctrl(0)) && !configured);
      ctl_prev = ctrl;
      load(3'(code), sh);
      // shifted-out bits are the previously loaded instruction's
      check("so carries displaced bits", sh == prev_code);
      prev_code = 3'(code);
      // ctrl is loaded at the end of the update clock: visible now
      check($sformatf("decode of %0d", code), ctrl == 17'(expect_ctrl(code)));
      check("mode output", mode == mode_e'(code == 7 ? 0 : code));
      check("configured flag", configured == (code != 7));
      // persists while WRSTN high
      repeat (20) tick();
      check("controls persist", ctrl == 17'(expect_ctrl(code)));
    end
    // an instruction whose UpdateWR never comes must not change the controls
    wsc = '0; repeat (3) tick();
    wsc.wrstn = 1; wsc.select_wir = 1; repeat (3) tick();
    wsc.capture_wr = 1; tick(); wsc.capture_wr = 0; wsc.shift_wr = 1; tick();
    si = 1; repeat (3) tick(); wsc.shift_wr = 0;
    repeat (5) tick();
    check("no update without UpdateWR", ctrl == 17'(expect_ctrl(0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
