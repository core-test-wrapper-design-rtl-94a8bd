// wir: wrapper instruction register (WIR) with its configuration controller.
//
// A small state machine walks through the configuration sequence: after
// reset it waits; while WRSTN is low it keeps the wrapper in normal function
// mode. With WRSTN high it clears the bit counter and waits for SelectWIR,
// then for CaptureWR, then for ShiftWR. While ShiftWR is high, one
// instruction bit is taken from Si per clock into test_order[count] (bit 0
// first). When UpdateWR is high and all three bits are in, the instruction is
// decoded into the multiplexer selects m0..m11 and the boundary/bypass
// enables, which are held in the update stage; once SelectWIR returns low the
// test begins and the controller returns to its wait state, keeping the
// decoded controls until WRSTN is seen low again. WRSTN low in any state
// sends the controller to function mode on the next clock.
//
// Interface: wsc carries WRSTN, SelectWIR, CaptureWR, ShiftWR and UpdateWR;
// si is the wrapper serial input; so is the bit displaced from the
// instruction register by each shift, routed to the wrapper's So when
// SelectWIR is high. ctrl/mode change one clock after the cycle in the update
// state. Timing of a load, with the controller waiting: SelectWIR high,
// CaptureWR one clock, ShiftWR high, then three clocks of instruction bits,
// UpdateWR, SelectWIR low.
//
// The states and their order are the configuration flow chart's; the check
// that ShiftWR is still high before each bit is taken, the limit of three
// bits, WRSTN acting from every state (the chart tests it only while
// waiting) and the synchronous active-low reset are this design's choices.
module wir
  import wrap_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  wsc_t       wsc,
  input  logic       si,
  output logic       so,
  output wctrl_t     ctrl,
  output mode_e      mode,
  output logic       configured  // controls hold a decoded test instruction
);
  typedef enum logic [2:0] {
    S_WAIT, S_FUNC, S_COUNT0, S_WAIT_CAPTURE, S_READY, S_SHIFT, S_UPDATE, S_BEGIN
  } state_e;

  state_e             state;
  logic [1:0]         count;
  logic [INSTR_W-1:0] test_order;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_WAIT;
      count      <= '0;
      test_order <= '0;
      so         <= 1'b0;
      ctrl       <= decode_instr(M_NORMAL);
      mode       <= M_NORMAL;
      configured <= 1'b0;
    end else begin
      unique case (state)
        S_WAIT:  state <= wsc.wrstn ? S_COUNT0 : S_FUNC;
        S_FUNC: begin
          ctrl       <= decode_instr(M_NORMAL);
          mode       <= M_NORMAL;
          configured <= 1'b0;
          state      <= S_WAIT;
        end
        S_COUNT0: begin
          count <= '0;
          if (wsc.select_wir) state <= S_WAIT_CAPTURE;
        end
        S_WAIT_CAPTURE: if (wsc.capture_wr) state <= S_READY;
        S_READY:        if (wsc.shift_wr)   state <= S_SHIFT;
        S_SHIFT: begin
          if (wsc.shift_wr && count != 2'd3) begin
            test_order[count] <= si;
            so                <= test_order[count];
            count             <= count + 2'd1;
          end
          if (wsc.update_wr && count == 2'd3) state <= S_UPDATE;
        end
        S_UPDATE: begin
          ctrl       <= decode_instr(test_order);
          mode       <= mode_e'(test_order == 3'd7 ? 3'd0 : test_order);
          configured <= test_order != M_NORMAL && test_order != 3'd7;
          if (!wsc.select_wir) state <= S_BEGIN;
        end
        S_BEGIN: state <= S_WAIT;
        default: state <= S_WAIT;
      endcase
      // WRSTN low leaves any configuration or test for function mode
      if (!wsc.wrstn && state != S_WAIT && state != S_FUNC) state <= S_FUNC;
    end
  end
endmodule
