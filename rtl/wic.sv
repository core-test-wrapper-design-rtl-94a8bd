// wic: wrapper interface circuit, between the network adapter (na) and the
// core test wrapper.
//
// For each test packet the adapter hands over the wrapper instruction
// (start/instr) and then the payload words. The WIC
//   1. loads the instruction into the wrapper instruction register with the
//      fixed serial-control sequence CFG (10 clocks: SelectWIR for three
//      clocks, CaptureWR, ShiftWR, three instruction bits on Si with bit 0
//      first, UpdateWR, SelectWIR low);
//   2. applies the payload: each 32-bit word holds four 8-bit test slots,
//      slot 0 in bits 7..0, one slot per clock. A slot is
//        [7] cmp  count this clock's comparator output into the result
//        [6] se   scan enable (1 shift, 0 capture)
//        [5:3] d  Pi[2:0]; Si is d[0] in the serial modes
//        [2:0] e  Com_pi[2:0]; Com_si is e[0] in the serial modes
//      When the next word has not arrived, test_en is held low so that the
//      wrapper and core keep their state (no slot is lost or repeated);
//   3. counts, on every slot with cmp set, the ones seen on So (serial
//      modes) or Po[2:0] (parallel modes). Behind the wrapper's XOR
//      comparator these ones are mismatching response bits. The 14-bit count
//      saturates; it is returned with done and is zero for a passing core;
//   4. drives WRSTN low again, which returns the wrapper to normal mode.
// A packet without payload only performs step 1 and returns a zero result.
// Timing: with start seen in clock 1, CFG fills clocks 2..11, clock 12 takes
// the first payload word (pl_ready high) and slot 0 is applied in clock 13;
// test_en is low in clock 12. done comes
// one clock after the last slot; a back-to-back stream of payload words is
// applied with no idle clock between words.
//
// The description names this block and says it connects wrapper and adapter;
// its whole behaviour, the slot format and the result as a mismatch count are
// this design's choices. The serial-control sequence follows the WIR
// configuration flow.
module wic
  import wrap_pkg::*;
  import noc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // from the network adapter
  input  logic                start,
  input  logic [INSTR_W-1:0]  instr,
  input  logic                has_payload,
  input  logic                pl_valid,
  input  logic [FLIT_W-1:0]   pl_data,
  input  logic                pl_last,
  output logic                pl_ready,
  output logic                done,
  output logic [RESULT_W-1:0] result,
  output logic                busy,
  // to the wrapper
  output wsc_t                wsc,
  output logic                si,
  output logic [2:0]          pi,
  output logic                com_si,
  output logic [2:0]          com_pi,
  output logic                se,
  output logic                test_en,
  input  logic                so,
  input  logic [2:0]          po
);
  typedef enum logic [1:0] {W_IDLE, W_CFG, W_APPLY, W_FINISH} wstate_e;

  wstate_e             state;
  logic [3:0]          cnt;
  logic [INSTR_W-1:0]  instr_q;
  logic                has_pl_q;
  logic                have_word, word_last;
  logic [FLIT_W-1:0]   word;
  logic [1:0]          slot_idx;
  logic [7:0]          slot;
  logic [RESULT_W-1:0] errs;

  assign slot = word[slot_idx*8 +: 8];
  assign busy = state != W_IDLE;

  // serial control sequence and slot drive
  always_comb begin
    wsc     = '0;
    si      = 1'b0;
    pi      = '0;
    com_si  = 1'b0;
    com_pi  = '0;
    se      = 1'b0;
    test_en = 1'b1;
    unique case (state)
      W_IDLE: ;
      W_CFG: begin
        wsc.wrstn      = 1'b1;
        wsc.select_wir = cnt <= 4'd8;
        wsc.capture_wr = cnt == 4'd3;
        wsc.shift_wr   = cnt >= 4'd4 && cnt <= 4'd7;
        wsc.update_wr  = cnt == 4'd8;
        if (cnt >= 4'd5 && cnt <= 4'd7) si = instr_q[2'(cnt - 4'd5)];
      end
      W_APPLY: begin
        wsc.wrstn = 1'b1;
        test_en   = have_word;
        se        = slot[6];
        if (is_parallel(instr_q)) begin
          pi     = slot[5:3];
          com_pi = slot[2:0];
        end else begin
          si     = slot[3];
          com_si = slot[0];
        end
      end
      W_FINISH: begin wsc.wrstn = 1'b1; test_en = 1'b0; end
      default: ;
    endcase
  end

  // observed mismatch bits of the current slot
  logic [1:0] ones;
  always_comb begin
    if (is_parallel(instr_q)) ones = 2'(po[0]) + 2'(po[1]) + 2'(po[2]);
    else                      ones = 2'(so);
  end

  logic advance;
  assign advance  = state == W_APPLY && have_word;
  assign pl_ready = state == W_APPLY &&
                    (!have_word || (slot_idx == 2'd3 && !word_last));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= W_IDLE;
      cnt       <= '0;
      instr_q   <= '0;
      has_pl_q  <= 1'b0;
      have_word <= 1'b0;
      word_last <= 1'b0;
      word      <= '0;
      slot_idx  <= '0;
      errs      <= '0;
      done      <= 1'b0;
      result    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        W_IDLE: if (start) begin
          state     <= W_CFG;
          cnt       <= '0;
          instr_q   <= instr;
          has_pl_q  <= has_payload;
          errs      <= '0;
          have_word <= 1'b0;
        end
        W_CFG: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd9) state <= has_pl_q ? W_APPLY : W_FINISH;
        end
        W_APPLY: begin
          if (advance) begin
            if (slot[7] && ones != 2'd0 && errs != '1)
              errs <= (errs > RESULT_W'('1) - RESULT_W'(ones)) ? '1 : errs + RESULT_W'(ones);
            slot_idx <= slot_idx + 2'd1;
            if (slot_idx == 2'd3) begin
              if (word_last) begin
                have_word <= 1'b0;
                state     <= W_FINISH;
              end else if (!pl_valid) begin
                have_word <= 1'b0;
              end
            end
          end
          if (pl_valid && pl_ready) begin
            have_word <= 1'b1;
            word      <= pl_data;
            word_last <= pl_last;
            slot_idx  <= '0;
          end
        end
        W_FINISH: begin
          done   <= 1'b1;
          result <= errs;
          state  <= W_IDLE;
        end
        default: state <= W_IDLE;
      endcase
    end
  end
endmodule
