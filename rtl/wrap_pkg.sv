// wrap_pkg: types and constants shared by the core test wrapper.
//
// The wrapper has seven operating modes, selected by a 3-bit instruction
// (Data_function[2:0]) shifted serially into the wrapper instruction register
// (WIR). Decoding an instruction yields the twelve multiplexer selects m0..m11
// of the wrapper datapath plus the boundary-register and bypass enables.
//
// The list of seven modes, the 3-bit instruction width and the twelve
// selects follow the wrapper description; the binary code of each mode, the
// meaning of each individual select bit and the split of the single "Hold_en"
// into per-register enables are this design's choices (see wrapper.sv).
package wrap_pkg;

  // Instruction codes, numbered in the order the modes are listed.
  typedef enum logic [2:0] {
    M_NORMAL      = 3'd0,  // normal function
    M_SER_BYPASS  = 3'd1,  // serial bypass (Si -> WBY -> So)
    M_PAR_BYPASS  = 3'd2,  // parallel bypass (Pi -> parallel bypass reg -> Po)
    M_SER_INTEST  = 3'd3,  // serial in-test  (Si -> inWBR -> SC2 -> SC1 -> outWBR -> So)
    M_SER_EXTEST  = 3'd4,  // serial ex-test  (Si -> inWBR -> outWBR -> So)
    M_PAR_INTEST  = 3'd5,  // parallel in-test (Pi0->SC1, Pi1->SC2, Pi2->inWBR->outWBR)
    M_PAR_EXTEST  = 3'd6   // parallel ex-test (Pi2->inWBR->outWBR, Pi0/1 bypassed)
  } mode_e;

  localparam int unsigned INSTR_W = 3;   // Data_function[2:0]
  localparam int unsigned NUM_SEL = 12;  // m0 .. m11

  // Select bit positions (1 selects the "test/core" side, 0 the other).
  localparam int unsigned S_M0  = 0;   // inWBR source: 1 = Pi[2], 0 = Si
  localparam int unsigned S_M1  = 1;   // Pi[0] steering: 1 = to scan chain 1, 0 = to bypass reg
  localparam int unsigned S_M2  = 2;   // Pi[1] steering: 1 = to scan chain 2, 0 = to bypass reg
  localparam int unsigned S_M3  = 3;   // Pi[2] steering: 1 = to inWBR (via m0), 0 = to bypass reg
  localparam int unsigned S_M4  = 4;   // outWBR source: 1 = scan chain 1 out, 0 = inWBR end
  localparam int unsigned S_M5  = 5;   // scan chain 1 source: 1 = scan chain 2 out, 0 = Pi[0]
  localparam int unsigned S_M6  = 6;   // scan chain 2 source: 1 = inWBR end, 0 = Pi[1]
  localparam int unsigned S_M7  = 7;   // serial path: 1 = comparator, 0 = serial bypass (WBY)
  localparam int unsigned S_M8  = 8;   // So: 1 = WIR serial out, 0 = m7 (also forced by SelectWIR)
  localparam int unsigned S_M9  = 9;   // Po[0]: 1 = comparator 0, 0 = parallel bypass bit 0
  localparam int unsigned S_M10 = 10;  // Po[1]: 1 = comparator 1, 0 = parallel bypass bit 1
  localparam int unsigned S_M11 = 11;  // Po[2]: 1 = comparator 2, 0 = parallel bypass bit 2

  // Decoded wrapper control word, held in the WIR update stage.
  typedef struct packed {
    logic [NUM_SEL-1:0] m;        // multiplexer selects m11..m0
    logic               scan_en;  // boundary cells may shift (gated by Se)
    logic               hold_in;  // input WBR drives the core inputs from its flip-flops
    logic               hold_out; // output WBR drives the Out pins from its flip-flops
    logic               wby_hold; // serial bypass register loads
    logic               pby_hold; // parallel bypass register loads
  } wctrl_t;

  // Wrapper serial control signals (the "Wrap" bundle of the wrapper).
  typedef struct packed {
    logic wrstn;       // 0: wrapper returns to normal function mode
    logic select_wir;  // WIR selected
    logic capture_wr;  // capture step of the WIR sequence
    logic shift_wr;    // shift instruction bits from Si
    logic update_wr;   // update/decode the instruction
  } wsc_t;

  function automatic wctrl_t decode_instr(logic [INSTR_W-1:0] code);
    wctrl_t c;
    c = '0;
    unique case (code)
      M_SER_BYPASS: begin
        c.wby_hold = 1'b1;
      end
      M_PAR_BYPASS: begin
        c.pby_hold = 1'b1;
      end
      M_SER_INTEST: begin
        c.m[S_M4] = 1'b1; c.m[S_M5] = 1'b1; c.m[S_M6] = 1'b1; c.m[S_M7] = 1'b1;
        c.scan_en = 1'b1; c.hold_in = 1'b1;
      end
      M_SER_EXTEST: begin
        c.m[S_M7] = 1'b1;
        c.scan_en = 1'b1; c.hold_out = 1'b1;
      end
      M_PAR_INTEST: begin
        c.m[S_M0] = 1'b1; c.m[S_M1] = 1'b1; c.m[S_M2] = 1'b1; c.m[S_M3] = 1'b1;
        c.m[S_M9] = 1'b1; c.m[S_M10] = 1'b1; c.m[S_M11] = 1'b1;
        c.scan_en = 1'b1; c.hold_in = 1'b1;
      end
      M_PAR_EXTEST: begin
        c.m[S_M0] = 1'b1; c.m[S_M3] = 1'b1; c.m[S_M11] = 1'b1;
        c.scan_en = 1'b1; c.hold_out = 1'b1; c.pby_hold = 1'b1;
      end
      default: begin  // M_NORMAL and the unused code 3'd7
        c.m[S_M8] = 1'b1;
      end
    endcase
    return c;
  endfunction

  function automatic logic is_parallel(logic [INSTR_W-1:0] code);
    return code == M_PAR_BYPASS || code == M_PAR_INTEST || code == M_PAR_EXTEST;
  endfunction

endpackage
