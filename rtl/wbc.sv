// wbc: wrapper boundary cell (WBC), the building block of the wrapper
// boundary register (WBR).
//
// One flip-flop with two multiplexers around it. The flip-flop loads the
// cell test input CTI when scan_en is high (shift) and the cell's own function
// output CFO when scan_en is low (capture; with hold_en high this keeps the
// stored value). CFO is the cell function input CFI when hold_en is low and
// the flip-flop when hold_en is high. CTO is the flip-flop, feeding the next
// cell of the chain.
//   scan_en=0, hold_en=0: CFI passes to CFO, the flip-flop samples CFI
//   scan_en=1, hold_en=1: test data shifts CTI -> CTO and drives CFO
// Timing: CTO changes one clock after CTI is presented; CFO is combinational.
// The four terminals, the two enables and the feedback from CFO into the
// flip-flop input follow the cell drawing; the flip-flop has no reset, as in
// the drawing (a test always shifts the cell before using it).
module wbc (
  input  logic clk,
  input  logic scan_en,
  input  logic hold_en,
  input  logic cfi,
  input  logic cti,
  output logic cfo,
  output logic cto
);
  logic q;

  always_ff @(posedge clk) q <= scan_en ? cti : cfo;

  assign cfo = hold_en ? q : cfi;
  assign cto = q;
endmodule
