// wby: one bit of a wrapper bypass register (WBY).
//
// A single flip-flop that loads wby_in while hold_en is high and keeps its
// value (its output fed back) while hold_en is low, so data is carried from
// Wby_in to Wby_out with one clock of delay. The wrapper uses one WBY bit as
// its serial bypass register and three as its parallel bypass register.
// The structure follows the bypass cell drawing; the absence of a reset is
// also the drawing's (the bypass path is flushed by the data shifted through).
module wby (
  input  logic clk,
  input  logic hold_en,
  input  logic wby_in,
  output logic wby_out
);
  always_ff @(posedge clk) wby_out <= hold_en ? wby_in : wby_out;
endmodule
