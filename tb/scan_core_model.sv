// scan_core_model: behavioural stand-in for a scan-inserted IP core (the
// wrapped benchmark circuits are not part of this design), used only by the
// testbenches.
//
// Two scan chains of L1 and L2 flip-flops. With ce high, each clock either
// shifts the chains (se high; sc_in enters bit 0, sc_out is the last bit) or
// captures (se low) the next state
//   ch1[j] <= ch1[j] ^ ch2[j % L2] ^ fn_in[j % N_IN]
//   ch2[j] <= ~ch2[j]
// The functional outputs are combinational: fn_out[k] = ch1[k] ^ ch2[k].
// With ce low the state is kept. The flip-flops are cleared at time zero.
// DEFECT = 1 models a manufacturing defect: ch1[0] is stuck at 0 on capture.
module scan_core_model #(
  parameter int unsigned N_IN  = 3,
  parameter int unsigned N_OUT = 6,
  parameter int unsigned L1    = 11,
  parameter int unsigned L2    = 10,
  parameter bit          DEFECT = 0
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             se,
  input  logic [1:0]       sc_in,
  output logic [1:0]       sc_out,
  input  logic [N_IN-1:0]  fn_in,
  output logic [N_OUT-1:0] fn_out
);
  logic [L1-1:0] ch1 = '0;
  logic [L2-1:0] ch2 = '0;

  always_ff @(posedge clk) begin
    if (ce) begin
      if (se) begin
        ch1 <= {ch1[L1-2:0], sc_in[0]};
        ch2 <= {ch2[L2-2:0], sc_in[1]};
      end else begin
        for (int j = 0; j < L1; j++) ch1[j] <= ch1[j] ^ ch2[j % L2] ^ fn_in[j % N_IN];
        ch2 <= ~ch2;
        if (DEFECT) ch1[0] <= 1'b0;
      end
    end
  end

  assign sc_out = {ch2[L2-1], ch1[L1-1]};
  for (genvar k = 0; k < N_OUT; k++) begin : g_o
    assign fn_out[k] = ch1[k] ^ ch2[k];
  end
endmodule
