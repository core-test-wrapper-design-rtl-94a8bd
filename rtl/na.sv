// na: network adapter between the network interface (ni) and the wrapper
// interface circuit (wic).
//
// It receives the flits of a test packet that the NI has kept for this core.
// From the head flit it takes the wrapper instruction and where the result
// must go (router address and exit port of the test sink), and starts the
// WIC. Payload flits are passed on to the WIC as words, the tail marked as the
// last one. When the WIC reports done, the adapter asks the NI to send a
// result packet carrying the 14-bit result. core_test_mode is the state
// information given to the local core: high from the head flit until the
// result has been handed to the NI. last_fail reports the outcome of the most
// recent test (nonzero result).
// The payload word, its last mark and its valid are the NI's flit passed
// straight through; only the handshake back is gated by the adapter state.
// Timing: the head flit is accepted in the idle state in one clock; payload
// flits move at the WIC's pace; the result request appears one clock after
// done and is held until the NI takes it.
// That an adapter sits between wrapper and NI and reports state to the core
// is from the description; the rest is this design's choice.
module na
  import wrap_pkg::*;
  import noc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // kept packets from the NI
  input  logic                rx_valid,
  input  flit_t               rx_flit,
  output logic                rx_ready,
  // result request to the NI
  output logic                res_valid,
  output logic [ADDR_W-1:0]   res_dest,
  output logic [2:0]          res_port,
  output logic [RESULT_W-1:0] res_value,
  input  logic                res_ready,
  // to/from the WIC
  output logic                wic_start,
  output logic [INSTR_W-1:0]  wic_instr,
  output logic                wic_has_payload,
  output logic                pl_valid,
  output logic [FLIT_W-1:0]   pl_data,
  output logic                pl_last,
  input  logic                pl_ready,
  input  logic                wic_done,
  input  logic [RESULT_W-1:0] wic_result,
  // state information to the local core
  output logic                core_test_mode,
  output logic                last_fail
);
  typedef enum logic [1:0] {A_IDLE, A_PAYLOAD, A_WAIT, A_SEND} astate_e;
  astate_e state;

  logic is_test_head;
  assign is_test_head = rx_flit.head && !rx_flit.data[31];

  assign rx_ready  = (state == A_IDLE) || (state == A_PAYLOAD && pl_ready);
  assign pl_valid  = state == A_PAYLOAD && rx_valid;
  assign pl_data   = rx_flit.data;
  assign pl_last   = rx_flit.tail;
  assign res_valid = state == A_SEND;
  assign core_test_mode = state != A_IDLE;

  assign wic_start       = state == A_IDLE && rx_valid && is_test_head;
  assign wic_instr       = f_instr(rx_flit.data);
  assign wic_has_payload = !rx_flit.tail;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= A_IDLE;
      res_dest  <= '0;
      res_port  <= '0;
      res_value <= '0;
      last_fail <= 1'b0;
    end else begin
      unique case (state)
        A_IDLE: if (rx_valid && is_test_head) begin
          res_dest <= f_sink(rx_flit.data);
          res_port <= f_sink_port(rx_flit.data);
          state    <= rx_flit.tail ? A_WAIT : A_PAYLOAD;
        end
        A_PAYLOAD: if (rx_valid && pl_ready && rx_flit.tail) state <= A_WAIT;
        A_WAIT: if (wic_done) begin
          res_value <= wic_result;
          last_fail <= wic_result != '0;
          state     <= A_SEND;
        end
        A_SEND: if (res_ready) state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end
endmodule
