// ni: network interface of one core site, attached to the local port of its
// router.
//
// Unpacking: every packet the router delivers is looked at once, by its head
// flit. A test packet (unicast or multicast) whose destination mask has this
// node's bit set is kept and all its flits are passed to the adapter (na);
// any other packet is discarded flit by flit, so the router is never blocked
// by it. drop_pulse marks each discarded head.
// Packing: a result request from the adapter (destination router, exit port,
// 14-bit result) becomes a one-flit result packet with this node as source
// and the result in bits 13..0, held in a one-entry output register until the
// router accepts it.
// The flit towards the adapter is the router's flit wired straight through;
// only its valid and the ready back are gated by the keep/discard decision.
// Timing: unpacking is combinational (flits pass in the clock they arrive);
// a result flit is offered one clock after the request is accepted.
// Keeping packets addressed to the node and discarding others, and the result
// in bits 13..0 of the head flit, follow the description; the rest is this
// design's choice.
module ni
  import noc_pkg::*;
#(
  parameter logic [ADDR_W-1:0] NODE_ADDR = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  // from the router's local output
  input  logic                in_valid,
  input  flit_t               in_flit,
  output logic                in_ready,
  // to the router's local input
  output logic                out_valid,
  output flit_t               out_flit,
  input  logic                out_ready,
  // to the adapter
  output logic                rx_valid,
  output flit_t               rx_flit,
  input  logic                rx_ready,
  // result requests from the adapter
  input  logic                res_valid,
  input  logic [ADDR_W-1:0]   res_dest,
  input  logic [2:0]          res_port,
  input  logic [RESULT_W-1:0] res_value,
  output logic                res_ready,
  output logic                drop_pulse
);
  logic in_pkt, keeping;   // inside a packet, and whether it is being kept
  logic head_match, keep_now;

  assign head_match = !in_flit.data[31] && f_mask(in_flit.data)[NODE_ADDR];
  assign keep_now   = in_flit.head ? head_match : (in_pkt && keeping);

  assign rx_valid   = in_valid && keep_now;
  assign rx_flit    = in_flit;
  assign in_ready   = keep_now ? rx_ready : 1'b1;
  assign drop_pulse = in_valid && in_flit.head && !head_match;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_pkt  <= 1'b0;
      keeping <= 1'b0;
    end else if (in_valid && in_ready) begin
      in_pkt  <= !in_flit.tail;
      keeping <= keep_now;
    end
  end

  // result packet output register
  assign res_ready = !out_valid || out_ready;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_flit  <= '0;
    end else if (res_ready) begin
      out_valid <= res_valid;
      if (res_valid)
        out_flit <= '{head: 1'b1, tail: 1'b1,
                      data: make_result_head(res_dest, res_port, NODE_ADDR, res_value)};
    end
  end
endmodule
