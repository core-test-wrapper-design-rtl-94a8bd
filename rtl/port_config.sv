// port_config: peripheral In/Out config circuit between one tester (ATE)
// channel and one edge port of the mesh.
//
// In direction: test packets from the tester are buffered in a FIFO of
// IN_DEPTH flits and sent into the edge port, so the tester may deliver
// flits in bursts independent of the network's back-pressure.
// Out direction: result packets leaving the mesh through the edge port are
// turned into result records (source node, 14-bit result, pass flag) for the
// tester, held until it takes them; any other flit arriving there is
// discarded. results and fails count the records delivered, for status.
// Timing: an input flit can enter the mesh one clock after the tester offers
// it; a result record appears one clock after its flit arrives.
// Where In, Out and In/Out config circuits sit is shown in the subnet
// drawings; what they do inside is this design's choice. One circuit serves
// both directions; a port used only as an input or output leaves the other
// side idle.
module port_config
  import noc_pkg::*;
#(
  parameter int unsigned IN_DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // tester side
  input  logic                ate_valid,
  input  flit_t               ate_flit,
  output logic                ate_ready,
  output logic                res_valid,
  output logic [ADDR_W-1:0]   res_src,
  output logic [RESULT_W-1:0] res_value,
  output logic                res_pass,
  input  logic                res_ready,
  output logic [15:0]         results,
  output logic [15:0]         fails,
  // mesh edge port
  output logic                edge_in_valid,
  output flit_t               edge_in_flit,
  input  logic                edge_in_ready,
  input  logic                edge_out_valid,
  input  flit_t               edge_out_flit,
  output logic                edge_out_ready
);
  flit_fifo #(.DEPTH(IN_DEPTH)) u_in (
    .clk, .rst_n,
    .in_valid(ate_valid), .in_flit(ate_flit), .in_ready(ate_ready),
    .out_valid(edge_in_valid), .out_flit(edge_in_flit), .out_ready(edge_in_ready)
  );

  logic is_result;
  assign is_result      = edge_out_flit.head && f_type(edge_out_flit.data) == T_RESULT;
  assign edge_out_ready = !res_valid || res_ready || !is_result;
  assign res_pass       = res_value == '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_src   <= '0;
      res_value <= '0;
      results   <= '0;
      fails     <= '0;
    end else begin
      if (res_valid && res_ready) res_valid <= 1'b0;
      if (edge_out_valid && edge_out_ready && is_result) begin
        res_valid <= 1'b1;
        res_src   <= f_rsrc(edge_out_flit.data);
        res_value <= f_result(edge_out_flit.data);
        results   <= results + 16'd1;
        if (f_result(edge_out_flit.data) != '0) fails <= fails + 16'd1;
      end
    end
  end
endmodule
