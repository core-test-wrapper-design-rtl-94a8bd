// flit_fifo: synchronous first-in first-out buffer of flits with a
// valid/ready handshake on both sides.
//
// DEPTH entries held in a register array with read and write pointers and an
// occupancy count. in_ready is high while there is room; out_valid while the
// buffer holds a flit, which is presented at out_flit (first-word
// fall-through). A flit written in one clock can be read in the next. Push and
// pop may happen in the same clock. in_ready depends only on the occupancy,
// never on out_ready, so chains of buffers form no combinational path.
module flit_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  in_ready,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_ready
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t           mem [DEPTH];
  logic [PW-1:0]   rd, wr;
  logic [PW:0]     count;
  logic            push, pop;

  assign out_valid = count != '0;
  assign in_ready  = count != (PW+1)'(DEPTH);
  assign out_flit  = mem[rd];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd    <= '0;
      wr    <= '0;
      count <= '0;
    end else begin
      if (push) wr <= nxt(wr);
      if (pop)  rd <= nxt(rd);
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wr] <= in_flit;

  assert property (@(posedge clk) disable iff (!rst_n) count <= (PW+1)'(DEPTH))
    else $error("flit_fifo: occupancy above depth");
endmodule
