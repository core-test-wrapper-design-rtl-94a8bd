// noc_pkg: flit format, addresses and routing functions of the 4x4 mesh
// test network.
//
// Links carry 32-bit flits. A packet is one head flit followed by payload
// flits; two sideband bits mark the head and the last (tail) flit, so a
// one-flit packet has both set. Nodes are addressed by 4 bits {y[1:0],x[1:0]},
// row 0 at the top (address 0000 top-left, 0011 top-right, 1111 bottom-right).
//
// Head flit of a test packet (type 00 unicast, 01 multicast):
//   [31:30] type   [29:14] destination mask, bit i = node i
//   [13:10] router the result packet must go to   [9:7] exit port there
//   [6:4]   wrapper instruction   [3:0] zero
// Head flit of a result packet (type 10), always a single flit:
//   [31:30] type   [29:26] destination router   [25:23] exit port
//   [17:14] source node   [13:0] test result (zero = core passed)
// Payload flit of a test packet: four 8-bit test slots, slot 0 in [7:0],
// applied to the wrapper one per clock (see wic.sv).
//
// The result in bits 13..0 of the head flit is taken from the description;
// the 32-bit link width and every other field position are this design's
// choices. Unicast uses the same mask field with a single bit set.
package noc_pkg;

  localparam int unsigned FLIT_W   = 32;
  localparam int unsigned DIM      = 4;          // mesh is DIM x DIM
  localparam int unsigned NODES    = DIM * DIM;  // 16
  localparam int unsigned ADDR_W   = 4;
  localparam int unsigned RESULT_W = 14;         // head flit bits 13..0
  localparam int unsigned NPORT    = 5;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Router port numbers
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    T_UNICAST   = 2'b00,
    T_MULTICAST = 2'b01,
    T_RESULT    = 2'b10
  } ptype_e;

  // ---- field access -------------------------------------------------------
  function automatic logic [1:0] f_type(logic [FLIT_W-1:0] d);
    return d[31:30];
  endfunction
  function automatic logic [NODES-1:0] f_mask(logic [FLIT_W-1:0] d);
    return d[29:14];
  endfunction
  function automatic logic [ADDR_W-1:0] f_sink(logic [FLIT_W-1:0] d);
    return d[13:10];
  endfunction
  function automatic logic [2:0] f_sink_port(logic [FLIT_W-1:0] d);
    return d[9:7];
  endfunction
  function automatic logic [2:0] f_instr(logic [FLIT_W-1:0] d);
    return d[6:4];
  endfunction
  function automatic logic [ADDR_W-1:0] f_rdest(logic [FLIT_W-1:0] d);
    return d[29:26];
  endfunction
  function automatic logic [2:0] f_rport(logic [FLIT_W-1:0] d);
    return d[25:23];
  endfunction
  function automatic logic [ADDR_W-1:0] f_rsrc(logic [FLIT_W-1:0] d);
    return d[17:14];
  endfunction
  function automatic logic [RESULT_W-1:0] f_result(logic [FLIT_W-1:0] d);
    return d[13:0];
  endfunction

  function automatic logic [FLIT_W-1:0] make_test_head(
      logic multicast, logic [NODES-1:0] mask, logic [ADDR_W-1:0] sink,
      logic [2:0] sink_port, logic [2:0] instr);
    return {multicast ? T_MULTICAST : T_UNICAST, mask, sink, sink_port, instr, 4'b0};
  endfunction

  function automatic logic [FLIT_W-1:0] make_result_head(
      logic [ADDR_W-1:0] dest, logic [2:0] port, logic [ADDR_W-1:0] src,
      logic [RESULT_W-1:0] result);
    return {T_RESULT, dest, port, 5'b0, src, result};
  endfunction

  // ---- routing --------------------------------------------------------------
  // Dimension-ordered (X first, then Y) route of one destination from the
  // router at address `here`; for a result packet `exit_port` is used once the
  // destination router is reached.
  function automatic port_e xy_dir(logic [ADDR_W-1:0] here, logic [ADDR_W-1:0] dest,
                                   port_e at_dest);
    logic [1:0] hx, hy, dx, dy;
    {hy, hx} = here;
    {dy, dx} = dest;
    if (dx > hx)      return P_EAST;
    else if (dx < hx) return P_WEST;
    else if (dy < hy) return P_NORTH;
    else if (dy > hy) return P_SOUTH;
    else              return at_dest;
  endfunction

  // The part of a multicast mask that leaves the router at `here` through `dir`.
  function automatic logic [NODES-1:0] mask_for(logic [ADDR_W-1:0] here,
                                                logic [NODES-1:0] mask, port_e dir);
    logic [NODES-1:0] r;
    r = '0;
    for (int i = 0; i < NODES; i++)
      if (mask[i] && xy_dir(here, ADDR_W'(i), P_LOCAL) == dir) r[i] = 1'b1;
    return r;
  endfunction

endpackage
