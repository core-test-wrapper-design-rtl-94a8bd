// router: five-port wormhole router of the 2D mesh, with multicast.
//
// Ports 0..4 are Local, North, East, South, West (noc_pkg::port_e). Each input
// has a FIFO of FIFO_DEPTH flits. The routing module looks at the head flit
// at the front of an input FIFO:
//   * a test packet carries a destination mask; every destination is routed
//     X first, then Y, and the packet is sent to each output that at least
//     one destination needs. Each copy of the head flit carries only the
//     destinations reached through that output, so a multicast packet forks
//     into a tree and every node gets exactly one copy;
//   * a result packet is routed X then Y to its destination router and
//     leaves there through the exit port named in its head flit (the edge
//     port where the test sink is);
//   * a test packet with an empty mask is consumed and dropped.
// Allocation: an input whose head flit is waiting takes all the outputs it
// needs at once, or none (so two multicast packets cannot each hold part of
// what the other needs); inputs are served in round-robin order. The outputs
// stay with the input until its tail flit has passed. A flit leaves when every
// output of its set is ready, so all copies advance together.
// Timing: a head flit spends one clock in allocation after reaching the front
// of its FIFO; the following flits pass at one per clock. Outputs are driven
// combinationally from the input FIFOs; the FIFOs of the next router are the
// pipeline registers.
// That each router has FIFOs and a routing module that picks the direction
// from the head flit is from the description; XY routing, the multicast tree
// and the allocation scheme are this design's choices.
module router
  import noc_pkg::*;
#(
  parameter logic [ADDR_W-1:0] ADDR       = '0,
  parameter int unsigned       FIFO_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [NPORT],
  input  flit_t in_flit   [NPORT],
  output logic  in_ready  [NPORT],
  output logic  out_valid [NPORT],
  output flit_t out_flit  [NPORT],
  input  logic  out_ready [NPORT],
  output logic  fork_pulse,   // a head flit left through more than one output
  output logic  stall_pulse   // an allocated flit waited for a busy output
);
  // input FIFOs
  logic  fv [NPORT];
  flit_t ff [NPORT];
  logic  pop [NPORT];
  for (genvar i = 0; i < NPORT; i++) begin : g_fifo
    flit_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_flit(in_flit[i]), .in_ready(in_ready[i]),
      .out_valid(fv[i]), .out_flit(ff[i]), .out_ready(pop[i])
    );
  end

  // route request of the flit at the front of each FIFO
  logic [NPORT-1:0] req [NPORT];
  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      req[i] = '0;
      if (ff[i].data[31]) begin
        req[i][xy_dir(ADDR, f_rdest(ff[i].data), port_e'(f_rport(ff[i].data)))] = 1'b1;
      end else begin
        for (int d = 0; d < NPORT; d++)
          req[i][d] = |mask_for(ADDR, f_mask(ff[i].data), port_e'(d));
      end
    end
  end

  // allocation state
  logic             alloc [NPORT];
  logic [NPORT-1:0] oset  [NPORT];
  logic [NPORT-1:0] busy;               // outputs held by some input
  logic [2:0]       owner [NPORT];      // input holding each output
  logic [2:0]       rr;                 // round-robin start
  logic [NPORT-1:0] rel_mask, gnt_mask;

  logic             grant [NPORT];
  logic [NPORT-1:0] claimed;
  always_comb begin
    claimed = busy;
    for (int i = 0; i < NPORT; i++) grant[i] = 1'b0;
    for (int k = 0; k < NPORT; k++) begin
      int i;
      i = (int'(rr) + k) % NPORT;
      if (fv[i] && ff[i].head && !alloc[i] && (req[i] & claimed) == '0) begin
        grant[i] = 1'b1;
        claimed  = claimed | req[i];
      end
    end
  end

  // transfer
  logic go [NPORT];
  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      go[i] = 1'b1;
      for (int o = 0; o < NPORT; o++)
        if (oset[i][o] && !out_ready[o]) go[i] = 1'b0;
      pop[i] = fv[i] && alloc[i] && go[i];
    end
    for (int o = 0; o < NPORT; o++) begin
      out_valid[o] = busy[o] && fv[owner[o]] && alloc[owner[o]] && go[owner[o]];
      out_flit[o]  = ff[owner[o]];
      if (ff[owner[o]].head && !ff[owner[o]].data[31])
        out_flit[o].data[29:14] = mask_for(ADDR, f_mask(ff[owner[o]].data), port_e'(o));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= '0;
      rr   <= '0;
      for (int i = 0; i < NPORT; i++) begin
        alloc[i] <= 1'b0;
        oset[i]  <= '0;
        owner[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NPORT; i++)
        if (pop[i] && ff[i].tail) alloc[i] <= 1'b0;
      for (int i = 0; i < NPORT; i++) begin
        if (grant[i]) begin
          alloc[i] <= 1'b1;
          oset[i]  <= req[i];
          for (int o = 0; o < NPORT; o++)
            if (req[i][o]) owner[o] <= 3'(i);
          rr <= (i == NPORT - 1) ? 3'd0 : 3'(i + 1);
        end
      end
      busy <= (busy & ~rel_mask) | gnt_mask;
    end
  end

  always_comb begin
    rel_mask = '0;
    gnt_mask = '0;
    for (int i = 0; i < NPORT; i++) begin
      if (pop[i] && ff[i].tail) rel_mask |= oset[i];
      if (grant[i])             gnt_mask |= req[i];
    end
  end

  // event flags for observation
  always_comb begin
    fork_pulse  = 1'b0;
    stall_pulse = 1'b0;
    for (int i = 0; i < NPORT; i++) begin
      if (pop[i] && ff[i].head && $countones(oset[i]) > 1) fork_pulse = 1'b1;
      if (fv[i] && alloc[i] && !go[i]) stall_pulse = 1'b1;
    end
  end

  // an output is never held by two inputs
  assert property (@(posedge clk) disable iff (!rst_n) (gnt_mask & busy) == '0)
    else $error("router: output granted while held");
endmodule
