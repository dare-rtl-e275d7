// noc_router: one router of the Drop-aware 3D mesh, with tree-based multicast.
//
// Seven ports: local (the PE), +x, -x, +y, -y in the tier, and +z, -z over the
// vertical links to the tiers above and below. Packets are wormhole-switched.
// What is the architecture's: variable-length packets whose number of body
// flits is the number of ones in the key carried by the head flit, a 3D mesh
// and tree-based multicast. What is this implementation's:
//  * Routing is dimension-ordered (x, then y, then z). The head flit carries
//    a destination bit mask over all 36 PEs. For each output port the router
//    keeps the destinations that are reached through that port, so a packet
//    forks into a tree; each branch gets a copy of the head flit whose mask
//    holds only the destinations down that branch.
//  * An input FIFO per port that holds one whole packet (17 flits), one
//    virtual channel, and virtual cut-through allocation: a waiting head flit
//    gets all the output ports it needs in one step or none (round-robin
//    among inputs), and only when the input buffer behind every one of them
//    has room for the whole packet (head + popcount(key) flits, known from
//    the key). It keeps them until its last body flit has passed. Each
//    branch of a fork moves on its own; the flit leaves the input FIFO when
//    every branch has taken it. Because a granted packet can never block
//    halfway, the branches of a multicast tree cannot wait on each other,
//    which plain wormhole multicast can (deadlock).
//  * A head whose destination mask reaches no port (empty mask) is discarded
//    together with its body flits.
//
// Timing: a head flit at the front of an input FIFO is allocated in one clock
// and leaves in the next; body flits follow at one per clock. out_valid never
// depends on out_ready, and a flit stays stable while it waits.
module noc_router
  import dare_pkg::*;
#(
  parameter int unsigned X = 0,
  parameter int unsigned Y = 0,
  parameter int unsigned Z = 0,
  parameter int unsigned FIFO_DEPTH = 1 + KEY_W
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [N_PORT],
  input  flit_t in_flit   [N_PORT],
  output logic  in_ready  [N_PORT],
  output logic [CNT_W-1:0] in_free [N_PORT],  // free input-buffer slots

  output logic  out_valid [N_PORT],
  output flit_t out_flit  [N_PORT],
  input  logic  out_ready [N_PORT],
  input  logic [CNT_W-1:0] out_free [N_PORT], // free slots behind each output
  output logic  idle                 // no flit buffered, no packet in flight
);

  typedef logic [N_PORT-1:0] pmask_t;
  localparam int unsigned PW = $clog2(N_PORT);

  // ---------------- input buffers ----------------
  flit_t  fhead  [N_PORT];
  logic   fempty [N_PORT];
  logic   ffull  [N_PORT];
  logic   fpop   [N_PORT];
  logic [$clog2(FIFO_DEPTH+1)-1:0] ffree [N_PORT];

  for (genvar i = 0; i < N_PORT; i++) begin : g_in
    flit_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push (in_valid[i]),
      .din  (in_flit[i]),
      .pop  (fpop[i]),
      .dout (fhead[i]),
      .empty(fempty[i]),
      .full (ffull[i]),
      .free (ffree[i])
    );
    assign in_ready[i] = !ffull[i];
    assign in_free[i]  = (int'(ffree[i]) > int'(KEY_W)) ? CNT_W'(KEY_W + 1) : CNT_W'(ffree[i]);
  end

  // ---------------- route computation ----------------
  // reach[o]: the PEs whose dimension-ordered route leaves through port o.
  pe_mask_t reach [N_PORT];
  always_comb begin
    for (int o = 0; o < N_PORT; o++) reach[o] = '0;
    for (int d = 0; d < N_PE; d++) begin
      if      (pe_x(d) > X) reach[P_XP][d] = 1'b1;
      else if (pe_x(d) < X) reach[P_XM][d] = 1'b1;
      else if (pe_y(d) > Y) reach[P_YP][d] = 1'b1;
      else if (pe_y(d) < Y) reach[P_YM][d] = 1'b1;
      else if (pe_z(d) > Z) reach[P_ZP][d] = 1'b1;
      else if (pe_z(d) < Z) reach[P_ZM][d] = 1'b1;
      else                  reach[P_LOCAL][d] = 1'b1;
    end
  end

  header_t fhdr [N_PORT];
  pmask_t  req  [N_PORT];
  pmask_t  room [N_PORT];   // outputs with space for the whole packet
  always_comb begin
    for (int i = 0; i < N_PORT; i++) begin
      fhdr[i] = header_t'(fhead[i].payload);
      for (int o = 0; o < N_PORT; o++) begin
        req[i][o]  = |(fhdr[i].dest & reach[o]);
        room[i][o] = (CNT_W + 1)'(out_free[o]) >= (CNT_W + 1)'(popcount(fhdr[i].key)) + 1'b1;
      end
    end
  end

  // ---------------- per-input packet state ----------------
  logic               active [N_PORT];
  pmask_t             omask  [N_PORT];   // output ports held by the packet
  pmask_t             done   [N_PORT];   // branches that took the current flit
  logic [CNT_W-1:0]   left   [N_PORT];   // body flits still to come
  logic               olock  [N_PORT];   // output port held
  logic [PW-1:0]      owner  [N_PORT];   // by which input
  logic [PW-1:0]      rr;                // round-robin start

  // ---------------- allocation ----------------
  logic   grant [N_PORT];
  logic   discard [N_PORT];              // stray body flit at an idle input
  logic [PW-1:0] last_grant;
  logic   any_grant;
  always_comb begin
    pmask_t taken;
    logic [PW-1:0] i;
    for (int o = 0; o < N_PORT; o++) taken[o] = olock[o];
    any_grant  = 1'b0;
    last_grant = rr;
    for (int k = 0; k < N_PORT; k++) begin
      grant[k]   = 1'b0;
      discard[k] = !fempty[k] && !active[k] && !fhead[k].head;
    end
    for (int k = 0; k < N_PORT; k++) begin
      i = PW'((int'(rr) + k) % int'(N_PORT));
      if (!fempty[i] && !active[i] && fhead[i].head && ((req[i] & taken) == '0)
          && ((req[i] & ~room[i]) == '0)) begin
        grant[i]   = 1'b1;
        taken      = taken | req[i];
        any_grant  = 1'b1;
        last_grant = i;
      end
    end
  end

  // ---------------- switch traversal ----------------
  logic   fire [N_PORT];
  pmask_t fired_by [N_PORT];             // per input: branches taking a flit now
  logic   all_sent [N_PORT];
  header_t branch_hdr [N_PORT];           // head flit as sent down branch o
  always_comb begin
    for (int o = 0; o < N_PORT; o++) begin
      branch_hdr[o]      = fhdr[owner[o]];
      branch_hdr[o].dest = fhdr[owner[o]].dest & reach[o];
      out_valid[o] = olock[o] && active[owner[o]] && !fempty[owner[o]] && !done[owner[o]][o];
      out_flit[o].head    = fhead[owner[o]].head;
      out_flit[o].payload = fhead[owner[o]].head ? PAY_W'(branch_hdr[o]) : fhead[owner[o]].payload;
      fire[o] = out_valid[o] && out_ready[o];
    end
    for (int i = 0; i < N_PORT; i++) begin
      fired_by[i] = '0;
      for (int o = 0; o < N_PORT; o++)
        if (fire[o] && (int'(owner[o]) == i)) fired_by[i][o] = 1'b1;
      all_sent[i] = active[i] && !fempty[i] && (((done[i] | fired_by[i]) & omask[i]) == omask[i]);
      fpop[i]     = all_sent[i] || discard[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      for (int i = 0; i < N_PORT; i++) begin
        active[i] <= 1'b0;
        omask[i]  <= '0;
        done[i]   <= '0;
        left[i]   <= '0;
        olock[i]  <= 1'b0;
        owner[i]  <= '0;
      end
    end else begin
      if (any_grant) rr <= (last_grant == PW'(N_PORT - 1)) ? '0 : last_grant + 1'b1;
      for (int i = 0; i < N_PORT; i++) begin
        if (grant[i]) begin
          active[i] <= 1'b1;
          omask[i]  <= req[i];
          done[i]   <= '0;
          left[i]   <= popcount(fhdr[i].key);
          for (int o = 0; o < N_PORT; o++)
            if (req[i][o]) begin
              olock[o] <= 1'b1;
              owner[o] <= PW'(i);
            end
        end else if (all_sent[i]) begin
          done[i] <= '0;
          if (!fhead[i].head) left[i] <= left[i] - 1'b1;
          if ((fhead[i].head && left[i] == 0) || (!fhead[i].head && left[i] == 1)) begin
            active[i] <= 1'b0;
            for (int o = 0; o < N_PORT; o++)
              if (omask[i][o]) olock[o] <= 1'b0;
          end
        end else if (active[i]) begin
          done[i] <= done[i] | fired_by[i];
        end
      end
    end
  end

  always_comb begin
    idle = 1'b1;
    for (int i = 0; i < N_PORT; i++) if (!fempty[i] || active[i]) idle = 1'b0;
  end

  // A flit offered on an output stays offered, unchanged, until taken.
  for (genvar o = 0; o < N_PORT; o++) begin : g_chk
    a_hold : assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[o] && !out_ready[o] |=> out_valid[o] && $stable(out_flit[o]));
  end

endmodule
