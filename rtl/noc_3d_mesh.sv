// noc_3d_mesh: the Drop-aware 3D network-on-chip, 36 routers in four planar
// tiers of 3x3. Inside a tier neighbouring routers are joined by planar links
// in x and y; routers at the same (x, y) in adjacent tiers are joined by
// vertical links (through-silicon vias in the stacked chip). Each link is a
// flit bus with valid/ready in both directions. The tier count, the 9 PEs per
// tier and the mesh follow the architecture; PE i sits at x = i mod 3,
// y = (i / 3) mod 3, z = i / 9, which is this implementation's numbering.
// Ports at the edge of the mesh are tied off (no flit ever routes there).
// Link latency is one clock (the input FIFO of the next router). Besides
// valid/ready each link carries back the free space of the receiving buffer,
// which the sending router's allocator needs.
module noc_3d_mesh
  import dare_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  inj_valid [N_PE],
  input  flit_t inj_flit  [N_PE],
  output logic  inj_ready [N_PE],
  output logic  ej_valid  [N_PE],
  output flit_t ej_flit   [N_PE],
  input  logic  ej_ready  [N_PE],
  output logic  idle
);

  logic  rin_valid  [N_PE][N_PORT];
  flit_t rin_flit   [N_PE][N_PORT];
  logic  rin_ready  [N_PE][N_PORT];
  logic  rout_valid [N_PE][N_PORT];
  flit_t rout_flit  [N_PE][N_PORT];
  logic  rout_ready [N_PE][N_PORT];
  logic [CNT_W-1:0] rin_free  [N_PE][N_PORT];
  logic [CNT_W-1:0] rout_free [N_PE][N_PORT];
  logic  ridle      [N_PE];

  // neighbour of PE n through port p, or -1 at the mesh edge
  function automatic int nbr(input int n, input int p);
    int x, y, z;
    x = int'(pe_x(n)); y = int'(pe_y(n)); z = int'(pe_z(n));
    case (p)
      int'(P_XP): x = x + 1;
      int'(P_XM): x = x - 1;
      int'(P_YP): y = y + 1;
      int'(P_YM): y = y - 1;
      int'(P_ZP): z = z + 1;
      int'(P_ZM): z = z - 1;
      default: return -1;
    endcase
    if (x < 0 || y < 0 || z < 0 || x >= int'(N_X) || y >= int'(N_Y) || z >= int'(N_Z)) return -1;
    return x + int'(N_X) * (y + int'(N_Y) * z);
  endfunction

  // the port on the neighbour that faces back
  function automatic int opp(input int p);
    case (p)
      int'(P_XP): return int'(P_XM);
      int'(P_XM): return int'(P_XP);
      int'(P_YP): return int'(P_YM);
      int'(P_YM): return int'(P_YP);
      int'(P_ZP): return int'(P_ZM);
      int'(P_ZM): return int'(P_ZP);
      default: return int'(P_LOCAL);
    endcase
  endfunction

  for (genvar n = 0; n < N_PE; n++) begin : g_r
    noc_router #(.X(pe_x(n)), .Y(pe_y(n)), .Z(pe_z(n))) u_router (
      .clk, .rst_n,
      .in_valid (rin_valid[n]),
      .in_flit  (rin_flit[n]),
      .in_ready (rin_ready[n]),
      .in_free  (rin_free[n]),
      .out_valid(rout_valid[n]),
      .out_flit (rout_flit[n]),
      .out_ready(rout_ready[n]),
      .out_free (rout_free[n]),
      .idle     (ridle[n])
    );

    assign rin_valid[n][P_LOCAL]  = inj_valid[n];
    assign rin_flit[n][P_LOCAL]   = inj_flit[n];
    assign inj_ready[n]           = rin_ready[n][P_LOCAL];
    assign ej_valid[n]            = rout_valid[n][P_LOCAL];
    assign ej_flit[n]             = rout_flit[n][P_LOCAL];
    assign rout_ready[n][P_LOCAL] = ej_ready[n];
    assign rout_free[n][P_LOCAL]  = CNT_W'(KEY_W + 1);   // the PE's decoder never holds a packet back

    for (genvar p = 1; p < N_PORT; p++) begin : g_p
      localparam int M = nbr(n, p);
      if (M < 0) begin : g_edge
        assign rin_valid[n][p]  = 1'b0;
        assign rin_flit[n][p]   = '0;
        assign rout_ready[n][p] = 1'b1;
        assign rout_free[n][p]  = '0;
      end else begin : g_link
        assign rin_valid[n][p]  = rout_valid[M][opp(p)];
        assign rin_flit[n][p]   = rout_flit[M][opp(p)];
        assign rout_ready[n][p] = rin_ready[M][opp(p)];
        assign rout_free[n][p]  = rin_free[M][opp(p)];
      end
    end
  end

  always_comb begin
    idle = 1'b1;
    for (int n = 0; n < N_PE; n++) if (!ridle[n]) idle = 1'b0;
  end

endmodule
