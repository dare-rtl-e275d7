// dare_pe: one ReRAM processing element (PE) without its router.
//
// A PE holds N_TILE (4) tiles (the architecture's number). Towards the
// router it has one injection and one ejection port (the router's local port):
//  * Injection: the tiles' packet streams are merged packet by packet with a
//    round-robin arbiter; a tile keeps the port from its head flit to its
//    last flit, so packets are never interleaved (wormhole).
//  * Ejection: one drop_decoder turns arriving packets back into 16 rows,
//    zero where the key dropped a value, and hands them to the tile named in
//    the header.
// Both are this implementation's way of joining the tiles to the router.
// Configuration words carry a PE number and a tile number; the PE passes
// those addressed to it to that tile. rd_* reads one entry of a tile's
// receive buffer (for observation). Counters are summed over the tiles, plus
// the number of packets decoded here.
module dare_pe
  import dare_pkg::*;
#(
  parameter int unsigned PE_ID = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_valid,
  input  cfg_t              cfg,
  input  logic              stage_start,
  output logic              busy,
  // to the router's local input
  output logic              inj_valid,
  output flit_t             inj_flit,
  input  logic              inj_ready,
  // from the router's local output
  input  logic              ej_valid,
  input  flit_t             ej_flit,
  output logic              ej_ready,
  // observation
  input  logic [TILE_W-1:0] rd_tile,
  input  logic [IMA_W-1:0]  rd_ima,
  input  logic [ROW_W-1:0]  rd_row,
  output data_t             rd_data,
  output logic [31:0]       n_pkts,
  output logic [31:0]       n_body_sent,
  output logic [31:0]       n_body_dropped,
  output logic [31:0]       n_rx_pkts
);

  logic    t_valid [N_TILE];
  flit_t   t_flit  [N_TILE];
  logic    t_last  [N_TILE];
  logic    t_ready [N_TILE];
  logic    t_busy  [N_TILE];
  data_t   t_rd    [N_TILE];
  logic [31:0] t_pk [N_TILE], t_bs [N_TILE], t_bd [N_TILE];

  logic    rx_valid;
  header_t rx_hdr;
  data_t   rx_data [KEY_W];

  drop_decoder u_dec (
    .clk, .rst_n,
    .in_valid (ej_valid),
    .in_flit  (ej_flit),
    .in_ready (ej_ready),
    .out_valid(rx_valid),
    .out_hdr  (rx_hdr),
    .out_data (rx_data)
  );

  for (genvar t = 0; t < N_TILE; t++) begin : g_tile
    dare_tile #(.PE_ID(PE_ID), .TILE_ID(t)) u_tile (
      .clk, .rst_n,
      .cfg_valid     (cfg_valid && int'(cfg.pe) == PE_ID && int'(cfg.tile) == t),
      .cfg,
      .rx_valid      (rx_valid && int'(rx_hdr.dst_tile) == t),
      .rx_hdr,
      .rx_data,
      .stage_start,
      .busy          (t_busy[t]),
      .out_valid     (t_valid[t]),
      .out_flit      (t_flit[t]),
      .out_last      (t_last[t]),
      .out_ready     (t_ready[t]),
      .rd_ima,
      .rd_row,
      .rd_data       (t_rd[t]),
      .n_pkts        (t_pk[t]),
      .n_body_sent   (t_bs[t]),
      .n_body_dropped(t_bd[t])
    );
  end

  // ---------------- injection arbiter ----------------
  logic              locked;
  logic [TILE_W-1:0] sel, rr, pick;
  logic              any_req;

  always_comb begin
    any_req = 1'b0;
    pick    = rr;
    for (int k = N_TILE - 1; k >= 0; k--) begin
      int t;
      t = (int'(rr) + k) % int'(N_TILE);
      if (t_valid[t]) begin
        any_req = 1'b1;
        pick    = TILE_W'(t);
      end
    end
  end

  logic [TILE_W-1:0] cur;
  assign cur       = locked ? sel : pick;
  assign inj_valid = (locked || any_req) && t_valid[cur];
  assign inj_flit  = t_flit[cur];
  always_comb
    for (int t = 0; t < N_TILE; t++) t_ready[t] = (TILE_W'(t) == cur) && inj_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      sel    <= '0;
      rr     <= '0;
    end else if (inj_valid && inj_ready) begin
      if (t_last[cur]) begin
        locked <= 1'b0;
        rr     <= cur + 1'b1;
      end else begin
        locked <= 1'b1;
        sel    <= cur;
      end
    end
  end

  // ---------------- observation ----------------
  assign rd_data = t_rd[rd_tile];

  always_comb begin
    busy           = 1'b0;
    n_pkts         = '0;
    n_body_sent    = '0;
    n_body_dropped = '0;
    for (int t = 0; t < N_TILE; t++) begin
      busy           = busy | t_busy[t];
      n_pkts         = n_pkts + t_pk[t];
      n_body_sent    = n_body_sent + t_bs[t];
      n_body_dropped = n_body_dropped + t_bd[t];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_rx_pkts <= '0;
    else if (rx_valid) n_rx_pkts <= n_rx_pkts + 1;
  end

endmodule
