// dare_top: the DropLayer-aware ReRAM manycore: 36 PEs (4 tiers of 3x3, 4
// tiles each) on the Drop-aware 3D mesh NoC with tree-based multicast.
//
// Operation is in pipeline stages, as in pipelined GNN training where every
// layer (vertex sub-layers on weight PEs, edge sub-layers on the PEs holding
// the adjacency matrix) works at the same time on different data:
//  1. Configure through cfg_valid/cfg: weights, first-layer inputs, for each
//     tile the destination PEs/tile of its outputs, the drop probability and
//     the LFSR seed. Placement is decided offline (the architecture uses
//     simulated annealing for it); this chip only takes the result.
//  2. Pulse stage_start: every tile with enabled IMAs runs its products on the
//     data received in the previous stage and sends its outputs as
//     DropLayer packets. Dropped values are never sent; receivers rebuild them
//     as zeros from the key in the head flit.
//  3. Wait until busy is low (all tiles done, NoC empty), then start the next
//     stage.
// The stage controller and the configuration bus are this implementation's
// (the architecture does not describe them). rd_* reads a receive-buffer
// entry of any tile; the counters are summed over the chip.
module dare_top
  import dare_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_valid,
  input  cfg_t              cfg,
  input  logic              stage_start,
  output logic              busy,
  input  logic [PE_W-1:0]   rd_pe,
  input  logic [TILE_W-1:0] rd_tile,
  input  logic [IMA_W-1:0]  rd_ima,
  input  logic [ROW_W-1:0]  rd_row,
  output data_t             rd_data,
  output logic [31:0]       n_pkts,
  output logic [31:0]       n_body_sent,
  output logic [31:0]       n_body_dropped,
  output logic [31:0]       n_rx_pkts
);

  logic  inj_valid [N_PE];
  flit_t inj_flit  [N_PE];
  logic  inj_ready [N_PE];
  logic  ej_valid  [N_PE];
  flit_t ej_flit   [N_PE];
  logic  ej_ready  [N_PE];
  logic  noc_idle;

  logic        pe_busy [N_PE];
  data_t       pe_rd   [N_PE];
  logic [31:0] pe_pk [N_PE], pe_bs [N_PE], pe_bd [N_PE], pe_rx [N_PE];

  noc_3d_mesh u_noc (
    .clk, .rst_n,
    .inj_valid, .inj_flit, .inj_ready,
    .ej_valid,  .ej_flit,  .ej_ready,
    .idle(noc_idle)
  );

  for (genvar n = 0; n < N_PE; n++) begin : g_pe
    dare_pe #(.PE_ID(n)) u_pe (
      .clk, .rst_n,
      .cfg_valid,
      .cfg,
      .stage_start,
      .busy          (pe_busy[n]),
      .inj_valid     (inj_valid[n]),
      .inj_flit      (inj_flit[n]),
      .inj_ready     (inj_ready[n]),
      .ej_valid      (ej_valid[n]),
      .ej_flit       (ej_flit[n]),
      .ej_ready      (ej_ready[n]),
      .rd_tile,
      .rd_ima,
      .rd_row,
      .rd_data       (pe_rd[n]),
      .n_pkts        (pe_pk[n]),
      .n_body_sent   (pe_bs[n]),
      .n_body_dropped(pe_bd[n]),
      .n_rx_pkts     (pe_rx[n])
    );
  end

  // busy also covers the clock after stage_start and the last flit in a
  // decoder, so a stage never looks finished too early.
  logic start_q, any_busy, ej_any;
  always_comb begin
    any_busy = 1'b0;
    ej_any   = 1'b0;
    for (int n = 0; n < N_PE; n++) begin
      any_busy = any_busy | pe_busy[n];
      ej_any   = ej_any | ej_valid[n];
    end
  end

  logic ej_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= 1'b0;
      ej_q    <= 1'b0;
    end else begin
      start_q <= stage_start;
      ej_q    <= ej_any;
    end
  end

  assign busy    = any_busy || !noc_idle || start_q || ej_q;
  assign rd_data = (int'(rd_pe) < N_PE) ? pe_rd[rd_pe] : '0;

  always_comb begin
    n_pkts         = '0;
    n_body_sent    = '0;
    n_body_dropped = '0;
    n_rx_pkts      = '0;
    for (int n = 0; n < N_PE; n++) begin
      n_pkts         = n_pkts + pe_pk[n];
      n_body_sent    = n_body_sent + pe_bs[n];
      n_body_dropped = n_body_dropped + pe_bd[n];
      n_rx_pkts      = n_rx_pkts + pe_rx[n];
    end
  end

endmodule
