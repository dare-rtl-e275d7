// dare_tile: one ReRAM tile with its DropLayer packet source.
//
// A tile holds N_IMA (12) IMAs, one 16-bit reconfigurable LFSR and the
// peripheral control; so much is the architecture's. The control here is this
// implementation's and works in pipeline stages:
//  * Receive: decoded packets from the PE (16 rows of one IMA's input, with
//    dropped rows already zero) are written into the receive buffer; the
//    configuration bus can write it too (the first layer's input).
//  * stage_start: the IMAs latch the receive buffer as their input vectors
//    and it is cleared for the next stage; every IMA enabled in ima_en starts its
//    matrix-vector product.
//  * Send: once the products are done, for each enabled IMA m and each group
//    s of 16 output columns the tile draws a fresh key from the LFSR and sends
//    a packet carrying outputs 16s..16s+15 (those with key bit 1) to
//    destination rows 16s..16s+15 of IMA m of tile dst_tile in every PE of the
//    destination mask. So output column j of a layer feeds crossbar row j of
//    the next layer; which PEs and tile hold that layer is configuration (the
//    offline mapping).
// Configuration (cfg_valid with a cfg_t already addressed to this tile):
// weights, inputs, destination set, drop probability and enable, LFSR seed
// and taps, enabled IMAs. Reset state: no IMA enabled, drop disabled.
// Counters: packets sent, body flits sent, body flits dropped.
// Timing: a packet costs 17 clocks to draw its key plus 1 + popcount(key)
// clocks to send when the NoC does not stall.
module dare_tile
  import dare_pkg::*;
#(
  parameter int unsigned PE_ID   = 0,
  parameter int unsigned TILE_ID = 0,
  parameter int unsigned NIMA    = N_IMA
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_valid,
  input  cfg_t              cfg,
  input  logic              rx_valid,
  input  header_t           rx_hdr,
  input  data_t             rx_data [KEY_W],
  input  logic              stage_start,
  output logic              busy,
  output logic              out_valid,
  output flit_t             out_flit,
  output logic              out_last,
  input  logic              out_ready,
  input  logic [IMA_W-1:0]  rd_ima,
  input  logic [ROW_W-1:0]  rd_row,
  output data_t             rd_data,
  output logic [31:0]       n_pkts,
  output logic [31:0]       n_body_sent,
  output logic [31:0]       n_body_dropped
);

  // ---------------- configuration registers ----------------
  pe_mask_t          dest_q;
  logic [TILE_W-1:0] dst_tile_q;
  logic [PROB_W-1:0] thr_q;
  logic              drop_en_q;
  logic [NIMA-1:0]   ima_en_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dest_q     <= '0;
      dst_tile_q <= '0;
      thr_q      <= '0;
      drop_en_q  <= 1'b0;
      ima_en_q   <= '0;
    end else if (cfg_valid) begin
      case (cfg.op)
        CFG_DEST: begin
          dest_q     <= cfg.data[N_PE-1:0];
          dst_tile_q <= cfg.data[N_PE +: TILE_W];
        end
        CFG_DROP: begin
          thr_q     <= cfg.data[PROB_W-1:0];
          drop_en_q <= cfg.data[PROB_W];
        end
        CFG_IMA_EN: ima_en_q <= cfg.data[NIMA-1:0];
        default: ;
      endcase
    end
  end

  // ---------------- receive buffer and IMAs ----------------
  data_t rxbuf  [NIMA][XBAR_N];
  data_t ima_out[NIMA][XBAR_N];
  logic  ima_busy [NIMA];
  logic  ima_done [NIMA];
  logic  ima_start;

  typedef enum logic [2:0] {S_IDLE, S_COMP, S_KEY, S_WAITKEY, S_SEND, S_NEXT} state_e;
  state_e st;

  assign ima_start = (st == S_IDLE) && stage_start && (ima_en_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NIMA; m++)
        for (int r = 0; r < XBAR_N; r++) begin
          rxbuf[m][r] <= '0;
        end
    end else begin
      if (ima_start) begin
        for (int m = 0; m < NIMA; m++)
          for (int r = 0; r < XBAR_N; r++) rxbuf[m][r] <= '0;
      end
      if (rx_valid && int'(rx_hdr.dst_ima) < NIMA)
        for (int i = 0; i < KEY_W; i++)
          rxbuf[rx_hdr.dst_ima][int'(rx_hdr.dst_seg) * KEY_W + i] <= rx_data[i];
      if (cfg_valid && cfg.op == CFG_INPUT && int'(cfg.ima) < NIMA)
        rxbuf[cfg.ima][cfg.row] <= data_t'(cfg.data[DATA_W-1:0]);
    end
  end

  assign rd_data = (int'(rd_ima) < NIMA) ? rxbuf[rd_ima][rd_row] : '0;

  for (genvar m = 0; m < NIMA; m++) begin : g_ima
    reram_ima u_ima (
      .clk, .rst_n,
      .wr_en  (cfg_valid && cfg.op == CFG_WEIGHT && int'(cfg.ima) == m),
      .wr_row (cfg.row),
      .wr_col (cfg.col),
      .wr_data(data_t'(cfg.data[DATA_W-1:0])),
      .start  (ima_start && ima_en_q[m]),
      .in_vec (rxbuf[m]),    // latched by the IMA at start
      .busy   (ima_busy[m]),
      .done   (ima_done[m]),
      .out_vec(ima_out[m])
    );
  end

  // ---------------- key generation ----------------
  logic key_gen, key_busy, key_valid;
  key_t key;

  drop_lfsr u_lfsr (
    .clk, .rst_n,
    .cfg_load (cfg_valid && cfg.op == CFG_LFSR),
    .seed     (cfg.data[KEY_W-1:0]),
    .taps     (cfg.data[2*KEY_W-1:KEY_W]),
    .thr      (thr_q),
    .drop_en  (drop_en_q),
    .gen      (key_gen),
    .busy     (key_busy),
    .key_valid(key_valid),
    .key      (key)
  );

  // ---------------- packet sequencing ----------------
  logic [IMA_W-1:0] m_q;       // IMA being sent
  logic [SEG_W-1:0] s_q;       // 16-column group being sent
  logic             pk_start, pk_busy;
  header_t          pk_hdr;
  data_t            pk_data [KEY_W];
  logic             any_ima_busy;

  always_comb begin
    any_ima_busy = 1'b0;
    for (int m = 0; m < NIMA; m++) if (ima_busy[m]) any_ima_busy = 1'b1;
    pk_hdr          = '0;
    pk_hdr.dest     = dest_q;
    pk_hdr.src_pe   = PE_W'(PE_ID);
    pk_hdr.src_tile = TILE_W'(TILE_ID);
    pk_hdr.dst_tile = dst_tile_q;
    pk_hdr.dst_ima  = m_q;
    pk_hdr.dst_seg  = s_q;
    pk_hdr.key      = key;
    for (int i = 0; i < KEY_W; i++)
      pk_data[i] = ima_out[(int'(m_q) < NIMA) ? int'(m_q) : 0][int'(s_q) * KEY_W + i];
  end

  assign key_gen  = (st == S_KEY) && !key_busy;
  assign pk_start = (st == S_WAITKEY) && key_valid;
  assign busy     = (st != S_IDLE);

  // next enabled IMA after m (or NIMA if none)
  function automatic int next_ima(input int m, input logic [NIMA-1:0] en);
    for (int k = m + 1; k < NIMA; k++) if (en[k]) return k;
    return NIMA;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st             <= S_IDLE;
      m_q            <= '0;
      s_q            <= '0;
      n_pkts         <= '0;
      n_body_sent    <= '0;
      n_body_dropped <= '0;
    end else begin
      case (st)
        S_IDLE: if (ima_start) st <= S_COMP;
        S_COMP: if (!any_ima_busy && !ima_start) begin
          m_q <= IMA_W'(next_ima(-1, ima_en_q));
          s_q <= '0;
          st  <= S_KEY;
        end
        S_KEY:     if (!key_busy) st <= S_WAITKEY;
        S_WAITKEY: if (key_valid) begin
          st             <= S_SEND;
          n_pkts         <= n_pkts + 1;
          n_body_sent    <= n_body_sent + 32'(popcount(key));
          n_body_dropped <= n_body_dropped + KEY_W - 32'(popcount(key));
        end
        S_SEND: if (!pk_busy && !pk_start) st <= S_NEXT;
        S_NEXT: begin
          if (s_q == SEG_W'(N_SEG - 1)) begin
            s_q <= '0;
            if (next_ima(int'(m_q), ima_en_q) >= NIMA) st <= S_IDLE;
            else begin
              m_q <= IMA_W'(next_ima(int'(m_q), ima_en_q));
              st  <= S_KEY;
            end
          end else begin
            s_q <= s_q + 1'b1;
            st  <= S_KEY;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  drop_packetizer u_pkt (
    .clk, .rst_n,
    .start    (pk_start),
    .hdr      (pk_hdr),
    .data     (pk_data),
    .busy     (pk_busy),
    .out_valid,
    .out_flit,
    .out_last,
    .out_ready
  );

endmodule
