// dare_pe_tb: one PE (number 13, in the middle of tier 1) with its four tiles.
// Ejection side: packets built here with random keys arrive for different
// tiles, IMAs and row segments; every row of the addressed receive buffer must
// then hold the sent value or zero where the key dropped it, and other tiles
// must be untouched. Injection side: tiles 0 and 2 are given identity weights
// on their first 16 rows, inputs and drop probability 0.5 and run one stage;
// the merged stream towards the router, under random back-pressure, must be
// whole packets (never interleaved), 8 from each tile, each with the right
// source and with body values equal to the inputs at the kept positions
// (segment 0) or zero (other segments). Configuration words for other PEs
// must be ignored.
module dare_pe_tb;
  import dare_pkg::*;

  localparam int PE = 13;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  cfg_valid = 0;
  cfg_t  cfg;
  logic  stage_start = 0;
  logic  busy, inj_valid, inj_ready, ej_valid = 0, ej_ready;
  flit_t inj_flit, ej_flit;
  logic [TILE_W-1:0] rd_tile = 0;
  logic [IMA_W-1:0]  rd_ima = 0;
  logic [ROW_W-1:0]  rd_row = 0;
  data_t rd_data;
  logic [31:0] n_pkts, n_body_sent, n_body_dropped, n_rx_pkts;

  dare_pe #(.PE_ID(PE)) dut (.clk, .rst_n, .cfg_valid, .cfg, .stage_start, .busy,
    .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit, .ej_ready,
    .rd_tile, .rd_ima, .rd_row, .rd_data, .n_pkts, .n_body_sent, .n_body_dropped, .n_rx_pkts);

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endfunction

  task automatic cfg_write(input int pe, input int tile, input cfg_op_e op, input int ima,
                           input int row, input int col, input logic [63:0] d);
    @(negedge clk);
    cfg_valid = 1;
    cfg = '0;
    cfg.pe = PE_W'(pe); cfg.tile = TILE_W'(tile);
    cfg.op = op; cfg.ima = IMA_W'(ima); cfg.row = ROW_W'(row); cfg.col = ROW_W'(col); cfg.data = d;
    @(negedge clk);
    cfg_valid = 0;
  endtask

  task automatic rd(input int t, input int m, input int r, output data_t v);
    rd_tile = TILE_W'(t); rd_ima = IMA_W'(m); rd_row = ROW_W'(r);
    #1;
    v = rd_data;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // injection sink
  always @(posedge clk) inj_ready <= ($urandom_range(0, 2) != 0);
  typedef struct { header_t h; data_t body [$]; } pkt_t;
  pkt_t got [$];
  pkt_t cur;
  int left = -1;
  always @(negedge clk) if (rst_n && inj_valid && inj_ready) begin
    if (inj_flit.head) begin
      check(left <= 0, "packets interleaved");
      cur.h = header_t'(inj_flit.payload);
      cur.body.delete();
      left = popcount(cur.h.key);
      if (left == 0) got.push_back(cur);
    end else begin
      check(left > 0, "body outside a packet");
      cur.body.push_back(data_t'(inj_flit.payload[DATA_W-1:0]));
      left--;
      if (left == 0) got.push_back(cur);
    end
  end

  data_t xin [N_TILE][KEY_W];

  initial begin
    ej_flit = '0;
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- ejection: decode into the tiles ----
    for (int n = 0; n < 24; n++) begin
      header_t h;
      data_t v [KEY_W];
      int t;
      t = n % N_TILE;
      h = '0;
      h.dest = pe_mask_t'(64'(1) << PE);
      h.dst_tile = TILE_W'(t);
      h.dst_ima = IMA_W'($urandom_range(0, N_IMA - 1));
      h.dst_seg = SEG_W'($urandom);
      h.key = (n == 5) ? 16'h0 : key_t'($urandom);
      for (int i = 0; i < KEY_W; i++) v[i] = data_t'($urandom | 1);
      @(negedge clk);
      check(ej_ready, "ejection always ready");
      ej_valid = 1; ej_flit.head = 1; ej_flit.payload = h;
      for (int i = 0; i < KEY_W; i++) if (h.key[i]) begin
        @(negedge clk);
        ej_flit.head = 0; ej_flit.payload = PAY_W'($unsigned(v[i]));
      end
      @(negedge clk);
      ej_valid = 0;
      @(negedge clk);
      for (int i = 0; i < KEY_W; i++) begin
        data_t rv;
        rd(t, h.dst_ima, h.dst_seg * KEY_W + i, rv);
        check(rv == (h.key[i] ? v[i] : data_t'(0)),
              $sformatf("pkt %0d tile %0d row %0d", n, t, h.dst_seg * KEY_W + i));
      end
      if (n < N_TILE - 1) begin
        data_t rv;
        rd(t + 1, h.dst_ima, h.dst_seg * KEY_W, rv);
        check(rv == 0, "next tile untouched");
      end
    end
    check(n_rx_pkts == 24, "decoded packet count");
    // ---- injection: tiles 0 and 2 send ----
    for (int k = 0; k < 2; k++) begin
      int t;
      t = 2 * k;
      for (int i = 0; i < KEY_W; i++) begin
        cfg_write(PE, t, CFG_WEIGHT, 0, i, i, 64'h100);     // 1.0 in Q8.8
        xin[t][i] = data_t'($signed($urandom_range(0, 4095)) - 2048);
        cfg_write(PE, t, CFG_INPUT, 0, i, 0, 64'($unsigned(xin[t][i])));
      end
      cfg_write(PE, t, CFG_DEST, 0, 0, 0, 64'(1) << 3);
      cfg_write(PE, t, CFG_DROP, 0, 0, 0, 64'h18);
      cfg_write(PE, t, CFG_LFSR, 0, 0, 0, {32'd0, 16'hB400, 16'(t + 99)});
      cfg_write(PE, t, CFG_IMA_EN, 0, 0, 0, 64'h1);
    end
    cfg_write(PE + 1, 1, CFG_IMA_EN, 0, 0, 0, 64'h1);        // another PE: ignored
    // a first stage consumes (and clears) what the ejection test left in the buffers
    @(negedge clk); stage_start = 1;
    @(negedge clk); stage_start = 0;
    while (busy) @(negedge clk);
    // inputs were consumed and cleared; now the real stage
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < KEY_W; i++) cfg_write(PE, 2 * k, CFG_INPUT, 0, i, 0, 64'($unsigned(xin[2 * k][i])));
    got.delete();
    @(negedge clk); stage_start = 1;
    @(negedge clk); stage_start = 0;
    while (busy || inj_valid || left > 0) @(negedge clk);
    begin
      int per_tile [N_TILE];
      per_tile = '{default: 0};
      check(got.size() == 2 * N_SEG, $sformatf("%0d packets", got.size()));
      foreach (got[p]) begin
        int t, j;
        t = int'(got[p].h.src_tile);
        per_tile[t]++;
        check(got[p].h.src_pe == PE_W'(PE), "source PE");
        check(got[p].h.dest == pe_mask_t'(64'(1) << 3), "destination");
        check(t == 0 || t == 2, "only enabled tiles send");
        j = 0;
        for (int i = 0; i < KEY_W; i++) if (got[p].h.key[i]) begin
          check(got[p].body[j] == ((got[p].h.dst_seg == 0) ? xin[t][i] : data_t'(0)),
                $sformatf("tile %0d seg %0d value %0d", t, got[p].h.dst_seg, i));
          j++;
        end
      end
      check(per_tile[0] == N_SEG && per_tile[2] == N_SEG, "8 packets from each sending tile");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
