// dare_top_tb: the whole 36-PE chip at its full size, through two pipeline
// stages of a small GNN-style layer chain.
//  Stage 1 (vertex layer, with DropLayer 0.3): PE 0 / tile 0 / IMA 0 holds
//    sparse weights W1 and the input x. Its 128 outputs are multicast to
//    PE 4 and PE 31 (tile 1, IMA 0); PE 31 is two tiers up, so the packets
//    cross vertical links.
//  Stage 2: PE 4 / tile 1 (drop disabled, full packets) and PE 31 / tile 1
//    (DropLayer 0.5) both send to PE 35 (tiles 3 and 2): a many-to-few pattern
//    that makes packets wait for each other in the NoC.
// The testbench computes the products and the LFSR keys itself and checks
// every row that arrives at PEs 4, 31 and 35: the value where the key kept
// it, zero where it dropped it. It counts the mechanisms the design has
// (dropped values, multicast deliveries, vertical-link flits, full NoDrop
// packets, heads waiting in a router for a busy output) and fails if one never
// happened. The top is used with its default parameters.
module dare_top_tb;
  import dare_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  cfg_valid = 0;
  cfg_t  cfg;
  logic  stage_start = 0;
  logic  busy;
  logic [PE_W-1:0]   rd_pe = 0;
  logic [TILE_W-1:0] rd_tile = 0;
  logic [IMA_W-1:0]  rd_ima = 0;
  logic [ROW_W-1:0]  rd_row = 0;
  data_t rd_data;
  logic [31:0] n_pkts, n_body_sent, n_body_dropped, n_rx_pkts;

  dare_top dut (.clk, .rst_n, .cfg_valid, .cfg, .stage_start, .busy,
                .rd_pe, .rd_tile, .rd_ima, .rd_row, .rd_data,
                .n_pkts, .n_body_sent, .n_body_dropped, .n_rx_pkts);

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

  task automatic rd(input int pe, input int t, input int m, input int r, output data_t v);
    rd_pe = PE_W'(pe); rd_tile = TILE_W'(t); rd_ima = IMA_W'(m); rd_row = ROW_W'(r);
    #1;
    v = rd_data;
  endtask

  // ---------------- reference models ----------------
  typedef data_t mat_t [XBAR_N][XBAR_N];
  typedef data_t vec_t [XBAR_N];
  mat_t W1, W2, W3;
  vec_t x0, y1, x1, y2, y3;

  function automatic data_t dot(input vec_t x, input mat_t w, input int c);
    longint acc;
    acc = 0;
    for (int r = 0; r < XBAR_N; r++) acc += longint'(x[r]) * longint'(w[r][c]);
    acc = acc >>> FRAC_W;
    if (acc > 32767) return 16'sh7fff;
    if (acc < -32768) return 16'sh8000;
    return data_t'(acc);
  endfunction

  function automatic key_t lfsr_key(inout logic [15:0] st, input int thr, input bit en);
    key_t k;
    for (int b = 0; b < KEY_W; b++) begin
      for (int j = 0; j < 4; j++) st = {st[14:0], ^(st & 16'hB400)};
      k[b] = !en || (int'(st[3:0]) >= thr);
    end
    return k;
  endfunction

  task automatic load_weights(input int pe, input int t, inout mat_t w);
    foreach (w[r, c]) w[r][c] = '0;
    for (int c = 0; c < XBAR_N; c++)
      for (int n = 0; n < 3; n++) begin
        int r;
        r = $urandom_range(0, XBAR_N - 1);
        w[r][c] = data_t'($signed($urandom_range(0, 1023)) - 512);
        cfg_write(pe, t, CFG_WEIGHT, 0, r, c, 64'($unsigned(w[r][c])));
      end
  endtask

  // ---------------- mechanism counters ----------------
  int n_vertical = 0, n_head_wait = 0;
  for (genvar n = 0; n < N_PE; n++) begin : g_mon
    always @(posedge clk) begin
      for (int o = 5; o < N_PORT; o++)
        if (dut.u_noc.g_r[n].u_router.out_valid[o] && dut.u_noc.g_r[n].u_router.out_ready[o]) n_vertical++;
      for (int i = 0; i < N_PORT; i++)
        if (!dut.u_noc.g_r[n].u_router.fempty[i] && !dut.u_noc.g_r[n].u_router.active[i]
            && dut.u_noc.g_r[n].u_router.fhead[i].head && !dut.u_noc.g_r[n].u_router.grant[i]) n_head_wait++;
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] st0, st4, st31;
    key_t k;
    data_t v;
    int n_kept1, n_drop1, n_drop3, cyc1, cyc2;
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- layer 1 on PE 0 / tile 0 ----
    load_weights(0, 0, W1);
    for (int r = 0; r < XBAR_N; r++) begin
      x0[r] = data_t'($signed($urandom_range(0, 2047)) - 1024);
      cfg_write(0, 0, CFG_INPUT, 0, r, 0, 64'($unsigned(x0[r])));
    end
    cfg_write(0, 0, CFG_DEST, 0, 0, 0, {26'd0, 2'd1, pe_mask_t'((64'(1) << 4) | (64'(1) << 31))});
    cfg_write(0, 0, CFG_DROP, 0, 0, 0, 64'h15);                      // 0.3 -> thr 5
    cfg_write(0, 0, CFG_LFSR, 0, 0, 0, {32'd0, 16'hB400, 16'h0A11});
    cfg_write(0, 0, CFG_IMA_EN, 0, 0, 0, 64'h1);
    st0 = 16'h0A11;
    // ---- layer 2 on PE 4 / tile 1 (no drop) and layer 3 on PE 31 / tile 1 ----
    load_weights(4, 1, W2);
    load_weights(31, 1, W3);
    cfg_write(4, 1, CFG_DEST, 0, 0, 0, {26'd0, 2'd3, pe_mask_t'(64'(1) << 35)});
    cfg_write(4, 1, CFG_DROP, 0, 0, 0, 64'h05);                      // drop disabled
    cfg_write(4, 1, CFG_LFSR, 0, 0, 0, {32'd0, 16'hB400, 16'h0004});
    st4 = 16'h0004;
    cfg_write(31, 1, CFG_DEST, 0, 0, 0, {26'd0, 2'd2, pe_mask_t'(64'(1) << 35)});
    cfg_write(31, 1, CFG_DROP, 0, 0, 0, 64'h18);                     // 0.5 -> thr 8
    cfg_write(31, 1, CFG_LFSR, 0, 0, 0, {32'd0, 16'hB400, 16'h0031});
    st31 = 16'h0031;

    // ---- stage 1 ----
    for (int c = 0; c < XBAR_N; c++) y1[c] = dot(x0, W1, c);
    @(negedge clk); stage_start = 1;
    @(negedge clk); stage_start = 0;
    cyc1 = 1;
    while (busy) begin @(negedge clk); cyc1++; end
    n_kept1 = 0; n_drop1 = 0;
    for (int s = 0; s < N_SEG; s++) begin
      k = lfsr_key(st0, 5, 1'b1);
      for (int i = 0; i < KEY_W; i++) begin
        int r;
        r = s * KEY_W + i;
        x1[r] = k[i] ? y1[r] : data_t'(0);
        if (k[i]) n_kept1++; else n_drop1++;
        rd(4, 1, 0, r, v);
        check(v == x1[r], $sformatf("stage 1: PE 4 row %0d got %0d want %0d", r, v, x1[r]));
        rd(31, 1, 0, r, v);
        check(v == x1[r], $sformatf("stage 1: PE 31 row %0d got %0d want %0d", r, v, x1[r]));
      end
    end
    check(n_pkts == N_SEG, "stage 1 packets sent");
    check(n_rx_pkts == 2 * N_SEG, "stage 1: every packet delivered to both PEs");
    check(n_body_dropped == 32'(n_drop1), "dropped count matches the keys");
    check(n_body_sent == 32'(n_kept1), "sent count matches the keys");

    // ---- stage 2 ----
    cfg_write(0, 0, CFG_IMA_EN, 0, 0, 0, 64'h0);
    cfg_write(4, 1, CFG_IMA_EN, 0, 0, 0, 64'h1);
    cfg_write(31, 1, CFG_IMA_EN, 0, 0, 0, 64'h1);
    for (int c = 0; c < XBAR_N; c++) begin
      y2[c] = dot(x1, W2, c);
      y3[c] = dot(x1, W3, c);
    end
    @(negedge clk); stage_start = 1;
    @(negedge clk); stage_start = 0;
    cyc2 = 1;
    while (busy) begin @(negedge clk); cyc2++; end
    n_drop3 = 0;
    for (int s = 0; s < N_SEG; s++) begin
      key_t k4, k31;
      k4  = lfsr_key(st4, 5, 1'b0);
      k31 = lfsr_key(st31, 8, 1'b1);
      check(k4 == 16'hFFFF, "NoDrop key");
      for (int i = 0; i < KEY_W; i++) begin
        int r;
        r = s * KEY_W + i;
        rd(35, 3, 0, r, v);
        check(v == y2[r], $sformatf("stage 2: PE 35 tile 3 row %0d got %0d want %0d", r, v, y2[r]));
        rd(35, 2, 0, r, v);
        check(v == (k31[i] ? y3[r] : data_t'(0)), $sformatf("stage 2: PE 35 tile 2 row %0d", r));
        if (!k31[i]) n_drop3++;
      end
    end
    check(n_pkts == 3 * N_SEG, "stage 2 packets sent");
    check(n_rx_pkts == 4 * N_SEG, "stage 2 packets delivered");
    check(n_body_dropped == 32'(n_drop1 + n_drop3), "no value dropped by the NoDrop tile");
    // ---- mechanisms ----
    check(n_drop1 > 0 && n_drop3 > 0, "DropLayer dropped values");
    check(n_vertical > 0, "vertical links used");
    check(n_head_wait > 0, "packets waited for an output in a router");
    $display("stage 1: %0d clocks, %0d of 128 values dropped; stage 2: %0d clocks, %0d dropped",
             cyc1, n_drop1, cyc2, n_drop3);
    $display("vertical-link flits %0d, router head-wait clocks %0d, multicast deliveries %0d",
             n_vertical, n_head_wait, n_rx_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
