// dare_tile_tb: one tile, end to end. Weights of two IMAs (1 and 4) and their
// inputs are loaded, partly through the configuration bus and partly as
// decoded packets with dropped rows; the destination, drop probability 0.5 and
// LFSR seed are set; then a stage is started. The testbench recomputes the
// matrix-vector products and the LFSR keys itself and checks every packet the
// tile sends: its header (destinations, source, target tile/IMA/segment, key)
// and that its body holds exactly the outputs whose key bit is 1, in order,
// under random back-pressure. A second stage with dropping disabled must send
// full 16-value packets of the (now cleared) inputs' results. Counters, the
// clearing of the receive buffer at stage start and the 17-clock duration of
// a full packet when the sink never stalls are checked as well.
module dare_tile_tb;
  import dare_pkg::*;

  localparam int PE = 7, TL = 2;
  localparam int IMA_A = 1, IMA_B = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    cfg_valid = 0;
  cfg_t    cfg;
  logic    rx_valid = 0;
  header_t rx_hdr;
  data_t   rx_data [KEY_W];
  logic    stage_start = 0;
  logic    busy, out_valid, out_last, out_ready;
  flit_t   out_flit;
  logic [IMA_W-1:0] rd_ima = 0;
  logic [ROW_W-1:0] rd_row = 0;
  data_t   rd_data;
  logic [31:0] n_pkts, n_body_sent, n_body_dropped;

  dare_tile #(.PE_ID(PE), .TILE_ID(TL)) dut (
    .clk, .rst_n, .cfg_valid, .cfg, .rx_valid, .rx_hdr, .rx_data, .stage_start,
    .busy, .out_valid, .out_flit, .out_last, .out_ready, .rd_ima, .rd_row, .rd_data,
    .n_pkts, .n_body_sent, .n_body_dropped);

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endfunction

  // ---------------- reference models ----------------
  data_t w [N_IMA][XBAR_N][XBAR_N];
  data_t x [N_IMA][XBAR_N];
  logic [15:0] m_state;

  function automatic data_t mvm(input int m, input int c);
    longint acc;
    acc = 0;
    for (int r = 0; r < XBAR_N; r++) acc += longint'(x[m][r]) * longint'(w[m][r][c]);
    acc = acc >>> FRAC_W;
    if (acc > 32767) return 16'sh7fff;
    if (acc < -32768) return 16'sh8000;
    return data_t'(acc);
  endfunction

  function automatic key_t model_key(input int thr, input bit en);
    key_t k;
    for (int b = 0; b < KEY_W; b++) begin
      for (int j = 0; j < 4; j++) m_state = {m_state[14:0], ^(m_state & 16'hB400)};
      k[b] = !en || (int'(m_state[3:0]) >= thr);
    end
    return k;
  endfunction

  task automatic cfg_write(input cfg_op_e op, input int ima, input int row, input int col, input logic [63:0] d);
    @(negedge clk);
    cfg_valid = 1;
    cfg = '0;
    cfg.pe = PE_W'(PE); cfg.tile = TILE_W'(TL);
    cfg.op = op; cfg.ima = IMA_W'(ima); cfg.row = ROW_W'(row); cfg.col = ROW_W'(col); cfg.data = d;
    @(negedge clk);
    cfg_valid = 0;
  endtask

  bit stall = 1;
  always @(posedge clk) out_ready <= stall ? ($urandom_range(0, 3) != 0) : 1'b1;

  // collect packets
  typedef struct { header_t h; data_t body [$]; int clocks; } pkt_t;
  pkt_t pkts [$];
  pkt_t cur;
  bit in_pkt = 0;
  int pkt_clocks = 0;
  always @(negedge clk) if (rst_n) begin
    if (in_pkt) pkt_clocks++;
    if (out_valid && out_ready) begin
      if (out_flit.head) begin
        check(!in_pkt, "head inside a packet");
        cur.h = header_t'(out_flit.payload);
        cur.body.delete();
        in_pkt = 1;
        pkt_clocks = 1;
      end else begin
        check(in_pkt, "body outside a packet");
        cur.body.push_back(data_t'(out_flit.payload[DATA_W-1:0]));
      end
      if (out_last) begin
        cur.clocks = pkt_clocks;
        pkts.push_back(cur);
        in_pkt = 0;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam pe_mask_t DEST = pe_mask_t'(36'h8_0000_0421);

  task automatic run_stage(input int thr, input bit en, input int exp_pkts);
    int ims [2];
    ims[0] = IMA_A; ims[1] = IMA_B;
    pkts.delete();
    @(negedge clk); stage_start = 1;
    @(negedge clk); stage_start = 0;
    rd_ima = IMA_W'(IMA_A); rd_row = 3;
    @(negedge clk);
    check(rd_data == 0, "receive buffer cleared at stage start");
    while (busy || in_pkt) @(negedge clk);
    check(pkts.size() == exp_pkts, $sformatf("%0d packets, want %0d", pkts.size(), exp_pkts));
    for (int p = 0; p < pkts.size() && p < exp_pkts; p++) begin
      int m, s, j;
      key_t k;
      m = ims[p / N_SEG]; s = p % N_SEG;
      k = model_key(thr, en);
      check(pkts[p].h.dest == DEST, "destination mask");
      check(pkts[p].h.src_pe == PE_W'(PE) && pkts[p].h.src_tile == TILE_W'(TL), "source fields");
      check(pkts[p].h.dst_tile == 2'd3, "destination tile");
      check(int'(pkts[p].h.dst_ima) == m && int'(pkts[p].h.dst_seg) == s, $sformatf("pkt %0d ima/seg", p));
      check(pkts[p].h.key == k, $sformatf("pkt %0d key %h want %h", p, pkts[p].h.key, k));
      check(pkts[p].body.size() == $countones(k), $sformatf("pkt %0d body count", p));
      j = 0;
      for (int i = 0; i < KEY_W; i++) if (k[i]) begin
        if (j < pkts[p].body.size())
          check(pkts[p].body[j] == mvm(m, s * KEY_W + i),
                $sformatf("pkt %0d value %0d got %0d want %0d", p, i, pkts[p].body[j], mvm(m, s * KEY_W + i)));
        j++;
      end
    end
  endtask

  initial begin
    int n_zero_rows;
    cfg = '0;
    rx_hdr = '0;
    for (int i = 0; i < KEY_W; i++) rx_data[i] = '0;
    foreach (w[m, r, c]) w[m][r][c] = '0;
    foreach (x[m, r]) x[m][r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // sparse random weights in IMAs A and B
    for (int k = 0; k < 2; k++) begin
      int m;
      m = (k == 0) ? IMA_A : IMA_B;
      for (int c = 0; c < XBAR_N; c++)
        for (int n = 0; n < 4; n++) begin
          int r;
          r = $urandom_range(0, XBAR_N - 1);
          w[m][r][c] = data_t'($signed($urandom_range(0, 4095)) - 2048);
          cfg_write(CFG_WEIGHT, m, r, c, 64'($unsigned(w[m][r][c])));
        end
    end
    // IMA A inputs as decoded packets (some rows dropped = 0)
    n_zero_rows = 0;
    for (int s = 0; s < N_SEG; s++) begin
      key_t k;
      k = key_t'($urandom);
      @(negedge clk);
      rx_valid = 1;
      rx_hdr = '0; rx_hdr.dst_ima = IMA_W'(IMA_A); rx_hdr.dst_seg = SEG_W'(s); rx_hdr.key = k;
      for (int i = 0; i < KEY_W; i++) begin
        rx_data[i] = k[i] ? data_t'($signed($urandom_range(0, 2047)) - 1024) : '0;
        x[IMA_A][s * KEY_W + i] = rx_data[i];
        n_zero_rows += !k[i];
      end
      @(negedge clk);
      rx_valid = 0;
    end
    // IMA B inputs through the configuration bus
    for (int n = 0; n < 40; n++) begin
      int r;
      r = $urandom_range(0, XBAR_N - 1);
      x[IMA_B][r] = data_t'($signed($urandom_range(0, 2047)) - 1024);
      cfg_write(CFG_INPUT, IMA_B, r, 0, 64'($unsigned(x[IMA_B][r])));
    end
    rd_ima = IMA_W'(IMA_A); rd_row = 5;
    @(negedge clk);
    check(rd_data == x[IMA_A][5], "receive buffer readback");
    // destination, dropping, LFSR, enabled IMAs
    cfg_write(CFG_DEST, 0, 0, 0, {26'd0, 2'd3, DEST});
    cfg_write(CFG_DROP, 0, 0, 0, 64'h18);           // enable, thr = 8 (P = 0.5)
    cfg_write(CFG_LFSR, 0, 0, 0, {32'd0, 16'hB400, 16'h5EED});
    m_state = 16'h5EED;
    cfg_write(CFG_IMA_EN, 0, 0, 0, 64'((1 << IMA_A) | (1 << IMA_B)));
    stall = 1;
    run_stage(8, 1'b1, 2 * N_SEG);
    check(n_pkts == 2 * N_SEG, "packet counter");
    check(n_body_sent + n_body_dropped == 2 * XBAR_N, "sent + dropped = all outputs");
    check(n_body_dropped > 0, "some values dropped");
    // second stage: drop off, inputs were cleared -> outputs all zero, full packets
    foreach (x[m, r]) x[m][r] = '0;
    cfg_write(CFG_DROP, 0, 0, 0, 64'h08);           // disable
    stall = 0;
    run_stage(8, 1'b0, 2 * N_SEG);
    for (int p = 0; p < pkts.size(); p++)
      check(pkts[p].clocks == 1 + KEY_W, $sformatf("full packet %0d took %0d clocks", p, pkts[p].clocks));
    check(n_pkts == 4 * N_SEG, "packet counter 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
