// noc_3d_mesh_tb: the full 36-router 3D mesh under random multicast traffic.
// Every PE injects packets with random keys (random lengths, header-only
// included) to random destination sets, one-hot, random or all 36 PEs; every
// ejection port applies random back-pressure. The scoreboard checks that each
// packet reaches each of its destination PEs exactly once and no other PE,
// with the head flit's mask reduced to that PE alone, the key unchanged and
// the body flits whole and in order. It counts flits crossing vertical
// (between-tier) links and planar links and multicast packets, and fails if
// any of these never happened or the mesh does not drain.
module noc_3d_mesh_tb;
  import dare_pkg::*;

  localparam int NPKT = 12;            // packets per PE

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  inj_valid [N_PE];
  flit_t inj_flit  [N_PE];
  logic  inj_ready [N_PE];
  logic  ej_valid  [N_PE];
  flit_t ej_flit   [N_PE];
  logic  ej_ready  [N_PE];
  logic  idle;

  noc_3d_mesh dut (.clk, .rst_n, .inj_valid, .inj_flit, .inj_ready,
                   .ej_valid, .ej_flit, .ej_ready, .idle);

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endfunction

  function automatic data_t body_val(input int id, input int j);
    return data_t'((id * 53 + j * 7 + 1) & 16'hffff);
  endfunction

  header_t sent_hdr [int];
  pe_mask_t got [int];
  int n_multicast = 0, n_deliv_exp = 0, n_deliv_got = 0;
  bit src_done [N_PE];

  for (genvar p = 0; p < N_PE; p++) begin : g_src
    initial begin
      inj_valid[p] = 0;
      inj_flit[p]  = '0;
      src_done[p]  = 0;
      wait (rst_n);
      for (int n = 0; n < NPKT; n++) begin
        header_t h;
        int id, nb;
        id = p * 256 + n;
        h = '0;
        h.src_pe = PE_W'(p);
        {h.src_tile, h.dst_ima, h.dst_seg} = 9'(n);
        case (n % 3)
          0: h.dest = pe_mask_t'(64'(1) << $urandom_range(0, N_PE - 1));
          1: h.dest = pe_mask_t'({$urandom, $urandom}) & pe_mask_t'({$urandom, $urandom});
          default: h.dest = (n == 5) ? '1 : pe_mask_t'({$urandom, $urandom});
        endcase
        if (h.dest == '0) h.dest[(p + 9) % N_PE] = 1'b1;
        h.key = (n == 7) ? 16'h0 : key_t'($urandom);
        sent_hdr[id] = h;
        got[id] = '0;
        n_deliv_exp += $countones(h.dest);
        if ($countones(h.dest) > 1) n_multicast++;
        nb = popcount(h.key);
        for (int j = 0; j <= nb; j++) begin
          @(negedge clk);
          while (!inj_ready[p] || $urandom_range(0, 3) == 0) begin
            inj_valid[p] = 0;
            @(negedge clk);
          end
          inj_valid[p] = 1;
          inj_flit[p].head = (j == 0);
          inj_flit[p].payload = (j == 0) ? PAY_W'(h) : PAY_W'($unsigned(body_val(id, j)));
        end
        @(negedge clk);
        inj_valid[p] = 0;
      end
      src_done[p] = 1;
    end
  end

  int cur_id [N_PE], cur_j [N_PE], cur_nb [N_PE];
  initial for (int d = 0; d < N_PE; d++) begin cur_id[d] = -1; ej_ready[d] = 1; end

  always @(negedge clk) if (rst_n) begin
    for (int d = 0; d < N_PE; d++) begin
      ej_ready[d] = ($urandom_range(0, 3) != 0);
      if (ej_valid[d] && ej_ready[d]) begin
        if (ej_flit[d].head) begin
          header_t h;
          int id;
          h = header_t'(ej_flit[d].payload);
          id = int'(h.src_pe) * 256 + int'({h.src_tile, h.dst_ima, h.dst_seg});
          check(cur_id[d] == -1, "head inside a packet");
          check(sent_hdr.exists(id), "unknown packet");
          if (sent_hdr.exists(id)) begin
            check(sent_hdr[id].dest[d], $sformatf("packet %0d delivered to PE %0d, not a destination", id, d));
            check(!got[id][d], $sformatf("packet %0d delivered twice to PE %0d", id, d));
            check(h.dest == pe_mask_t'(64'(1) << d), "ejected mask holds only this PE");
            check(h.key == sent_hdr[id].key, "key unchanged");
            got[id][d] = 1'b1;
            n_deliv_got++;
            cur_nb[d] = popcount(h.key);
            cur_j[d]  = 1;
            cur_id[d] = (cur_nb[d] == 0) ? -1 : id;
          end
        end else begin
          check(cur_id[d] != -1, "body outside a packet");
          if (cur_id[d] != -1) begin
            check(data_t'(ej_flit[d].payload[DATA_W-1:0]) == body_val(cur_id[d], cur_j[d]),
                  $sformatf("PE %0d body %0d of packet %0d", d, cur_j[d], cur_id[d]));
            if (cur_j[d] == cur_nb[d]) cur_id[d] = -1;
            cur_j[d]++;
          end
        end
      end
    end
  end

  // link usage, counted on the router outputs
  int n_vertical = 0, n_planar = 0;
  for (genvar n = 0; n < N_PE; n++) begin : g_mon
    always @(posedge clk) begin
      for (int o = 1; o < N_PORT; o++)
        if (dut.g_r[n].u_router.out_valid[o] && dut.g_r[n].u_router.out_ready[o]) begin
          if (o >= 5) n_vertical++;
          else        n_planar++;
        end
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
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      @(negedge clk);
      all = 1;
      for (int p = 0; p < N_PE; p++) all &= src_done[p];
    end while (!all);
    repeat (5) @(negedge clk);
    while (!idle) @(negedge clk);
    repeat (5) @(negedge clk);
    foreach (sent_hdr[id])
      check(got[id] == sent_hdr[id].dest, $sformatf("packet %0d reached %h, want %h", id, got[id], sent_hdr[id].dest));
    check(n_deliv_got == n_deliv_exp, "delivery count");
    check(n_multicast > 0, "multicast happened");
    check(n_vertical > 0, "vertical links used");
    check(n_planar > 0, "planar links used");
    $display("packets %0d, multicast %0d, deliveries %0d, planar flit hops %0d, vertical flit hops %0d",
             N_PE * NPKT, n_multicast, n_deliv_got, n_planar, n_vertical);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
