// noc_router_tb: one router in the middle of the mesh (x=1, y=1, z=1, so
// every one of its seven ports leads somewhere) under random traffic. Seven
// sources send packets with random keys (so random lengths, header-only
// included) and random multicast destination sets; the sinks apply random
// back-pressure. A scoreboard checks that every packet leaves on exactly the
// ports that dimension-ordered (x, y, z) routing assigns to its destinations,
// with the head flit's mask cut down to the destinations behind that port,
// that its body flits follow whole and in order on every branch, and nothing
// else comes out. It also counts multicast forks, header-only packets and
// stalled outputs and heads held back because a downstream buffer could not
// take the whole packet, and fails if any of them never happened.
module noc_router_tb;
  import dare_pkg::*;

  localparam int RX = 1, RY = 1, RZ = 1;
  localparam int NPKT = 60;            // packets per source

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid [N_PORT];
  flit_t in_flit  [N_PORT];
  logic  in_ready [N_PORT];
  logic  out_valid [N_PORT];
  flit_t out_flit  [N_PORT];
  logic  out_ready [N_PORT];
  logic [CNT_W-1:0] in_free [N_PORT];
  logic [CNT_W-1:0] out_free [N_PORT];
  logic  idle;

  noc_router #(.X(RX), .Y(RY), .Z(RZ)) dut (.clk, .rst_n, .in_valid, .in_flit, .in_ready, .in_free,
                                            .out_valid, .out_flit, .out_ready, .out_free, .idle);

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endfunction

  // port a destination PE is routed to from (RX, RY, RZ)
  function automatic int route(input int d);
    int x, y, z;
    x = d % 3; y = (d / 3) % 3; z = d / 9;
    if (x > RX) return 1; if (x < RX) return 2;
    if (y > RY) return 3; if (y < RY) return 4;
    if (z > RZ) return 5; if (z < RZ) return 6;
    return 0;
  endfunction

  function automatic pe_mask_t port_mask(input pe_mask_t m, input int p);
    pe_mask_t r;
    r = '0;
    for (int d = 0; d < N_PE; d++) if (m[d] && route(d) == p) r[d] = 1'b1;
    return r;
  endfunction

  // packet id = source port * 256 + serial; the serial goes into dst_ima/dst_seg/src_tile
  header_t sent_hdr [int];
  int      got_ports [int];                      // bit mask of ports seen
  function automatic data_t body_val(input int id, input int j);
    return data_t'((id * 37 + j * 11 + 5) & 16'hffff);
  endfunction

  int n_multicast = 0, n_hdr_only = 0, n_stall = 0, n_branches_exp = 0, n_branches_got = 0;
  bit sources_done [N_PORT];

  for (genvar p = 0; p < N_PORT; p++) begin : g_src
    initial begin
      in_valid[p] = 0;
      in_flit[p]  = '0;
      sources_done[p] = 0;
      wait (rst_n);
      for (int n = 0; n < NPKT; n++) begin
        header_t h;
        int id, nb, pm;
        id = p * 256 + n;
        h = '0;
        h.src_pe = PE_W'(p);
        {h.src_tile, h.dst_ima, h.dst_seg} = 9'(n);
        case (n % 4)
          0: h.dest = pe_mask_t'(64'(1) << $urandom_range(0, N_PE - 1));
          default: h.dest = pe_mask_t'({$urandom, $urandom}) & pe_mask_t'({$urandom, $urandom});
        endcase
        if (h.dest == '0) h.dest[p] = 1'b1;
        h.key = (n % 10 == 3) ? 16'h0 : key_t'($urandom);
        sent_hdr[id] = h;
        got_ports[id] = 0;
        pm = 0;
        for (int o = 0; o < N_PORT; o++) if (port_mask(h.dest, o) != '0) begin pm++; n_branches_exp++; end
        if (pm > 1) n_multicast++;
        if (h.key == '0) n_hdr_only++;
        nb = popcount(h.key);
        for (int j = 0; j <= nb; j++) begin
          @(negedge clk);
          while (!in_ready[p] || $urandom_range(0, 3) == 0) begin
            in_valid[p] = 0;
            @(negedge clk);
          end
          in_valid[p] = 1;
          in_flit[p].head = (j == 0);
          in_flit[p].payload = (j == 0) ? PAY_W'(h) : PAY_W'($unsigned(body_val(id, j)));
        end
        @(negedge clk);
        in_valid[p] = 0;
      end
      sources_done[p] = 1;
    end
  end

  // sinks: per output, the packet in progress and how many body flits remain
  int cur_id [N_PORT];
  int cur_j  [N_PORT];
  int cur_nb [N_PORT];
  initial for (int o = 0; o < N_PORT; o++) begin cur_id[o] = -1; out_ready[o] = 1; out_free[o] = CNT_W'(17); end
  // space the sinks advertise: mostly a whole packet, sometimes less
  int n_room_wait = 0;
  always @(posedge clk)
    for (int o = 0; o < N_PORT; o++) out_free[o] <= ($urandom_range(0, 3) == 0) ? CNT_W'($urandom_range(0, 17)) : CNT_W'(17);
  always @(negedge clk)
    for (int i = 0; i < N_PORT; i++)
      if (!dut.fempty[i] && !dut.active[i] && dut.fhead[i].head && ((dut.req[i] & ~dut.room[i]) != '0)) n_room_wait++;

  always @(negedge clk) if (rst_n) begin
    for (int o = 0; o < N_PORT; o++) begin
      out_ready[o] = ($urandom_range(0, 4) != 0);
      if (out_valid[o] && !out_ready[o]) n_stall++;
      if (out_valid[o] && out_ready[o]) begin
        if (out_flit[o].head) begin
          header_t h, s;
          int id;
          h = header_t'(out_flit[o].payload);
          id = int'(h.src_pe) * 256 + int'({h.src_tile, h.dst_ima, h.dst_seg});
          check(cur_id[o] == -1, $sformatf("port %0d: head inside a packet", o));
          check(sent_hdr.exists(id), $sformatf("port %0d: unknown packet %0d", o, id));
          if (sent_hdr.exists(id)) begin
            s = sent_hdr[id];
            check(h.key == s.key, "key unchanged");
            check(h.dest == port_mask(s.dest, o), $sformatf("port %0d: branch mask of packet %0d", o, id));
            check(port_mask(s.dest, o) != '0, $sformatf("packet %0d sent on port %0d wrongly", id, o));
            check(((got_ports[id] >> o) & 1) == 0, "branch delivered twice");
            got_ports[id] |= (1 << o);
            n_branches_got++;
            cur_nb[o] = popcount(s.key);
            cur_j[o]  = 1;
            cur_id[o] = (cur_nb[o] == 0) ? -1 : id;
          end
        end else begin
          check(cur_id[o] != -1, $sformatf("port %0d: body flit outside a packet", o));
          if (cur_id[o] != -1) begin
            check(data_t'(out_flit[o].payload[DATA_W-1:0]) == body_val(cur_id[o], cur_j[o]),
                  $sformatf("port %0d: body %0d of packet %0d", o, cur_j[o], cur_id[o]));
            if (cur_j[o] == cur_nb[o]) cur_id[o] = -1;
            cur_j[o]++;
          end
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
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
      for (int p = 0; p < N_PORT; p++) all &= sources_done[p];
    end while (!all);
    repeat (5) @(negedge clk);
    while (!idle) @(negedge clk);
    repeat (5) @(negedge clk);
    foreach (sent_hdr[id]) begin
      int exp_ports;
      exp_ports = 0;
      for (int o = 0; o < N_PORT; o++) if (port_mask(sent_hdr[id].dest, o) != '0) exp_ports |= (1 << o);
      check(got_ports[id] == exp_ports, $sformatf("packet %0d reached ports %b, want %b", id, got_ports[id], exp_ports));
    end
    check(n_branches_got == n_branches_exp, "branch count");
    check(n_multicast > 0, "multicast fork happened");
    check(n_hdr_only > 0, "header-only packet happened");
    check(n_stall > 0, "output stall happened");
    check(n_room_wait > 0, "head waited for buffer room");
    for (int i = 0; i < N_PORT; i++) check(in_free[i] == CNT_W'(17), "input buffers empty at the end");
    $display("packets %0d, multicast %0d, header-only %0d, branches %0d, stalled output clocks %0d",
             N_PORT * NPKT, n_multicast, n_hdr_only, n_branches_got, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
