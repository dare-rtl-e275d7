// drop_packetizer_tb: sends random 16-value groups with random keys (including
// all-zero and all-one keys) through the packetizer, with and without random
// back-pressure, and checks that the packet is the head flit carrying the
// header and key followed by exactly the values whose key bit is 1, in order,
// that 'last' marks the final flit, and that without back-pressure the packet
// takes 1 + popcount(key) clocks.
module drop_packetizer_tb;
  import dare_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    start = 0, out_ready = 1;
  header_t hdr;
  data_t   data [KEY_W];
  logic    busy, out_valid, out_last;
  flit_t   out_flit;

  drop_packetizer dut (.clk, .rst_n, .start, .hdr, .data, .busy,
                       .out_valid, .out_flit, .out_last, .out_ready);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit stall_mode = 0;
  always @(posedge clk) out_ready <= stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;

  initial begin
    hdr = '0;
    for (int i = 0; i < KEY_W; i++) data[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      header_t h;
      data_t   d [KEY_W];
      int exp_idx [$];
      int got, cyc, nflits;
      stall_mode = (n >= 150);
      exp_idx.delete();
      h = '0;
      h.dest = {$urandom, $urandom};
      h.src_pe = PE_W'($urandom_range(0, N_PE - 1));
      h.dst_ima = IMA_W'($urandom_range(0, N_IMA - 1));
      h.dst_seg = SEG_W'($urandom);
      h.key = (n == 0) ? 16'h0000 : (n == 1) ? 16'hFFFF : (n == 2) ? 16'b0101 : key_t'($urandom);
      for (int i = 0; i < KEY_W; i++) d[i] = data_t'($urandom);
      for (int i = 0; i < KEY_W; i++) if (h.key[i]) exp_idx.push_back(i);
      @(negedge clk);
      check(!busy, "idle before start");
      hdr = h; data = d; start = 1;
      @(negedge clk); start = 0;
      got = 0; cyc = 0; nflits = 0;
      while (busy) begin
        if (out_valid && out_ready) begin
          if (nflits == 0) begin
            check(out_flit.head == 1'b1, "first flit is head");
            check(header_t'(out_flit.payload) == h, "head carries header and key");
          end else begin
            check(out_flit.head == 1'b0, "body flit");
            check(got < exp_idx.size() && data_t'(out_flit.payload[DATA_W-1:0]) == d[exp_idx[got]],
                  $sformatf("pkt %0d body %0d value", n, got));
            got++;
          end
          nflits++;
          check(out_last == (nflits == 1 + exp_idx.size()), "last flag");
        end
        @(negedge clk);
        cyc++;
      end
      check(nflits == 1 + exp_idx.size(), $sformatf("pkt %0d flits %0d want %0d", n, nflits, 1 + exp_idx.size()));
      if (!stall_mode)
        check(cyc == 1 + exp_idx.size(), $sformatf("pkt %0d took %0d clocks", n, cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
