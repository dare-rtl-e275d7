// drop_decoder_tb: feeds the decoder packets built here (head flit with a
// random key, then the kept values in row order), with random idle clocks
// between flits, and checks that each decoded group has the sent value in
// every row whose key bit is 1 and zero in every other row, that the header
// fields come out unchanged, that an all-zero key (header-only packet) gives
// an all-zero group, and that out_valid comes exactly one clock after the
// last flit.
module drop_decoder_tb;
  import dare_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid = 0;
  flit_t   in_flit;
  logic    in_ready, out_valid;
  header_t out_hdr;
  data_t   out_data [KEY_W];

  drop_decoder dut (.clk, .rst_n, .in_valid, .in_flit, .in_ready,
                    .out_valid, .out_hdr, .out_data);

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

  int n_valid = 0;
  always @(posedge clk) if (out_valid) n_valid++;

  initial begin
    in_flit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      header_t h;
      data_t d [KEY_W];
      int n_before;
      h = '0;
      h.dest = {$urandom, $urandom};
      h.dst_tile = TILE_W'($urandom);
      h.dst_ima = IMA_W'($urandom_range(0, N_IMA - 1));
      h.dst_seg = SEG_W'($urandom);
      h.key = (n == 0) ? 16'h0000 : (n == 1) ? 16'hFFFF : (n == 2) ? 16'b0101 : key_t'($urandom);
      for (int i = 0; i < KEY_W; i++) d[i] = data_t'($urandom | 1);   // never zero
      n_before = n_valid;
      @(negedge clk);
      check(in_ready, "always ready");
      in_valid = 1; in_flit.head = 1; in_flit.payload = h;
      for (int i = 0; i < KEY_W; i++) if (h.key[i]) begin
        @(negedge clk);
        in_valid = 0;
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); check(!out_valid, "no early output"); end
        in_valid = 1; in_flit.head = 0; in_flit.payload = PAY_W'($unsigned(d[i]));
      end
      @(negedge clk);
      in_valid = 0;
      check(out_valid, $sformatf("pkt %0d: out_valid one clock after last flit", n));
      check(n_valid == n_before, "exactly one output per packet so far");
      check(out_hdr == h, "header passed through");
      for (int i = 0; i < KEY_W; i++)
        check(out_data[i] == (h.key[i] ? d[i] : data_t'(0)), $sformatf("pkt %0d row %0d", n, i));
      @(negedge clk);
      check(!out_valid && n_valid == n_before + 1, "single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
