// reram_ima_tb: programs random 16-bit weights into the 128x128 IMA model,
// applies random input vectors and checks every output column against a
// matrix-vector product computed here (Q8.8: sum of products shifted right by
// 8, saturated to 16 bits), including vectors that saturate both ways. Also
// checks that done comes COLS + 1 clocks after start and that outputs hold
// until the next start.
module reram_ima_tb;
  import dare_pkg::*;

  localparam int R = XBAR_N, C = XBAR_N;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, start = 0;
  logic [ROW_W-1:0] wr_row = 0;
  logic [ROW_W-1:0] wr_col = 0;
  data_t wr_data = 0;
  data_t in_vec [R];
  logic busy, done;
  data_t out_vec [C];

  reram_ima dut (.clk, .rst_n, .wr_en, .wr_row, .wr_col, .wr_data, .start, .in_vec,
                 .busy, .done, .out_vec);

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endfunction

  data_t w [R][C];
  data_t x_app [R];

  function automatic data_t expect_col(input int c);
    longint acc;
    acc = 0;
    for (int r = 0; r < R; r++) acc += longint'(x_app[r]) * longint'(w[r][c]);
    acc = acc >>> FRAC_W;
    if (acc > 32767) return 16'sh7fff;
    if (acc < -32768) return 16'sh8000;
    return data_t'(acc);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    for (int r = 0; r < R; r++) in_vec[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // weights: random, small enough that most sums stay in range
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        w[r][c] = data_t'($signed($urandom_range(0, 1023)) - 512);
        @(negedge clk);
        wr_en = 1; wr_row = ROW_W'(r); wr_col = ROW_W'(c); wr_data = w[r][c];
      end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 6; t++) begin
      for (int r = 0; r < R; r++)
        case (t)
          4: in_vec[r] = 16'sh7fff;                                    // saturates
          5: in_vec[r] = (w[r][0] >= 0) ? 16'sh8000 : 16'sh7fff;       // column 0 very negative
          default: in_vec[r] = data_t'($signed($urandom_range(0, 2047)) - 1024);
        endcase
      x_app = in_vec;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int r = 0; r < R; r++) in_vec[r] = data_t'($urandom);      // must not matter now
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(lat == C + 1, $sformatf("latency %0d", lat));
      repeat (3) @(negedge clk);
      for (int c = 0; c < C; c++)
        check(out_vec[c] == expect_col(c), $sformatf("run %0d col %0d got %0d want %0d", t, c, out_vec[c], expect_col(c)));
      if (t == 4) check(out_vec[1] == 16'sh7fff || out_vec[1] == 16'sh8000, "saturation reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
