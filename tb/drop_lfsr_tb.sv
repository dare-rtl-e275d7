// drop_lfsr_tb: checks the DropLayer key generator against a reference model
// of the same LFSR written here from its definition (Fibonacci shift towards
// the MSB, new bit = parity(state & taps), 4 steps per key bit, key bit =
// low 4 bits >= threshold). Checks every key bit, the 17-clock latency from
// gen to key_valid, all-ones keys when dropping is off, the zero-seed guard
// and that the dropped fraction over many keys is near thr/16.
module drop_lfsr_tb;
  import dare_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_load = 0, drop_en = 0, gen = 0;
  logic [15:0] seed = 0, taps = 0;
  logic [3:0]  thr = 0;
  logic busy, key_valid;
  logic [15:0] key;

  drop_lfsr dut (.clk, .rst_n, .cfg_load, .seed, .taps, .thr, .drop_en, .gen,
                 .busy, .key_valid, .key);

  int checks = 0, failures = 0;
  logic [15:0] m_state, m_taps;

  function automatic logic [15:0] mstep(input logic [15:0] s, input logic [15:0] t);
    return {s[14:0], ^(s & t)};
  endfunction

  function automatic logic [15:0] model_key(input logic [3:0] th, input logic en);
    logic [15:0] k;
    for (int b = 0; b < 16; b++) begin
      for (int j = 0; j < 4; j++) m_state = mstep(m_state, m_taps);
      k[b] = !en || (m_state[3:0] >= th);
    end
    return k;
  endfunction

  task automatic get_key(output logic [15:0] k, output int lat);
    @(negedge clk); gen = 1;
    @(negedge clk); gen = 0;
    lat = 1;
    while (!key_valid) begin @(negedge clk); lat++; end
    k = key;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] k, mk;
    int lat, dropped;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reset state and taps
    m_state = 16'hACE1; m_taps = 16'hB400;
    thr = 4'd5; drop_en = 1;
    for (int n = 0; n < 20; n++) begin
      get_key(k, lat);
      mk = model_key(thr, 1'b1);
      check(k == mk, $sformatf("key %0d: got %h want %h", n, k, mk));
      check(lat == 17, $sformatf("latency %0d", lat));
    end
    // reconfigure seed/taps
    @(negedge clk); seed = 16'h1234; taps = 16'hD008; cfg_load = 1;
    @(negedge clk); cfg_load = 0;
    m_state = 16'h1234; m_taps = 16'hD008;
    thr = 4'd8;
    for (int n = 0; n < 20; n++) begin
      get_key(k, lat);
      mk = model_key(thr, 1'b1);
      check(k == mk, $sformatf("key b %0d: got %h want %h", n, k, mk));
    end
    // drop disabled: all ones
    drop_en = 0;
    for (int n = 0; n < 4; n++) begin
      get_key(k, lat);
      mk = model_key(thr, 1'b0);
      check(k == 16'hFFFF, $sformatf("nodrop key %h", k));
    end
    // zero seed must not lock the LFSR
    @(negedge clk); seed = 16'h0000; taps = 16'hB400; cfg_load = 1;
    @(negedge clk); cfg_load = 0;
    m_state = 16'h0001; m_taps = 16'hB400; drop_en = 1; thr = 4'd8;
    get_key(k, lat);
    mk = model_key(thr, 1'b1);
    check(k == mk, "zero seed replaced by 1");
    // dropped fraction at thr = 8 (P = 0.5) and thr = 5 (P = 0.3125)
    for (int t = 0; t < 2; t++) begin
      thr = (t == 0) ? 4'd8 : 4'd5;
      dropped = 0;
      for (int n = 0; n < 200; n++) begin
        get_key(k, lat);
        mk = model_key(thr, 1'b1);
        for (int b = 0; b < 16; b++) dropped += (k[b] == 1'b0);
      end
      // 3200 bits, expected thr/16 of them dropped, allow +-4 points
      check(dropped * 16 > (int'(thr) * 3200) - 2100 && dropped * 16 < (int'(thr) * 3200) + 2100,
            $sformatf("thr %0d dropped %0d of 3200", thr, dropped));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
