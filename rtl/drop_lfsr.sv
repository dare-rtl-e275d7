// drop_lfsr: reconfigurable 16-bit LFSR that produces the DropLayer key.
//
// Every packet leaving a tile carries up to 16 values d_1..d_16. This block
// draws the 16-bit key k_1..k_16 that says which of them are kept (k_i = 1)
// and which are dropped (k_i = 0) by DropEdge/Dropout. One LFSR per tile, 16
// bits wide, reconfigurable through weighted outputs so that different drop
// probabilities can be set: that much is the architecture's.
//
// How it works (this implementation's choices):
//  * Fibonacci LFSR, shifting towards the MSB; the bit shifted in is the
//    parity of (state & taps). Taps and seed are programmable (cfg_load).
//    Reset state 16'hACE1, reset taps 16'hB400 (x^16+x^14+x^13+x^11+1,
//    maximal length). A zero seed is replaced by 1, which would lock the LFSR.
//  * Weighted output: per clock the LFSR advances PROB_W (4) steps, so its
//    low 4 bits are fresh. The key bit is 1 (keep) when those 4 bits, read as
//    a number, are >= thr, so a value is dropped with probability thr/16
//    (0.3 -> thr 5, 0.5 -> thr 8). With drop_en = 0 every key bit is 1.
//  * A key is built one bit per clock, k_1 first, so gen -> key_valid takes
//    KEY_W+1 (17) clocks. The LFSR runs at the CMOS clock, about 100 times the
//    10 MHz crossbar rate, so this fits well within one crossbar cycle.
//
// Interface: gen is a one-cycle request, accepted when !busy; key_valid is a
// one-cycle pulse with key stable until the next gen.
module drop_lfsr
  import dare_pkg::*;
#(
  parameter int unsigned W = KEY_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_load,
  input  logic [W-1:0]      seed,
  input  logic [W-1:0]      taps,
  input  logic [PROB_W-1:0] thr,
  input  logic              drop_en,
  input  logic              gen,
  output logic              busy,
  output logic              key_valid,
  output logic [W-1:0]      key
);

  logic [W-1:0] state, taps_q, next4;
  logic [$clog2(W+1)-1:0] cnt;
  logic keep_bit;

  function automatic logic [W-1:0] step(input logic [W-1:0] s, input logic [W-1:0] t);
    return {s[W-2:0], ^(s & t)};
  endfunction

  always_comb begin
    next4 = state;
    for (int i = 0; i < PROB_W; i++) next4 = step(next4, taps_q);
    keep_bit = !drop_en || (next4[PROB_W-1:0] >= thr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= W'(16'hACE1);
      taps_q    <= W'(16'hB400);
      cnt       <= '0;
      busy      <= 1'b0;
      key_valid <= 1'b0;
      key       <= '0;
    end else begin
      key_valid <= 1'b0;
      if (cfg_load) begin
        state  <= (seed == '0) ? W'(1) : seed;
        taps_q <= taps;
      end else if (busy) begin
        state    <= next4;
        key[cnt[$clog2(W)-1:0]] <= keep_bit;
        if (cnt == ($clog2(W+1))'(W - 1)) begin
          busy      <= 1'b0;
          key_valid <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end else if (gen) begin
        busy <= 1'b1;
        cnt  <= '0;
      end
    end
  end

endmodule
