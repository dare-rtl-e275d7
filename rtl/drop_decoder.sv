// drop_decoder: destination side of the DropLayer control mechanism.
//
// Takes the flits of one packet from the router's ejection port. The head flit
// gives the key; the number of ones in it says how many body flits follow.
// Body flit j is the value of the j-th row R_i whose key bit is 1, so the
// decoder places it at row i and leaves rows with k_i = 0 at zero. When the
// last body flit (or a header with an all-zero key) has arrived, it outputs
// the 16 decoded rows for one cycle together with the key and the header
// fields that say where they go (tile, IMA, 16-row segment). This follows the
// architecture; the output format is this implementation's.
//
// Timing: accepts one flit per clock (in_ready is always 1). out_valid pulses
// in the clock after the last flit of a packet was accepted.
module drop_decoder
  import dare_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  flit_t   in_flit,
  output logic    in_ready,
  output logic    out_valid,
  output header_t out_hdr,
  output data_t   out_data [KEY_W]
);

  header_t hdr_in;
  key_t    left_q;      // key bits whose value has not yet arrived
  logic    active;
  logic [$clog2(KEY_W)-1:0] idx;

  assign in_ready = 1'b1;
  assign hdr_in   = header_t'(in_flit.payload);

  always_comb begin
    idx = '0;
    for (int i = KEY_W - 1; i >= 0; i--)
      if (left_q[i]) idx = ($clog2(KEY_W))'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      left_q    <= '0;
      out_valid <= 1'b0;
      out_hdr   <= '0;
      for (int i = 0; i < KEY_W; i++) out_data[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (in_flit.head) begin
          out_hdr <= hdr_in;
          left_q  <= hdr_in.key;
          for (int i = 0; i < KEY_W; i++) out_data[i] <= '0;
          active    <= (hdr_in.key != '0);
          out_valid <= (hdr_in.key == '0);
        end else if (active) begin
          out_data[idx] <= data_t'(in_flit.payload[DATA_W-1:0]);
          left_q[idx]   <= 1'b0;
          if ((left_q & (left_q - 1'b1)) == '0) begin
            active    <= 1'b0;
            out_valid <= 1'b1;
          end
        end
      end
    end
  end

endmodule
