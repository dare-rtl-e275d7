// drop_packetizer: sender side of the DropLayer control mechanism.
//
// A tile hands over one group of KEY_W (16) crossbar outputs d_1..d_16 with a
// header that already holds the LFSR key. The block sends the head flit (with
// the key inside) and then one body flit for each d_i whose key bit k_i is 1,
// in order of i; values with k_i = 0 are simply not sent, so the packet has
// 1 + popcount(key) flits. An all-zero key gives a header-only packet, which
// still tells the destination that all 16 rows are zero. This follows the
// architecture; the valid/ready handshake and the 'last' flag are this
// implementation's.
//
// Timing: start is accepted when busy is low; the head flit is offered on the
// next clock and one flit moves per clock while out_ready is high.
module drop_packetizer
  import dare_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  header_t hdr,
  input  data_t   data [KEY_W],
  output logic    busy,
  output logic    out_valid,
  output flit_t   out_flit,
  output logic    out_last,
  input  logic    out_ready
);

  typedef enum logic [1:0] {S_IDLE, S_HEAD, S_BODY} state_e;
  state_e  st;
  header_t hdr_q;
  data_t   data_q [KEY_W];
  key_t    left_q;                 // key bits still to be sent
  logic [$clog2(KEY_W)-1:0] idx;   // lowest set bit of left_q
  logic    fire;

  always_comb begin
    idx = '0;
    for (int i = KEY_W - 1; i >= 0; i--)
      if (left_q[i]) idx = ($clog2(KEY_W))'(i);
  end

  assign busy      = (st != S_IDLE);
  assign out_valid = (st == S_HEAD) || (st == S_BODY);
  assign fire      = out_valid && out_ready;

  always_comb begin
    out_flit = '0;
    if (st == S_HEAD) begin
      out_flit.head    = 1'b1;
      out_flit.payload = hdr_q;
      out_last         = (hdr_q.key == '0);
    end else begin
      out_flit.head    = 1'b0;
      out_flit.payload = PAY_W'($unsigned(data_q[idx]));
      out_last         = ((left_q & (left_q - 1'b1)) == '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      hdr_q  <= '0;
      left_q <= '0;
      for (int i = 0; i < KEY_W; i++) data_q[i] <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          hdr_q  <= hdr;
          left_q <= hdr.key;
          for (int i = 0; i < KEY_W; i++) data_q[i] <= data[i];
          st     <= S_HEAD;
        end
        S_HEAD: if (fire) st <= (hdr_q.key == '0) ? S_IDLE : S_BODY;
        S_BODY: if (fire) begin
          left_q[idx] <= 1'b0;
          if (out_last) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
