// dare_pkg: sizes, flit and header formats and configuration types shared by
// the DropLayer-aware ReRAM manycore.
//
// The machine is 36 processing elements (PEs) on a 3D mesh: 4 tiers of 3x3
// PEs, 4 tiles per PE, 12 in-situ multiply-accumulate units (IMAs) per tile,
// 128x128 crossbars, 16-bit fixed-point data and a 16-bit LFSR key per packet.
// A packet without any dropping carries 16 body flits, one per 16-bit value.
// All of these numbers follow the architecture description.
//
// Design choices of this implementation (not fixed by the architecture):
//  * A flit is {head bit, payload}. The payload is wide enough that the whole
//    header (multicast destination mask, source, destination tile/IMA/row
//    segment and the 16-bit key) travels in one head flit; a body flit uses
//    the low 16 bits of the payload for its value.
//  * There is no tail flit type: every router and the decoder take the number
//    of body flits from the number of ones in the key.
//  * Fixed-point data is Q8.8 (FRAC_W = 8).
package dare_pkg;

  // ---------------- machine size ----------------
  localparam int unsigned N_X      = 3;             // PEs per row of a tier
  localparam int unsigned N_Y      = 3;             // rows per tier
  localparam int unsigned N_Z      = 4;             // planar tiers
  localparam int unsigned N_PE     = N_X * N_Y * N_Z; // 36
  localparam int unsigned PE_W     = $clog2(N_PE);  // 6
  localparam int unsigned N_TILE   = 4;             // tiles per PE
  localparam int unsigned TILE_W   = $clog2(N_TILE);
  localparam int unsigned N_IMA    = 12;            // IMAs per tile
  localparam int unsigned IMA_W    = 4;
  localparam int unsigned XBAR_N   = 128;           // crossbar rows = columns
  localparam int unsigned ROW_W    = $clog2(XBAR_N);

  // ---------------- data and packets ----------------
  localparam int unsigned DATA_W   = 16;            // fixed-point value
  localparam int unsigned FRAC_W   = 8;             // fraction bits (Q8.8)
  localparam int unsigned KEY_W    = 16;            // LFSR width = flits per full packet
  localparam int unsigned CNT_W    = $clog2(KEY_W + 1);
  localparam int unsigned N_SEG    = XBAR_N / KEY_W; // 16-row segments per crossbar
  localparam int unsigned SEG_W    = $clog2(N_SEG);
  localparam int unsigned PROB_W   = 4;             // drop probability in 1/16 steps

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic [KEY_W-1:0]         key_t;
  typedef logic [N_PE-1:0]          pe_mask_t;

  // Head flit contents.
  typedef struct packed {
    pe_mask_t                 dest;     // multicast destination set (one bit per PE)
    logic [PE_W-1:0]          src_pe;
    logic [TILE_W-1:0]        src_tile;
    logic [TILE_W-1:0]        dst_tile; // tile inside every destination PE
    logic [IMA_W-1:0]         dst_ima;  // IMA inside that tile
    logic [SEG_W-1:0]         dst_seg;  // which 16 crossbar rows: R = seg*16 + i
    key_t                     key;      // k_1 is key[0]; k_i = 0 means d_i omitted
  } header_t;

  localparam int unsigned PAY_W = $bits(header_t);

  typedef struct packed {
    logic             head;
    logic [PAY_W-1:0] payload;
  } flit_t;

  // ---------------- router ports ----------------
  localparam int unsigned N_PORT = 7;
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_XP    = 3'd1,   // +x (east)
    P_XM    = 3'd2,   // -x (west)
    P_YP    = 3'd3,   // +y (north)
    P_YM    = 3'd4,   // -y (south)
    P_ZP    = 3'd5,   // +z (tier above, vertical link)
    P_ZM    = 3'd6    // -z (tier below, vertical link)
  } port_e;

  // ---------------- configuration bus ----------------
  typedef enum logic [2:0] {
    CFG_WEIGHT = 3'd0,  // data[15:0] -> weight (ima,row,col)
    CFG_INPUT  = 3'd1,  // data[15:0] -> input row buffer (ima,row)
    CFG_DEST   = 3'd2,  // data[35:0] dest mask, data[37:36] dst_tile
    CFG_DROP   = 3'd3,  // data[3:0] drop threshold (P = thr/16), data[4] drop enable
    CFG_LFSR   = 3'd4,  // data[15:0] seed, data[31:16] taps
    CFG_IMA_EN = 3'd5   // data[11:0] IMAs whose outputs are sent each stage
  } cfg_op_e;

  typedef struct packed {
    logic [PE_W-1:0]   pe;
    logic [TILE_W-1:0] tile;
    cfg_op_e           op;
    logic [IMA_W-1:0]  ima;
    logic [ROW_W-1:0]  row;
    logic [ROW_W-1:0]  col;
    logic [63:0]       data;
  } cfg_t;

  // ---------------- helpers ----------------
  function automatic logic [CNT_W-1:0] popcount(input key_t k);
    logic [CNT_W-1:0] c;
    c = '0;
    for (int i = 0; i < KEY_W; i++) c += CNT_W'(k[i]);
    return c;
  endfunction

  function automatic int unsigned pe_x(input int unsigned id);
    return id % N_X;
  endfunction
  function automatic int unsigned pe_y(input int unsigned id);
    return (id / N_X) % N_Y;
  endfunction
  function automatic int unsigned pe_z(input int unsigned id);
    return id / (N_X * N_Y);
  endfunction

endpackage
