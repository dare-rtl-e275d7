// reram_ima: behavioural model of one in-situ multiply-accumulate unit (IMA).
//
// This is a behavioural model, not synthesizable logic: the real part is
// analog. An IMA holds 8 ReRAM crossbars of 128x128 cells with 2 bits per
// cell, 1-bit DACs on the 128 rows of each and 8 ADCs of 8 bits; the 8
// crossbars together hold a 128x128 matrix of 16-bit weights (8 x 2 bits), and
// the crossbars run at 10 MHz. Those numbers are the architecture's. The model
// keeps only what the rest of the design can observe: the weights, and the
// result of one matrix-vector product
//     out[c] = sat16( (sum_r in[r] * w[r][c]) >>> FRAC_W )   (Q8.8 values)
// with an ideal analog path: bit slicing, bit-serial input, ADC resolution and
// device noise are not modelled.
//
// Timing: start (when !busy) latches the input vector; the model produces one
// output column per clock and raises done for one clock after COLS clocks,
// when all outputs are valid and stay stable until the next start. At a
// 1 GHz logic clock a 10 MHz crossbar step is 100 clocks, the same order.
// Weights are written one per clock through wr_*; all weights start at zero.
module reram_ima
  import dare_pkg::*;
#(
  parameter int unsigned ROWS = XBAR_N,
  parameter int unsigned COLS = XBAR_N
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(ROWS)-1:0]  wr_row,
  input  logic [$clog2(COLS)-1:0]  wr_col,
  input  data_t                    wr_data,
  input  logic                     start,
  input  data_t                    in_vec [ROWS],
  output logic                     busy,
  output logic                     done,
  output data_t                    out_vec [COLS]
);

  localparam int unsigned ACC_W = 2 * DATA_W + $clog2(ROWS);
  localparam int unsigned CW    = (COLS > 1) ? $clog2(COLS) : 1;

  // one column of 16-bit weights per word
  logic [ROWS*DATA_W-1:0] wcol [COLS];
  data_t                  x_q  [ROWS];
  logic [CW-1:0]          col;

  initial for (int c = 0; c < COLS; c++) wcol[c] = '0;

  function automatic data_t sat(input logic signed [ACC_W-1:0] a);
    logic signed [ACC_W-1:0] s;
    s = a >>> FRAC_W;
    if (s > ACC_W'(32767))       return 16'sh7fff;
    else if (s < -ACC_W'(32768)) return 16'sh8000;
    else                         return data_t'(s);
  endfunction

  logic signed [ACC_W-1:0] acc;
  always_comb begin
    acc = '0;
    for (int r = 0; r < ROWS; r++)
      acc += ACC_W'(x_q[r]) * ACC_W'($signed(wcol[col][r*DATA_W +: DATA_W]));
  end

  always_ff @(posedge clk) begin
    if (wr_en) wcol[wr_col][wr_row*DATA_W +: DATA_W] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      col  <= '0;
      for (int r = 0; r < ROWS; r++) x_q[r] <= '0;
      for (int c = 0; c < COLS; c++) out_vec[c] <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        out_vec[col] <= sat(acc);
        if (col == CW'(COLS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        col <= col + 1'b1;
      end else if (start) begin
        for (int r = 0; r < ROWS; r++) x_q[r] <= in_vec[r];
        col  <= '0;
        busy <= 1'b1;
      end
    end
  end

endmodule
