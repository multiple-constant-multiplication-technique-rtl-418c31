// mcm_fir_top: multiplier-free block FIR filter with a run-time CSD
// multiplier beside it.
//
// Two independent parts share only the clock and reset:
//  * fir_*  : the L-parallel, N-tap block FIR filter (block_fir_mcm). Serial
//             samples in, serial outputs out, one per clock at full rate, with
//             each block of L outputs also shown in parallel. Its fixed
//             coefficients H become CSD shift-and-add networks at elaboration.
//  * mul_*  : the sequential CSD multiplier (csd_serial_mult), which recodes a
//             coefficient given at run time and applies one non-zero digit per
//             clock.
// Timing, widths and handshakes are those of the two parts; see their files.
// Defaults: a 3-way, 3-tap filter of 8-bit samples and 8-bit coefficients
// {19, 43, 19}; the coefficient values are this design's choice.
module mcm_fir_top #(
  parameter int unsigned L  = 3,
  parameter int unsigned N  = 3,
  parameter int unsigned XW = 8,
  parameter int unsigned CW = 8,
  parameter logic signed [CW-1:0] H [N] = '{8'sd19, 8'sd43, 8'sd19},
  localparam int unsigned PW = XW + CW,
  localparam int unsigned YW = PW + ((N > 1) ? $clog2(N) : 0)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // block FIR filter
  input  logic                 fir_in_valid,
  input  logic signed [XW-1:0] fir_x,
  output logic                 fir_out_valid,
  output logic signed [YW-1:0] fir_y,
  output logic                 fir_blk_valid,
  output logic signed [YW-1:0] fir_blk_y [L],
  // run-time CSD multiplier
  input  logic                 mul_start,
  input  logic signed [XW-1:0] mul_x,
  input  logic signed [CW-1:0] mul_coef,
  output logic                 mul_busy,
  output logic                 mul_done,
  output logic signed [PW-1:0] mul_product
);

  block_fir_mcm #(.L(L), .N(N), .XW(XW), .CW(CW), .H(H)) u_fir (
    .clk, .rst_n,
    .in_valid (fir_in_valid),
    .x_in     (fir_x),
    .out_valid(fir_out_valid),
    .y_out    (fir_y),
    .blk_valid(fir_blk_valid),
    .blk_y    (fir_blk_y)
  );

  csd_serial_mult #(.XW(XW), .CW(CW)) u_mul (
    .clk, .rst_n,
    .start  (mul_start),
    .x      (mul_x),
    .coef   (mul_coef),
    .busy   (mul_busy),
    .done   (mul_done),
    .product(mul_product)
  );

endmodule
