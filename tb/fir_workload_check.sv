// fir_workload_check: one block FIR filter of N taps with a self-checking
// reference, used by tb_fir_lengths.
//
// The N coefficients are derived from their index with a fixed formula, so
// no table is stored: h(i) = h(N-1-i) = ((37*m + 11) * (N + 5)) mod 255 - 127
// for m = min(i, N-1-i), which gives a symmetric (linear-phase) set spread
// over the whole 8-bit range, -127 .. 127. Every serial output is compared
// with the direct convolution of the samples fed in; the running counts are
// brought out for the enclosing testbench.
module fir_workload_check #(
  parameter int unsigned L = 3,
  parameter int unsigned N = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [7:0]   x_in,
  output int                  checks,
  output int                  failures,
  output int                  outputs,
  output int                  latency_max
);
  localparam int unsigned XW = 8, CW = 8;
  localparam int unsigned YW = XW + CW + $clog2(N);

  typedef logic signed [CW-1:0] coef_arr_t [N];

  function automatic coef_arr_t make_coefs();
    coef_arr_t h;
    for (int i = 0; i < int'(N); i++) begin
      int m;
      m = (i < int'(N) - 1 - i) ? i : int'(N) - 1 - i;
      h[i] = CW'(((37 * m + 11) * (int'(N) + 5)) % 255 - 127);
    end
    return h;
  endfunction

  localparam coef_arr_t H = make_coefs();

  logic                 out_valid, blk_valid;
  logic signed [YW-1:0] y_out;
  logic signed [YW-1:0] blk_y [L];

  block_fir_mcm #(.L(L), .N(N), .XW(XW), .CW(CW), .H(H)) u_fir (
    .clk, .rst_n, .in_valid, .x_in, .out_valid, .y_out, .blk_valid, .blk_y
  );

  logic signed [XW-1:0] xs [$];
  int t_in [$];
  int cyc = 0;

  initial begin
    checks = 0; failures = 0; outputs = 0; latency_max = 0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) begin
      xs.push_back(x_in);
      t_in.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      longint acc;
      acc = 0;
      for (int i = 0; i < int'(N); i++)
        if (outputs - i >= 0) acc += longint'(H[i]) * longint'(xs[outputs - i]);
      checks++;
      if (y_out != YW'(acc)) begin
        failures++;
        if (failures < 10) $display("N=%0d y(%0d)=%0d expected %0d", N, outputs, y_out, acc);
      end
      if (outputs % int'(L) == 0) begin
        int idx, lat;
        idx = outputs + int'(L) - 1;
        lat = cyc - t_in[idx];
        if (lat > latency_max) latency_max = lat;
      end
      outputs++;
    end
  end
endmodule
