// tb_block_fir_mcm: checks the block FIR filter against a direct convolution.
//
// Two filters run on the same random input stream: the default 3-way, 3-tap
// filter and a 4-way, 5-tap one with other coefficients, negative and
// extreme ones included. The stream has full-rate stretches (a sample every
// clock) and stretches with random gaps. Every serial output is compared, in
// order, with y(n) = sum_i H[i] x(n-i) (x = 0 before the first sample), and
// every parallel block with the same values. It also checks:
//  * latency: the first output of a block appears LAT = 4 + max(1, clog2(N))
//    clocks after the clock that offered the block's last sample;
//  * rate: during full-rate input the serial output never pauses once it has
//    started.
module tb_block_fir_mcm;
  localparam int XW = 8, CW = 8, PW = XW + CW;
  localparam int L1 = 3, N1 = 3, Y1 = PW + 2;
  localparam int L2 = 4, N2 = 5, Y2 = PW + 3;
  localparam logic signed [CW-1:0] H1 [N1] = '{8'sd19, 8'sd43, 8'sd19};
  localparam logic signed [CW-1:0] H2 [N2] = '{-8'sd128, 8'sd87, 8'sd127, -8'sd45, 8'sd3};
  localparam int NSAMP = 3000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [XW-1:0] x_in = '0;
  logic ov1, bv1, ov2, bv2;
  logic signed [Y1-1:0] y1, by1 [L1];
  logic signed [Y2-1:0] y2, by2 [L2];
  int checks = 0, failures = 0;

  block_fir_mcm dut (.clk, .rst_n, .in_valid, .x_in, .out_valid(ov1), .y_out(y1),
                     .blk_valid(bv1), .blk_y(by1));
  block_fir_mcm #(.L(L2), .N(N2), .XW(XW), .CW(CW), .H(H2)) u2 (
    .clk, .rst_n, .in_valid, .x_in, .out_valid(ov2), .y_out(y2), .blk_valid(bv2), .blk_y(by2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [XW-1:0] xs [$];   // every sample offered
  int last_of_block [$];          // clock at which sample n was offered
  int cyc = 0;
  bit full_rate = 0;

  function automatic longint ref_y(input int n, input int nt, input logic signed [CW-1:0] h [],
                                   input int sel);
    longint acc = 0;
    for (int i = 0; i < nt; i++)
      if (n - i >= 0) acc += longint'(h[i]) * longint'(xs[n - i]);
    return acc;
  endfunction

  logic signed [CW-1:0] h1d [], h2d [];
  int n1 = 0, n2 = 0;     // next serial output index
  int b1 = 0, b2 = 0;     // next parallel block index
  int lat_checked1 = 0, lat_checked2 = 0, gaps_seen = 0, paused = 0;
  bit started1 = 0, started2 = 0;

  always @(negedge clk) if (rst_n) begin
    // serial outputs
    if (ov1) begin
      checks++;
      if (y1 != Y1'(ref_y(n1, N1, h1d, 1))) begin
        failures++; if (failures < 20) $display("L3N3 y(%0d)=%0d expected %0d", n1, y1, ref_y(n1, N1, h1d, 1));
      end
      if (n1 % L1 == 0) begin
        checks++; lat_checked1++;
        if (cyc - last_of_block[n1 + L1 - 1] != 4 + 2) begin
          failures++; $display("L3N3 latency %0d", cyc - last_of_block[n1 + L1 - 1]);
        end
      end
      n1++;
      started1 = 1;
    end else if (started1 && full_rate && n1 % L1 != 0) begin
      paused++;
    end
    if (ov2) begin
      checks++;
      if (y2 != Y2'(ref_y(n2, N2, h2d, 2))) begin
        failures++; if (failures < 20) $display("L4N5 y(%0d)=%0d expected %0d", n2, y2, ref_y(n2, N2, h2d, 2));
      end
      if (n2 % L2 == 0) begin
        checks++; lat_checked2++;
        if (cyc - last_of_block[n2 + L2 - 1] != 4 + 3) begin
          failures++; $display("L4N5 latency %0d", cyc - last_of_block[n2 + L2 - 1]);
        end
      end
      n2++;
    end
    // parallel blocks
    if (bv1) begin
      for (int j = 0; j < L1; j++) begin
        checks++;
        if (by1[j] != Y1'(ref_y(b1 * L1 + j, N1, h1d, 1))) begin failures++; $display("L3N3 block %0d[%0d]", b1, j); end
      end
      b1++;
    end
    if (bv2) begin
      for (int j = 0; j < L2; j++) begin
        checks++;
        if (by2[j] != Y2'(ref_y(b2 * L2 + j, N2, h2d, 2))) begin failures++; $display("L4N5 block %0d[%0d]", b2, j); end
      end
      b2++;
    end
  end

  initial begin
    h1d = new[N1]; h2d = new[N2];
    foreach (H1[i]) h1d[i] = H1[i];
    foreach (H2[i]) h2d[i] = H2[i];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NSAMP; ) begin
      @(negedge clk);
      cyc++;
      full_rate = (n < 600) || (n >= 1500 && n < 2100);
      in_valid = full_rate || ($urandom_range(0, 2) != 0);
      if (!in_valid) gaps_seen++;
      if (in_valid) begin
        x_in = (n % 97 == 5) ? -8'sd128 : (n % 89 == 7) ? 8'sd127 : XW'($urandom);
        xs.push_back(x_in);
        last_of_block.push_back(cyc);
        n++;
      end
    end
    @(negedge clk);
    cyc++;
    in_valid = 0;
    full_rate = 0;
    repeat (40) begin @(negedge clk); cyc++; end
    checks++;
    if (n1 != NSAMP - NSAMP % L1 || n2 != NSAMP - NSAMP % L2) begin
      failures++; $display("output count %0d / %0d", n1, n2);
    end
    checks++;
    if (paused != 0) begin failures++; $display("serial output paused %0d times at full rate", paused); end
    checks++;
    if (gaps_seen == 0 || lat_checked1 == 0 || lat_checked2 == 0) begin failures++; $display("stimulus incomplete"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
