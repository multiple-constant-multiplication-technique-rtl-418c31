// tb_fir_lengths: runs the block FIR filter at the three filter lengths of
// the comparison, N = 16, 32 and 64 taps, each as a 3-way block filter.
//
// All three filters get the same random 8-bit stream, at full rate for the
// first half and with random gaps afterwards. Each output is checked against
// a direct convolution (fir_workload_check), every filter must deliver one
// output per sample of every complete block, and the latency of a block must
// be 4 + clog2(N) clocks.
module tb_fir_lengths;
  localparam int L = 3, NSAMP = 1200;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [7:0] x_in = '0;
  int c16, f16, o16, l16, c32, f32, o32, l32, c64, f64, o64, l64;
  int checks = 0, failures = 0;

  fir_workload_check #(.L(L), .N(16)) u16 (.clk, .rst_n, .in_valid, .x_in,
    .checks(c16), .failures(f16), .outputs(o16), .latency_max(l16));
  fir_workload_check #(.L(L), .N(32)) u32 (.clk, .rst_n, .in_valid, .x_in,
    .checks(c32), .failures(f32), .outputs(o32), .latency_max(l32));
  fir_workload_check #(.L(L), .N(64)) u64 (.clk, .rst_n, .in_valid, .x_in,
    .checks(c64), .failures(f64), .outputs(o64), .latency_max(l64));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NSAMP; ) begin
      @(negedge clk);
      in_valid = (n < NSAMP / 2) || ($urandom_range(0, 3) != 0);
      x_in = 8'($urandom);
      if (in_valid) n++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (30) @(negedge clk);
    checks += c16 + c32 + c64;
    failures += f16 + f32 + f64;
    expect_eq("outputs N=16", o16, NSAMP);
    expect_eq("outputs N=32", o32, NSAMP);
    expect_eq("outputs N=64", o64, NSAMP);
    expect_eq("latency N=16", l16, 4 + 4);
    expect_eq("latency N=32", l32, 4 + 5);
    expect_eq("latency N=64", l64, 4 + 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
