// tb_csd_serial_mult: checks products and clock counts of the serial CSD
// multiplier.
//
// Every 8-bit coefficient is multiplied with random multiplicands (and with
// the extremes -128 and 127). The product must equal x*coef, and busy must
// last max(1, k) clocks, where k is the number of non-zero digits of the
// coefficient's non-adjacent form, counted with the closed formula
// popcount((c + (c>>1)) XOR (c>>1)). done must pulse once, in the clock after
// busy falls.
module tb_csd_serial_mult;
  localparam int XW = 8, CW = 8, PW = XW + CW;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [XW-1:0] x = '0;
  logic signed [CW-1:0] coef = '0;
  logic busy, done;
  logic signed [PW-1:0] product;
  int checks = 0, failures = 0;

  csd_serial_mult #(.XW(XW), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nonzero_digits(input int c);
    longint h, t;
    h = longint'(c) >>> 1;
    t = longint'(c) + h;
    return $countones(t ^ h);
  endfunction

  task automatic run(input int xv, input int cv);
    int cycles, exp_cycles;
    @(negedge clk);
    x = XW'(xv);
    coef = CW'(cv);
    start = 1;
    @(negedge clk);
    start = 0;
    x = XW'($urandom);       // inputs may change once taken
    coef = CW'($urandom);
    cycles = 0;
    while (busy) begin
      cycles++;
      checks++;
      if (done) begin failures++; $display("done while busy"); end
      @(negedge clk);
    end
    exp_cycles = nonzero_digits(cv) > 0 ? nonzero_digits(cv) : 1;
    checks++;
    if (cycles != exp_cycles) begin
      failures++;
      $display("coef %0d: busy %0d clocks, expected %0d", cv, cycles, exp_cycles);
    end
    checks++;
    if (!done) begin failures++; $display("no done pulse"); end
    checks++;
    if (product != PW'(xv * cv)) begin
      failures++;
      $display("%0d * %0d = %0d, got %0d", xv, cv, xv * cv, product);
    end
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("done longer than one clock"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int cv = -128; cv < 128; cv++) begin
      run(-128, cv);
      run(127, cv);
      for (int r = 0; r < 4; r++) run($signed(XW'($urandom)), cv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
