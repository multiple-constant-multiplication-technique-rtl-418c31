// tb_mcm_fir_top: end-to-end test of the top level at its default parameters
// (3-way, 3-tap filter, coefficients {19, 43, 19}, 8-bit data).
//
// The filter gets a random sample stream with full-rate stretches, stretches
// with gaps and one reset in the middle, and every serial output is compared
// with a direct convolution that restarts from zero history after the reset.
// At the same time the run-time CSD multiplier is given random operations.
// Each mechanism of the design is counted and must occur at least once:
//   full-rate blocks   a block whose samples came on consecutive clocks
//   input gaps         clocks without a sample inside a block
//   reset restart      a reset in mid-stream, after which history is zero
//   shared term        the 3-constant MCM block shares a sub-expression
//   back-to-back out   serial output continuing from one block to the next
//   digit skip         a multiply finishing in fewer clocks than digits
//   digit subtract     a multiply with a -1 digit (one's complement + carry)
//   zero coefficient   a multiply by 0 (one clock)
module tb_mcm_fir_top;
  localparam int XW = 8, CW = 8, PW = XW + CW, YW = PW + 2, L = 3, N = 3;
  localparam int H [N] = '{19, 43, 19};

  logic clk = 0, rst_n = 0;
  logic fir_in_valid = 0;
  logic signed [XW-1:0] fir_x = '0;
  logic fir_out_valid, fir_blk_valid;
  logic signed [YW-1:0] fir_y, fir_blk_y [L];
  logic mul_start = 0;
  logic signed [XW-1:0] mul_x = '0;
  logic signed [CW-1:0] mul_coef = '0;
  logic mul_busy, mul_done;
  logic signed [PW-1:0] mul_product;
  int checks = 0, failures = 0;

  mcm_fir_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_full_blocks = 0, n_gaps = 0, n_reset = 0, n_shared = 0, n_b2b = 0;
  int n_skip = 0, n_sub = 0, n_zero = 0;

  // ---------------- filter reference ----------------
  logic signed [XW-1:0] xs [$];
  int nout = 0;
  bit prev_ov = 0;

  function automatic longint ref_y(input int n);
    longint acc = 0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) acc += longint'(H[i]) * longint'(xs[n - i]);
    return acc;
  endfunction

  always @(negedge clk) begin
    if (!rst_n) begin
      prev_ov = 0;
    end else begin
      if (fir_out_valid) begin
        checks++;
        if (fir_y != YW'(ref_y(nout))) begin
          failures++;
          if (failures < 20) $display("y(%0d)=%0d expected %0d", nout, fir_y, ref_y(nout));
        end
        if (prev_ov && nout % L == 0) n_b2b++;
        nout++;
      end
      prev_ov = fir_out_valid;
    end
  end

  task automatic feed(input int count, input bit full);
    int in_blk = 0;
    bit gap_in_blk = 0;
    for (int n = 0; n < count; ) begin
      @(negedge clk);
      fir_in_valid = full || ($urandom_range(0, 2) != 0);
      if (fir_in_valid) begin
        fir_x = XW'($urandom);
        xs.push_back(fir_x);
        n++;
        in_blk++;
        if (in_blk == L) begin
          if (!gap_in_blk) n_full_blocks++;
          in_blk = 0;
          gap_in_blk = 0;
        end
      end else if (in_blk != 0) begin
        n_gaps++;
        gap_in_blk = 1;
      end
    end
    @(negedge clk);
    fir_in_valid = 0;
  endtask

  task automatic drain();
    repeat (20) @(negedge clk);
    checks++;
    if (nout != xs.size() - xs.size() % L) begin
      failures++;
      $display("%0d outputs for %0d samples", nout, xs.size());
    end
  endtask

  // ---------------- multiplier ----------------
  function automatic int nonzero_digits(input int c);
    longint h, t;
    h = longint'(c) >>> 1;
    t = longint'(c) + h;
    return $countones(t ^ h);
  endfunction

  function automatic bit has_neg_digit(input int c);
    longint h, t;
    h = longint'(c) >>> 1;
    t = longint'(c) + h;
    return ((h & (t ^ h)) != 0);
  endfunction

  bit mul_stop = 0;
  bit rst_hit = 0;   // a reset fell inside the current multiply
  always @(negedge clk) if (!rst_n) rst_hit = 1;
  initial begin : mul_driver
    wait (rst_n);
    while (!mul_stop) begin
      int xv, cv, cycles;
      xv = $signed(XW'($urandom));
      case ($urandom_range(0, 5))
        0:       cv = 0;
        1:       cv = 43;
        default: cv = $signed(CW'($urandom));
      endcase
      @(negedge clk);
      if (!rst_n) continue;
      mul_x = XW'(xv); mul_coef = CW'(cv); mul_start = 1;
      rst_hit = 0;
      @(negedge clk);
      mul_start = 0;
      cycles = 0;
      while (mul_busy) begin cycles++; @(negedge clk); end
      if (rst_hit) continue;
      checks++;
      if (!mul_done || mul_product != PW'(xv * cv) ||
          cycles != ((cv == 0) ? 1 : nonzero_digits(cv))) begin
        failures++;
        $display("multiply %0d*%0d: got %0d in %0d clocks", xv, cv, mul_product, cycles);
      end
      if (cv == 0) n_zero++;
      if (cycles < CW) n_skip++;
      if (has_neg_digit(cv)) n_sub++;
    end
  end

  // ---------------- sequence ----------------
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    if (dut.u_fir.g_mcm[2].u_mcm.NP > 0) n_shared++;
    feed(300, 1);
    feed(300, 0);
    feed(301, 1);      // ends one sample into a block
    drain();
    // reset in mid-stream: history starts again from zero
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    xs.delete();
    nout = 0;
    n_reset++;
    feed(150, 0);
    feed(150, 1);
    drain();
    mul_stop = 1;
    repeat (20) @(negedge clk);
    $display("mechanisms: full-rate blocks %0d, input gaps %0d, resets %0d, shared terms %0d, back-to-back blocks %0d, digit skips %0d, subtract digits %0d, zero coefficients %0d",
             n_full_blocks, n_gaps, n_reset, n_shared, n_b2b, n_skip, n_sub, n_zero);
    checks++; if (n_full_blocks == 0) begin failures++; $display("no full-rate block"); end
    checks++; if (n_gaps == 0)        begin failures++; $display("no input gap"); end
    checks++; if (n_reset == 0)       begin failures++; $display("no reset"); end
    checks++; if (n_shared == 0)      begin failures++; $display("no shared sub-expression"); end
    checks++; if (n_b2b == 0)         begin failures++; $display("no back-to-back output"); end
    checks++; if (n_skip == 0)        begin failures++; $display("no digit skip"); end
    checks++; if (n_sub == 0)         begin failures++; $display("no subtract digit"); end
    checks++; if (n_zero == 0)        begin failures++; $display("no zero coefficient"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
