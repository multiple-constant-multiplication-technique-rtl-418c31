// tb_bin2csd: exhaustive check of the binary-to-CSD recoder.
//
// For every 8-bit two's-complement input the digits must add up to the input
// value (sum of d(i) * 2^i), no two neighbouring digits may both be non-zero,
// and the digit count must equal the number of non-zero digits of the
// non-adjacent form computed with the closed formula
// (x + (x>>1)) XOR (x>>1); together these pin down the unique CSD form.
// Two constants are also checked digit by digit.
module tb_bin2csd;
  import csd_pkg::*;

  localparam int W = 8;

  logic [W-1:0]       bin;
  csd_digit_t [W-1:0] csd;
  int checks = 0, failures = 0;

  bin2csd #(.W(W)) dut (.bin(bin), .csd(csd));

  // Digit i as an integer
  function automatic int dv(input int i);
    return !csd[i].nz ? 0 : (csd[i].neg ? -1 : 1);
  endfunction

  task automatic expect_digits(input int value, input int exp [W]);
    bin = W'(value);
    #1;
    for (int i = 0; i < W; i++) begin
      checks++;
      if (dv(i) != exp[i]) begin
        failures++;
        $display("%0d: digit %0d is %0d, expected %0d", value, i, dv(i), exp[i]);
      end
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (W - 1)); v < (1 << (W - 1)); v++) begin
      longint sum;
      int     nz, ref_nz;
      bit     adj;
      longint xh, x3, c;
      bin = W'(v);
      #1;
      sum = 0; nz = 0; adj = 0;
      for (int i = 0; i < W; i++) begin
        if (csd[i].nz) begin
          nz++;
          sum += csd[i].neg ? -(longint'(1) << i) : (longint'(1) << i);
          if (i > 0 && csd[i-1].nz) adj = 1;
        end
      end
      xh = longint'(v) >>> 1;
      x3 = longint'(v) + xh;
      c  = x3 ^ xh;
      ref_nz = $countones(c);
      checks++;
      if (sum != longint'(v)) begin
        failures++;
        $display("value mismatch: in=%0d digits sum to %0d", v, sum);
      end
      checks++;
      if (adj) begin
        failures++;
        $display("adjacent non-zero digits for %0d", v);
      end
      checks++;
      if (nz != ref_nz) begin
        failures++;
        $display("digit count for %0d: %0d, expected %0d", v, nz, ref_nz);
      end
    end
    // 19 = 16 + 4 - 1; digits listed from position 0 upwards
    expect_digits(19, '{-1, 0, 1, 0, 1, 0, 0, 0});
    // 43 = 64 - 16 - 4 - 1 (32 + 8 + 4 - 1 has neighbouring digits)
    expect_digits(43, '{-1, 0, -1, 0, -1, 0, 1, 0});
    // most negative value: a single -1 in the sign position
    expect_digits(-128, '{0, 0, 0, 0, 0, 0, 0, -1});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
