// tb_sipo_reg: checks block gathering of the serial-in parallel-out register.
//
// Random samples are offered with random gaps (L = 4 here). After every L-th
// sample blk_valid must pulse for exactly one clock, one clock later, with the
// last L samples in blk (blk[0] oldest); blk_valid must stay low otherwise.
// A reset in mid-block must restart the count.
module tb_sipo_reg;
  localparam int L = 4, XW = 8;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [XW-1:0] x_in = '0;
  logic blk_valid;
  logic signed [XW-1:0] blk [L];
  int checks = 0, failures = 0;

  sipo_reg #(.L(L), .XW(XW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [XW-1:0] hist [$];
  int  cnt_in = 0;      // samples since reset
  bit  expect_blk = 0;  // a block completed in the previous clock
  logic signed [XW-1:0] exp_blk [L];

  // Reference: follow the inputs at every clock edge
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (blk_valid !== expect_blk) begin
        failures++;
        $display("blk_valid=%0b expected %0b at sample %0d", blk_valid, expect_blk, cnt_in);
      end
      if (expect_blk && blk_valid) begin
        for (int j = 0; j < L; j++) begin
          checks++;
          if (blk[j] !== exp_blk[j]) begin
            failures++;
            $display("blk[%0d]=%0d expected %0d", j, blk[j], exp_blk[j]);
          end
        end
      end
    end
    expect_blk <= 0;
    if (!rst_n) begin
      cnt_in = 0;
      hist.delete();
    end else if (in_valid) begin
      hist.push_back(x_in);
      cnt_in++;
      if (cnt_in % L == 0) begin
        expect_blk <= 1;
        for (int j = 0; j < L; j++) exp_blk[j] = hist[hist.size() - L + j];
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      x_in     = XW'($urandom);
      if (n == 1001) begin
        rst_n = 0;
        @(negedge clk);
        rst_n = 1;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
