// tb_pipo_reg: checks the sample window register.
//
// Blocks of L = 3 samples are loaded at random clocks for an N = 4 tap window.
// After each load the window must hold the new block newest-first followed by
// the N-1 newest samples of all earlier blocks (zero before the first one),
// win_valid must follow load by one clock, and the window must not change
// between loads.
module tb_pipo_reg;
  localparam int L = 3, N = 4, XW = 8, WN = L + N - 1;

  logic clk = 0, rst_n = 0, load = 0;
  logic signed [XW-1:0] blk [L];
  logic win_valid;
  logic signed [XW-1:0] win [WN];
  int checks = 0, failures = 0;

  pipo_reg #(.L(L), .N(N), .XW(XW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [XW-1:0] hist [$];   // every sample loaded, oldest first
  bit loaded_last = 0;

  task automatic check_window();
    for (int q = 0; q < WN; q++) begin
      logic signed [XW-1:0] e;
      int idx;
      idx = hist.size() - 1 - q;
      e = (idx >= 0) ? hist[idx] : '0;
      checks++;
      if (win[q] !== e) begin
        failures++;
        $display("win[%0d]=%0d expected %0d", q, win[q], e);
      end
    end
  endtask

  initial begin
    foreach (blk[j]) blk[j] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      checks++;
      if (win_valid !== loaded_last) begin
        failures++;
        $display("win_valid=%0b expected %0b", win_valid, loaded_last);
      end
      check_window();
      load = ($urandom_range(0, 2) == 0);
      for (int j = 0; j < L; j++) blk[j] = XW'($urandom);
      if (load) for (int j = 0; j < L; j++) hist.push_back(blk[j]);
      loaded_last = load;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
