// tb_piso_reg: checks the parallel-in serial-out register.
//
// Blocks of L = 4 words are loaded either back to back (every L clocks, the
// filter's full rate) or with idle clocks between them. Each word must come
// out in order, din[0] first, starting one clock after load, with out_valid
// high exactly while words remain.
module tb_piso_reg;
  localparam int L = 4, W = 12;

  logic clk = 0, rst_n = 0, load = 0;
  logic signed [W-1:0] din [L];
  logic out_valid;
  logic signed [W-1:0] dout;
  int checks = 0, failures = 0;

  piso_reg #(.L(L), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [W-1:0] expq [$];   // words still due, in order

  initial begin
    foreach (din[j]) din[j] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int blkn = 0; blkn < 300; blkn++) begin
      int gap;
      gap = ($urandom_range(0, 1) == 0) ? 0 : $urandom_range(1, 5);
      // load
      @(negedge clk);
      checks++;
      if (out_valid !== (expq.size() != 0)) begin
        failures++; $display("out_valid wrong before load");
      end
      if (out_valid) begin
        checks++;
        if (dout !== expq.pop_front()) begin failures++; $display("word mismatch"); end
      end
      load = 1;
      for (int j = 0; j < L; j++) begin din[j] = W'($urandom); expq.push_back(din[j]); end
      // shift out
      for (int c = 0; c < L - 1 + gap; c++) begin
        @(negedge clk);
        load = 0;
        checks++;
        if (out_valid !== (expq.size() != 0)) begin
          failures++; $display("out_valid=%0b, %0d words due", out_valid, expq.size());
        end
        if (out_valid && expq.size() != 0) begin
          logic signed [W-1:0] e;
          e = expq.pop_front();
          checks++;
          if (dout !== e) begin failures++; $display("dout=%0d expected %0d", dout, e); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
