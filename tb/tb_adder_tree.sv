// tb_adder_tree: checks sums and latency of the pipelined adder tree.
//
// Three trees run side by side: K = 1, K = 5 (padding to 8) and K = 16.
// Random inputs, extreme values included, are applied every clock with
// random valid; every result must equal the sum computed in the testbench,
// and out_valid must follow in_valid by exactly max(1, clog2(K)) clocks.
module tb_adder_tree;
  localparam int IW = 16;

  logic clk = 0, rst_n = 0, in_valid = 0;
  int checks = 0, failures = 0;

  logic signed [IW-1:0] d1 [1];
  logic signed [IW-1:0] d5 [5];
  logic signed [IW-1:0] d16 [16];
  logic v1, v5, v16;
  logic signed [IW-1:0]   s1;
  logic signed [IW+2:0]   s5;
  logic signed [IW+3:0]   s16;

  adder_tree #(.K(1),  .IW(IW), .OW(IW))   u1  (.clk, .rst_n, .in_valid, .din(d1),  .out_valid(v1),  .sum(s1));
  adder_tree #(.K(5),  .IW(IW), .OW(IW+3)) dut (.clk, .rst_n, .in_valid, .din(d5),  .out_valid(v5),  .sum(s5));
  adder_tree #(.K(16), .IW(IW), .OW(IW+4)) u16 (.clk, .rst_n, .in_valid, .din(d16), .out_valid(v16), .sum(s16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results, indexed by the clock in which they must appear
  longint e1 [int], e5 [int], e16 [int];
  int cyc = 0;

  function automatic logic signed [IW-1:0] rnd();
    case ($urandom_range(0, 3))
      0:       return {1'b1, {(IW-1){1'b0}}};
      1:       return {1'b0, {(IW-1){1'b1}}};
      default: return IW'($urandom);
    endcase
  endfunction

  task automatic chk(input string what, input bit v, input longint s, ref longint e [int]);
    checks++;
    if (v !== e.exists(cyc)) begin
      failures++;
      $display("%s: out_valid=%0b at clock %0d, expected %0b", what, v, cyc, e.exists(cyc));
    end else if (v) begin
      checks++;
      if (s != e[cyc]) begin
        failures++;
        $display("%s: sum %0d expected %0d", what, s, e[cyc]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      longint a1, a5, a16;
      @(negedge clk);
      cyc++;
      chk("K=1", v1, s1, e1);
      chk("K=5", v5, s5, e5);
      chk("K=16", v16, s16, e16);
      in_valid = (n < 2990) && ($urandom_range(0, 4) != 0);
      a1 = 0; a5 = 0; a16 = 0;
      foreach (d1[i])  begin d1[i]  = rnd(); a1  += d1[i];  end
      foreach (d5[i])  begin d5[i]  = rnd(); a5  += d5[i];  end
      foreach (d16[i]) begin d16[i] = rnd(); a16 += d16[i]; end
      if (in_valid) begin
        e1[cyc + 1] = a1;
        e5[cyc + 3] = a5;
        e16[cyc + 4] = a16;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
