// sipo_reg: serial-in parallel-out register that gathers blocks of L samples.
//
// Each sample offered with in_valid shifts into an L-deep register, newest at
// the top. A modulo-L counter marks the L-th sample of a block; in the clock
// after it, blk_valid is high for one cycle and blk holds the whole block,
// blk[0] the oldest sample and blk[L-1] the newest. blk stays valid for that
// whole cycle, even if the next sample arrives in it.
//
// Interface: in_valid/x_in in, blk_valid/blk out. Timing: one clock from the
// L-th sample to blk_valid. Samples may arrive with gaps; there is no
// back-pressure. Reset (synchronous, active low) restarts block counting.
module sipo_reg #(
  parameter int unsigned L  = 3,
  parameter int unsigned XW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] x_in,
  output logic                 blk_valid,
  output logic signed [XW-1:0] blk [L]
);

  localparam int unsigned CNTW = (L > 1) ? $clog2(L) : 1;

  logic [CNTW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      blk_valid <= 1'b0;
    end else begin
      blk_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == CNTW'(L - 1)) begin
          cnt       <= '0;
          blk_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // Shift register: no reset needed, blk is only read with blk_valid.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int k = 0; k < int'(L) - 1; k++) blk[k] <= blk[k+1];
      blk[L-1] <= x_in;
    end
  end

endmodule
