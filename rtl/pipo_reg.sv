// pipo_reg: parallel-in parallel-out window register of a block FIR filter.
//
// Holds the L+N-1 input samples that one block of L outputs of an N-tap
// filter needs: the L samples of the current block and the N-1 samples just
// before it. On load the new block replaces the window and the newest N-1
// samples of the previous window slide down behind it, so the filter never
// re-reads old input. Element q of win is the sample q places before the
// newest one: win[0] = x(Lk+L-1) down to win[L+N-2] = x(Lk-N+1).
//
// Interface: load/blk in (blk[0] oldest, as from sipo_reg); win_valid/win out.
// Timing: win and win_valid change one clock after load; win is held until the
// next load. Reset (synchronous, active low) clears the history to zero, so the
// first outputs see zero input before the first sample.
module pipo_reg #(
  parameter int unsigned L  = 3,
  parameter int unsigned N  = 3,
  parameter int unsigned XW = 8,
  localparam int unsigned WN = L + N - 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [XW-1:0] blk [L],
  output logic                 win_valid,
  output logic signed [XW-1:0] win [WN]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win_valid <= 1'b0;
      for (int q = 0; q < int'(WN); q++) win[q] <= '0;
    end else begin
      win_valid <= load;
      if (load) begin
        for (int q = 0; q < int'(L); q++)       win[q] <= blk[L-1-q];
        for (int q = int'(L); q < int'(WN); q++) win[q] <= win[q-L];
      end
    end
  end

endmodule
