// adder_tree: pipelined balanced adder tree.
//
// Adds K signed inputs of IW bits into one OW-bit sum. The inputs are
// sign-extended and padded with zeros to the next power of two, then summed
// pairwise level by level with a register after every level, so the longest
// combinational path is a single adder whatever K is.
//
// Interface: in_valid/din in, out_valid/sum out. Timing: LV = max(1,
// clog2(K)) clocks from in_valid to out_valid, one new set of inputs accepted
// every clock. Only the valid pipeline is reset (synchronous, active low).
// OW must be at least IW + clog2(K) for the sum to be exact.
module adder_tree #(
  parameter int unsigned K  = 3,
  parameter int unsigned IW = 16,
  parameter int unsigned OW = 18,
  localparam int unsigned LV = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] din [K],
  output logic                 out_valid,
  output logic signed [OW-1:0] sum
);

  for (genvar l = 0; l < int'(LV); l++) begin : g_lvl
    localparam int unsigned NO = 2 ** (LV - l - 1);  // adders in this level
    logic signed [OW-1:0] a [2*NO];                  // level inputs
    logic signed [OW-1:0] s [NO];                    // level outputs (registered)
    if (l == 0) begin : g_in
      always_comb
        for (int i = 0; i < int'(2 * NO); i++)
          a[i] = (i < int'(K)) ? OW'(din[i]) : '0;
    end else begin : g_prev
      always_comb
        for (int i = 0; i < int'(2 * NO); i++)
          a[i] = g_lvl[l-1].s[i];
    end
    always_ff @(posedge clk)
      for (int i = 0; i < int'(NO); i++)
        s[i] <= a[2*i] + a[2*i+1];
  end

  logic [LV-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= (vld << 1) | LV'(in_valid);
  end

  assign out_valid = vld[LV-1];
  assign sum       = g_lvl[LV-1].s[0];

endmodule
