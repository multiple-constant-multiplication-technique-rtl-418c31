// block_fir_mcm: L-parallel block FIR filter of N taps whose constant
// multiplications are CSD shift-and-add networks with shared sub-expressions.
//
//   y(n) = sum_{i=0}^{N-1} H[i] * x(n-i)
//
// Samples arrive serially and are gathered into blocks of L by a
// serial-in parallel-out register (sipo_reg). A window register (pipo_reg)
// then holds the block and the N-1 samples before it. Window sample q
// (q = 0 the newest) contributes to the outputs of the block through the
// coefficients H[i] with max(0, q-L+1) <= i <= min(q, N-1), so each window
// sample drives one multiple constant multiplication block (mcm_cse) over
// that run of coefficients: the newest and oldest samples meet one
// coefficient each (single constant multipliers), the middle ones up to
// min(L, N). With L = N = 3 these are five blocks over {H0}, {H0,H1},
// {H0,H1,H2}, {H1,H2} and {H2}. Output j of the block,
// y(Lk+j) = sum_i H[i] * win[L-1-j+i], is summed by its own adder tree
// (adder_tree), and a parallel-in serial-out register (piso_reg) sends the L
// outputs out in order, one per clock. No general multiplier is used.
//
// Pipelining: window register, product register, one register per adder tree
// level, output register. Latency from the clock in which the last sample of
// a block is offered to the clock in which the block's first output appears
// on y_out is LAT = 4 + max(1, clog2(N)) clocks. At one sample per clock the
// filter gives one output per clock; gaps in the input simply delay blocks.
// blk_valid/blk_y show each block of L outputs in parallel one clock before
// the serial output starts.
//
// Widths: samples and coefficients are signed, products exact in XW+CW bits,
// outputs exact in XW+CW+clog2(N) bits, with no rounding. Reset is
// synchronous, active low, and zeroes the sample history.
// The structure (SIPO, window register, MCM blocks, adder trees, PISO) is the
// published one; the window register shared by all MCM blocks, the positions
// of the pipeline registers, the widths, the handshake and the default
// coefficients are this design's choices.
module block_fir_mcm #(
  parameter int unsigned L  = 3,
  parameter int unsigned N  = 3,
  parameter int unsigned XW = 8,
  parameter int unsigned CW = 8,
  parameter logic signed [CW-1:0] H [N] = '{8'sd19, 8'sd43, 8'sd19},
  localparam int unsigned PW = XW + CW,
  localparam int unsigned YW = PW + ((N > 1) ? $clog2(N) : 0)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] x_in,
  output logic                 out_valid,
  output logic signed [YW-1:0] y_out,
  output logic                 blk_valid,
  output logic signed [YW-1:0] blk_y [L]
);

  localparam int unsigned WN = L + N - 1;

  // Lowest coefficient index used by window sample q, and how many.
  function automatic int lo_of(input int q);
    return (q - int'(L) + 1 > 0) ? q - int'(L) + 1 : 0;
  endfunction
  function automatic int nc_of(input int q);
    int hi;
    hi = (q < int'(N) - 1) ? q : int'(N) - 1;
    return hi - lo_of(q) + 1;
  endfunction

  // ---------------------------------------------------------------------
  // Input: serial to parallel, then the sample window
  // ---------------------------------------------------------------------
  logic                 sblk_valid;
  logic signed [XW-1:0] sblk [L];
  logic                 win_valid;
  logic signed [XW-1:0] win [WN];

  sipo_reg #(.L(L), .XW(XW)) u_sipo (
    .clk, .rst_n, .in_valid, .x_in,
    .blk_valid(sblk_valid), .blk(sblk)
  );

  pipo_reg #(.L(L), .N(N), .XW(XW)) u_pipo (
    .clk, .rst_n, .load(sblk_valid), .blk(sblk),
    .win_valid, .win
  );

  // ---------------------------------------------------------------------
  // Computational block: one MCM block per window sample, registered
  // products, one adder tree per output
  // ---------------------------------------------------------------------
  logic                 prod_valid;
  // prod[i][j]: H[i] times the window sample that output j needs
  logic signed [PW-1:0] prod [N][L];

  always_ff @(posedge clk) begin
    if (!rst_n) prod_valid <= 1'b0;
    else        prod_valid <= win_valid;
  end

  for (genvar q = 0; q < int'(WN); q++) begin : g_mcm
    localparam int LO = lo_of(q);
    localparam int NC = nc_of(q);
    logic signed [PW-1:0] p [NC];

    mcm_cse #(
      .XW(XW), .CW(CW), .NC(NC), .NH(N), .FIRST(LO), .COEFS(H)
    ) u_mcm (
      .x(win[q]), .p(p)
    );

    // Product H[LO+c] * win[q] belongs to output j = L-1-q+LO+c.
    for (genvar c = 0; c < NC; c++) begin : g_reg
      always_ff @(posedge clk)
        prod[LO+c][int'(L)-1-q+LO+c] <= p[c];
    end
  end

  logic                 tree_valid [L];

  for (genvar j = 0; j < int'(L); j++) begin : g_out
    logic signed [PW-1:0] terms [N];
    always_comb
      for (int i = 0; i < int'(N); i++) terms[i] = prod[i][j];

    adder_tree #(.K(N), .IW(PW), .OW(YW)) u_tree (
      .clk, .rst_n, .in_valid(prod_valid), .din(terms),
      .out_valid(tree_valid[j]), .sum(blk_y[j])
    );
  end

  assign blk_valid = tree_valid[0];

  // ---------------------------------------------------------------------
  // Output: parallel to serial
  // ---------------------------------------------------------------------
  piso_reg #(.L(L), .W(YW)) u_piso (
    .clk, .rst_n, .load(blk_valid), .din(blk_y),
    .out_valid, .dout(y_out)
  );

endmodule
