// mcm_cse: multiple constant multiplication (MCM) of one input by a fixed set
// of constants, built from CSD shift-and-add terms with shared
// sub-expressions.
//
// Each constant COEFS[FIRST+c] is recoded to CSD while parameters are
// elaborated; every non-zero digit d at position b is a term d*(x << b), so a
// product costs one adder or subtractor per non-zero digit beyond the first.
// To share work across the set, the block looks for the two-digit pattern
// {1 0..0 1} or {1 0..0 -1} (upper digit D places above the lower one) that
// occurs most often, counting non-overlapping occurrences over all the
// constants. If it occurs at least twice, sub = (x << D) +/- x is built once
// and each occurrence becomes a single term +/-(sub << b). The search is then
// repeated on the digits still unused, up to MAXP shared sub-expressions,
// until no pattern occurs twice.
// Example: 19 = {1 0 1 0 -1} and 43 = {1 0 -1 0 -1 0 -1} both contain
// {1 0 -1}, so sub = 4x - x = 3x; 19x = (x << 4) + 3x and
// 43x = (3x << 4) - (x << 2) - x.
// With one constant (NC = 1) the block is a single constant multiplier, and
// shares patterns that recur inside that constant.
//
// Interface: x (signed XW bits) in; p[c] = x * COEFS[FIRST+c] out, signed and
// exact in XW+CW bits. The constants are taken from COEFS[FIRST ..
// FIRST+NC-1], so a caller can hand over a slice of a longer coefficient
// list. Timing: purely combinational.
// The sharing rule (two-digit patterns, all occurrences of a pattern built
// from one sub-expression) follows the published method; the greedy order by
// count and the limit MAXP are this design's choices.
module mcm_cse
  import csd_pkg::*;
#(
  parameter int unsigned XW    = 8,
  parameter int unsigned CW    = 8,
  parameter int unsigned NC    = 2,
  parameter int unsigned NH    = NC,
  parameter int unsigned FIRST = 0,
  parameter logic signed [CW-1:0] COEFS [NH] = '{8'sd19, 8'sd43},
  parameter int unsigned MAXP  = 4,
  localparam int unsigned PW = XW + CW
) (
  input  logic signed [XW-1:0] x,
  output logic signed [PW-1:0] p [NC]
);

  // ---------------------------------------------------------------------
  // Elaboration-time pattern search
  // ---------------------------------------------------------------------
  // A pattern is packed as d*2 + (s > 0): d = distance between its two digits,
  // s = product of their signs (+1 for {1 0..0 1}, -1 for {1 0..0 -1}).
  // A list holds up to MAXP patterns, 8 bits each, pattern 0 in the low bits.

  typedef logic [MAXP*8-1:0] pat_list_t;

  function automatic int dig(input int c, input int b);
    return csd_digit(longint'(COEFS[FIRST+c]), CW, b);
  endfunction

  // Term code of digit b of constant c when the first np patterns of the
  // list are extracted, in list order, each scanning the digits from the LSB
  // and using every digit at most once:
  //   0          no term, or the upper digit of a pattern occurrence
  //   +1/-1      plain digit: +/-(x << b)
  //   +/-(2+p)   lower digit of an occurrence of pattern p: +/-(sub_p << b),
  //              the sign being that of the upper digit
  function automatic int term_code(input int c, input int b, input pat_list_t pats, input int np);
    int dg   [CW];
    int code [CW];
    bit used [CW];
    for (int k = 0; k < CW; k++) begin
      dg[k]   = dig(c, k);
      code[k] = 0;
      used[k] = 1'b0;
    end
    for (int pi = 0; pi < np; pi++) begin
      int d, s;
      d = int'(pats[pi*8 +: 8]) / 2;
      s = (pats[pi*8] == 1'b1) ? 1 : -1;
      for (int k = 0; k + d < CW; k++) begin
        if (dg[k] != 0 && !used[k] && dg[k + d] != 0 && !used[k + d] &&
            dg[k] * dg[k + d] == s) begin
          used[k]     = 1'b1;
          used[k + d] = 1'b1;
          code[k]     = dg[k + d] * (2 + pi);
        end
      end
    end
    for (int k = 0; k < CW; k++)
      if (dg[k] != 0 && !used[k]) code[k] = dg[k];
    return code[b];
  endfunction

  // Occurrences of pattern np of the list once patterns 0..np-1 are taken.
  function automatic int count_pattern(input pat_list_t pats, input int np);
    int n = 0;
    for (int c = 0; c < NC; c++)
      for (int b = 0; b < CW; b++) begin
        int t;
        t = term_code(c, b, pats, np + 1);
        if (t == 2 + np || t == -(2 + np)) n++;
      end
    return n;
  endfunction

  // Greedy extraction: repeatedly add the pattern with the most
  // occurrences, as long as it occurs at least twice.
  function automatic pat_list_t choose_patterns();
    pat_list_t pats = '0;
    for (int np = 0; np < int'(MAXP); np++) begin
      int best   = 0;
      int best_n = 1;
      for (int d = 1; d < CW; d++)
        for (int si = 0; si < 2; si++) begin
          int n;
          pats[np*8 +: 8] = 8'(d * 2 + si);
          n = count_pattern(pats, np);
          if (n > best_n) begin
            best_n = n;
            best   = d * 2 + si;
          end
        end
      pats[np*8 +: 8] = 8'(best);
      if (best == 0) break;
    end
    return pats;
  endfunction

  function automatic int count_list(input pat_list_t pats);
    int n = 0;
    for (int pi = 0; pi < int'(MAXP); pi++)
      if (pats[pi*8 +: 8] != 8'd0 && n == pi) n++;
    return n;
  endfunction

  localparam pat_list_t PATS = choose_patterns();
  localparam int        NP   = count_list(PATS);   // shared sub-expressions built

  // ---------------------------------------------------------------------
  // Datapath
  // ---------------------------------------------------------------------

  logic signed [PW-1:0] xe;   // x sign-extended to product width
  assign xe = PW'(x);

  // Shared sub-expressions sub_p = (x << d_p) +/- x
  if (NP > 0) begin : g_sub
    logic signed [PW-1:0] s [NP];
    for (genvar gp = 0; gp < NP; gp++) begin : g_pat
      localparam int D = int'(PATS[gp*8 +: 8]) / 2;
      if (PATS[gp*8]) begin : g_add
        assign s[gp] = (xe <<< D) + xe;
      end else begin : g_subtract
        assign s[gp] = (xe <<< D) - xe;
      end
    end
  end

  for (genvar c = 0; c < NC; c++) begin : g_const
    logic signed [PW-1:0] term [CW];
    for (genvar b = 0; b < CW; b++) begin : g_digit
      localparam int CODE = term_code(c, b, PATS, NP);
      if (CODE == 1) begin : g_pos
        assign term[b] = xe <<< b;
      end else if (CODE == -1) begin : g_neg
        assign term[b] = -(xe <<< b);
      end else if (CODE >= 2) begin : g_spos
        assign term[b] = g_sub.s[CODE-2] <<< b;
      end else if (CODE <= -2) begin : g_sneg
        assign term[b] = -(g_sub.s[-CODE-2] <<< b);
      end else begin : g_zero
        assign term[b] = '0;
      end
    end
    always_comb begin
      p[c] = '0;
      for (int b = 0; b < CW; b++) p[c] = p[c] + term[b];
    end
  end

endmodule
