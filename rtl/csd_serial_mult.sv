// csd_serial_mult: sequential CSD multiplier for a coefficient known only at
// run time.
//
// On start the coefficient is recoded to canonic signed digits (bin2csd) and
// kept in a digit register together with the multiplicand. Each clock the
// selection and skip logic picks the lowest remaining non-zero digit, at
// position p, and clears it; zero digits cost no clock. A 2:1 multiplexer
// feeds the adder either x << p or its one's complement, and the digit sign
// drives the adder's carry-in, so a -1 digit subtracts (~v + 1 = -v). The sum
// goes back into the product register. CSD has at most ceil(CW/2) non-zero
// digits, which bounds the run time.
//
// Interface: start/x/coef in (taken when start is high and busy low);
// busy, done (one-clock pulse) and product out. product holds x*coef, exact
// in XW+CW bits, from done until the next start.
// Timing: busy for max(1, number of non-zero digits) clocks, done in the clock
// after. Positioning x by the digit index, instead of shifting the product
// register, is this design's choice. Reset is synchronous, active low.
module csd_serial_mult
  import csd_pkg::*;
#(
  parameter int unsigned XW = 8,
  parameter int unsigned CW = 8,
  localparam int unsigned PW = XW + CW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [XW-1:0] x,
  input  logic signed [CW-1:0] coef,
  output logic                 busy,
  output logic                 done,
  output logic signed [PW-1:0] product
);

  localparam int unsigned PSW = (CW > 1) ? $clog2(CW) : 1;

  csd_digit_t [CW-1:0] coef_csd;   // recoded coefficient
  csd_digit_t [CW-1:0] digits;     // digits still to be applied
  logic signed [PW-1:0] xs;        // multiplicand, sign-extended

  bin2csd #(.W(CW)) u_recode (.bin(coef), .csd(coef_csd));

  // Selection and skip logic: lowest non-zero digit.
  logic            any_nz;
  logic [PSW-1:0]  pos;
  logic            sel_neg;
  logic [CW-1:0]   nz_mask;

  always_comb begin
    any_nz  = 1'b0;
    pos     = '0;
    for (int i = 0; i < int'(CW); i++) nz_mask[i] = digits[i].nz;
    for (int i = int'(CW) - 1; i >= 0; i--)
      if (digits[i].nz) begin
        any_nz = 1'b1;
        pos    = PSW'(i);
      end
    sel_neg = digits[pos].neg;
  end

  // 2:1 multiplexer between the shifted operand and its one's complement,
  // carry-in completes the negation.
  logic signed [PW-1:0] operand;
  logic signed [PW-1:0] addend;
  assign operand = xs <<< pos;
  assign addend  = sel_neg ? ~operand : operand;

  logic last;  // no non-zero digit left after this clock
  assign last = ((nz_mask & ~(CW'(any_nz) << pos)) == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) busy <= 1'b1;
      end else if (last) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!busy) begin
      if (start) begin
        digits  <= coef_csd;
        xs      <= PW'(x);
        product <= '0;
      end
    end else if (any_nz) begin
      product         <= product + addend + PW'(sel_neg);
      digits[pos].nz  <= 1'b0;
    end
  end

endmodule
