// csd_pkg: shared types and elaboration-time helpers for canonic signed digit
// (CSD) arithmetic.
//
// A CSD digit takes a value in {-1, 0, +1}; in hardware it is carried as the
// packed pair {nz, neg} (nz = digit is non-zero, neg = digit is -1). A number
// of W two's-complement bits recodes into W CSD digits, digit i weighing 2^i,
// with no two adjacent digits non-zero.
//
// csd_digit() walks the binary-to-CSD recoding flowchart one bit at a time:
// it looks at the bit pair x(i+1) x(i) together with a carry, treats the bit
// above the sign bit as a copy of the sign bit, and emits digit c(i) and the
// next carry. The same steps are unrolled into gates by bin2csd; here they are
// evaluated while parameters are elaborated, to build the fixed shift-and-add
// networks of mcm_cse.
package csd_pkg;

  typedef struct packed {
    logic nz;   // digit is non-zero
    logic neg;  // digit is -1 (meaningful only when nz is set)
  } csd_digit_t;

  // Result of one recoding step: digit c(i) and the carry into step i+1.
  typedef struct packed {
    logic       carry;
    csd_digit_t digit;
  } csd_step_t;

  // One recoding step: bit pair {x(i+1), x(i)} and the incoming carry give
  // the digit and the outgoing carry.
  function automatic csd_step_t csd_step(input logic xi1, input logic xi, input logic carry_in);
    csd_step_t r;
    if (!carry_in) begin
      unique case ({xi1, xi})
        2'b01:   r = '{carry: 1'b0, digit: '{nz: 1'b1, neg: 1'b0}};
        2'b11:   r = '{carry: 1'b1, digit: '{nz: 1'b1, neg: 1'b1}};
        default: r = '{carry: 1'b0, digit: '{nz: 1'b0, neg: 1'b0}};  // 00, 10
      endcase
    end else begin
      unique case ({xi1, xi})
        2'b00:   r = '{carry: 1'b0, digit: '{nz: 1'b1, neg: 1'b0}};
        2'b10:   r = '{carry: 1'b1, digit: '{nz: 1'b1, neg: 1'b1}};
        default: r = '{carry: 1'b1, digit: '{nz: 1'b0, neg: 1'b0}};  // 01, 11
      endcase
    end
    return r;
  endfunction

  // Digit i (value -1, 0 or +1) of the CSD form of the W-bit two's-complement
  // number v. Bits of v above W-1 are ignored; bit W is taken as bit W-1.
  function automatic int csd_digit(input longint v, input int w, input int i);
    csd_step_t st;
    logic carry;
    carry = 1'b0;
    st = '0;
    for (int k = 0; k <= i; k++) begin
      st    = csd_step((k + 1 < w) ? v[k+1] : v[w-1], v[k], carry);
      carry = st.carry;
    end
    return !st.digit.nz ? 0 : (st.digit.neg ? -1 : 1);
  endfunction

endpackage
