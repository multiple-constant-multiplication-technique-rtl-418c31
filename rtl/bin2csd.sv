// bin2csd: combinational binary-to-CSD recoder.
//
// Converts a W-bit two's-complement number into W canonic signed digits,
// digit i weighing 2^i. It is the recoding flowchart unrolled into a chain of
// W identical steps: step i reads the bit pair bin(i+1) bin(i) (bin(W) is a
// copy of the sign bit) and the carry from step i-1, and gives digit i and the
// carry into step i+1. The final carry is dropped, which keeps the value exact
// for every two's-complement input, the most negative one included.
//
// Interface: bin in, csd out; each digit is {nz, neg} (csd_pkg::csd_digit_t).
// Timing: purely combinational, a ripple of W carry steps. The digit
// encoding is this design's choice; the recoding rules follow the flowchart.
module bin2csd
  import csd_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]               bin,
  output csd_digit_t [W-1:0]         csd
);

  // bin with the sign bit repeated once above it (the flowchart's x*(W))
  logic [W:0] bin_x;
  assign bin_x = {bin[W-1], bin};

  always_comb begin
    csd_step_t st;
    logic carry;
    carry = 1'b0;
    for (int i = 0; i < W; i++) begin
      st     = csd_step(bin_x[i+1], bin_x[i], carry);
      csd[i] = st.digit;
      carry  = st.carry;
    end
  end

endmodule
