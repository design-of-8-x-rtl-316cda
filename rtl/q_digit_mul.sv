// Single-digit quaternary multiplier.
//
// Multiplies two quaternary digits a and b. The product lies in 0..9 and is
// returned as two digits: p_lo = (a*b) mod 4 and p_hi = (a*b) div 4 (at most 2).
// This is the one-digit product every Vedic "vertical" or "crosswise" step is
// reduced to. The design it follows gives only the function of this cell (its
// own version is an analog current-mode multiplier); the small product table
// here is this design's own choice. Purely combinational.
module q_digit_mul
  import qvm_pkg::*;
(
  input  qdigit_t a,
  input  qdigit_t b,
  output qdigit_t p_lo,
  output qdigit_t p_hi
);
  logic [3:0] prod;

  // a*b = a0*b + 2*a1*b, written as shifted partial terms of the digit codes
  always_comb begin
    prod = 4'd0;
    if (a[0]) prod = prod + {2'b00, b};
    if (a[1]) prod = prod + {1'b0, b, 1'b0};
  end

  assign p_lo = prod[1:0];
  assign p_hi = prod[3:2];
endmodule
