// 2-digit x 2-digit quaternary Vedic multiplier (Urdhva Tiryakbhyam).
//
// The "vertically and crosswise" method in three steps, one per result column:
//   step 1  vertical:  a0*b0                  -> digit p0, the rest is carry
//   step 2  crosswise: a1*b0 + a0*b1 + carry  -> digit p1, the rest is carry
//   step 3  vertical:  a1*b1 + carry          -> digits p2 and p3
// In each step the lowest digit of the column sum is the result digit and all
// higher digits are the carry into the next step; the first carry is zero.
// The four one-digit products are formed at once by q_digit_mul cells, which
// is where the method's parallelism lies. The steps follow the design; using
// small binary column sums for the additions is this design's own choice.
// With digits restricted to 0 and 1 this is the binary 2x2 Vedic multiplier.
// Purely combinational. Largest column sums: step 2 is 9+9+2 = 20 (carry 5),
// step 3 is 9+5 = 14, so the product always fits 4 digits.
module q_vedic2x2
  import qvm_pkg::*;
(
  input  qdigit_t [1:0] a,
  input  qdigit_t [1:0] b,
  output qdigit_t [3:0] p
);
  // one-digit products: index {i,j} means a[i]*b[j]
  qdigit_t lo00, hi00, lo10, hi10, lo01, hi01, lo11, hi11;

  q_digit_mul u_m00 (.a(a[0]), .b(b[0]), .p_lo(lo00), .p_hi(hi00));
  q_digit_mul u_m10 (.a(a[1]), .b(b[0]), .p_lo(lo10), .p_hi(hi10));
  q_digit_mul u_m01 (.a(a[0]), .b(b[1]), .p_lo(lo01), .p_hi(hi01));
  q_digit_mul u_m11 (.a(a[1]), .b(b[1]), .p_lo(lo11), .p_hi(hi11));

  logic [4:0] col1;  // step 2 column sum, at most 20
  logic [3:0] col2;  // step 3 column sum, at most 14

  always_comb begin
    // step 1: digit p0 = lo00, carry hi00
    // step 2: crosswise products plus the carry of step 1
    col1 = {1'b0, hi10, lo10} + {1'b0, hi01, lo01} + {3'b000, hi00};
    // step 3: vertical product of the high digits plus the carry of step 2
    col2 = {hi11, lo11} + {1'b0, col1[4:2]};
  end

  assign p[0] = lo00;
  assign p[1] = col1[1:0];
  assign p[2] = col2[1:0];
  assign p[3] = col2[3:2];
endmodule
