// 4-digit x 4-digit quaternary Vedic multiplier.
//
// Each operand is split into a high and a low pair of digits. Four
// q_vedic2x2 multipliers form the products low*low, high*low, low*high and
// high*high at the same time, and q_vedic_combine (H = 2) adds them with two
// 4-digit adders and a half-adder stage into the eight result digits S0..S7.
// This is the structure the design gives for its quaternary 4x4 multiplier;
// a 4-digit quaternary operand holds 0..255, the range of an 8-bit binary
// operand. Purely combinational.
module q_vedic4x4
  import qvm_pkg::*;
(
  input  qdigit_t [3:0] a,
  input  qdigit_t [3:0] b,
  output qdigit_t [7:0] p
);
  qdigit_t [3:0] p_ll, p_hl, p_lh, p_hh;

  q_vedic2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(p_ll));
  q_vedic2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(p_hl));
  q_vedic2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(p_lh));
  q_vedic2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(p_hh));

  q_vedic_combine #(.H(2)) u_combine (
    .p_ll(p_ll),
    .p_hl(p_hl),
    .p_lh(p_lh),
    .p_hh(p_hh),
    .s   (p)
  );
endmodule
