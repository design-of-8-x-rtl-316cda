// Partial-product combiner of a Vedic multiplier built from four half-size ones.
//
// With operands split into halves, A = Ah*4^H + Al and B = Bh*4^H + Bl, the
// four sub-multipliers deliver p_ll = Al*Bl, p_hl = Ah*Bl, p_lh = Al*Bh and
// p_hh = Ah*Bh (2H digits each). The product 
//   A*B = p_ll + (p_hl + p_lh)*4^H + p_hh*4^(2H)
// is summed with the structure of the 4x4 multiplier's diagram:
//   * the low H digits of p_ll are result digits directly;
//   * adder 1 (2H digits) adds the two crosswise products: t, carry c1;
//   * adder 2 (2H digits) adds t to {low half of p_hh, high half of p_ll},
//     giving result digits H .. 3H-1 and carry c2;
//   * a half-adder chain adds c1 + c2 (one digit, at most 2) to the high half
//     of p_hh, giving the top H digits.
// The carry out of the half-adder chain (hc[H]) is always zero because the
// product of two 2H-digit numbers fits 4H digits, so it is left unconnected;
// a lint tool reports that bit as unused. H = 2 is the 4x4 multiplier of the
// diagram (two 4-digit adders and a half adder stage); H = 4 serves the 8x8
// multiplier. How the two carries enter the HA is not drawn clearly and is this
// design's reading. Purely combinational.
module q_vedic_combine
  import qvm_pkg::*;
#(
  parameter int unsigned H = 2
) (
  input  qdigit_t [2*H-1:0] p_ll,
  input  qdigit_t [2*H-1:0] p_hl,
  input  qdigit_t [2*H-1:0] p_lh,
  input  qdigit_t [2*H-1:0] p_hh,
  output qdigit_t [4*H-1:0] s
);
  qdigit_t [2*H-1:0] t;
  qdigit_t [2*H-1:0] mid;
  logic              c1, c2;
  qdigit_t           cc;      // c1 + c2 as one digit
  logic    [H:0]     hc;      // carries of the half-adder chain

  // adder 1: crosswise products
  q_adder #(.DIGITS(2*H)) u_add1 (
    .a   (p_hl),
    .b   (p_lh),
    .cin (1'b0),
    .s   (t),
    .cout(c1)
  );

  assign mid = {p_hh[H-1:0], p_ll[2*H-1:H]};

  // adder 2: middle result digits
  q_adder #(.DIGITS(2*H)) u_add2 (
    .a   (t),
    .b   (mid),
    .cin (1'b0),
    .s   (s[3*H-1:H]),
    .cout(c2)
  );

  assign s[H-1:0] = p_ll[H-1:0];
  assign cc       = {c1 & c2, c1 ^ c2};

  // half-adder chain on the top digits
  for (genvar i = 0; i < H; i++) begin : g_ha
    q_half_adder u_ha (
      .a   (p_hh[H+i]),
      .b   ((i == 0) ? cc : qdigit_t'({1'b0, hc[i]})),
      .s   (s[3*H+i]),
      .cout(hc[i+1])
    );
  end
  assign hc[0] = 1'b0;
endmodule
