// Multi-digit quaternary ripple-carry adder (the "4-digit Adder" boxes).
//
// Adds two DIGITS-digit quaternary numbers and a carry in. A chain of
// q_full_adder cells passes a one-bit carry from digit 0 upwards; s holds the
// DIGITS sum digits and cout the carry out of the top digit. The default of
// 4 digits is the adder size of the 4x4 multiplier; the 8x8 multiplier uses
// 8. The ripple structure is this design's own choice. Purely combinational.
module q_adder
  import qvm_pkg::*;
#(
  parameter int unsigned DIGITS = 4
) (
  input  qdigit_t [DIGITS-1:0] a,
  input  qdigit_t [DIGITS-1:0] b,
  input  logic                 cin,
  output qdigit_t [DIGITS-1:0] s,
  output logic                 cout
);
  logic [DIGITS:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    q_full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[DIGITS];
endmodule
