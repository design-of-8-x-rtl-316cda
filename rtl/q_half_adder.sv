// Quaternary half adder (the "HA" of the 4x4 multiplier).
//
// Adds two quaternary digits with no carry in. The sum is at most 6, so the
// result is one sum digit s = (a+b) mod 4 and a carry bit cout = (a+b) >= 4.
// The design names this cell only; this implementation is the plain digit sum.
// Purely combinational.
module q_half_adder
  import qvm_pkg::*;
(
  input  qdigit_t a,
  input  qdigit_t b,
  output qdigit_t s,
  output logic    cout
);
  logic [2:0] sum;

  assign sum  = {1'b0, a} + {1'b0, b};
  assign s    = sum[1:0];
  assign cout = sum[2];
endmodule
