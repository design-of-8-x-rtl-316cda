// Quaternary full adder: the digit cell of the multi-digit adder.
//
// Adds two quaternary digits and a carry bit. The sum is at most 7, so it is
// one sum digit s = (a+b+cin) mod 4 and a carry bit cout. The design shows the
// adders only as boxes; this cell is this design's own. Purely combinational.
module q_full_adder
  import qvm_pkg::*;
(
  input  qdigit_t a,
  input  qdigit_t b,
  input  logic    cin,
  output qdigit_t s,
  output logic    cout
);
  logic [2:0] sum;

  assign sum  = {1'b0, a} + {1'b0, b} + {2'b00, cin};
  assign s    = sum[1:0];
  assign cout = sum[2];
endmodule
