// Shared types and constants of the quaternary Vedic multiplier.
//
// Every signal of the datapath is a quaternary (radix-4) digit with the values
// 0, 1, 2 and 3. In this RTL a digit is carried as a 2-bit binary code, which
// is the natural encoding of a radix-4 level in binary logic. A number of N
// digits is a packed array qdigit_t [N-1:0] with digit 0 the least significant,
// so the same vector read as a 2N-bit binary word has the same value.
package qvm_pkg;
  localparam int unsigned DIGIT_W = 2;  // bits per digit code

  typedef logic [DIGIT_W-1:0] qdigit_t;
endpackage
