// Testbench of q_vedic_combine at H = 2: for every pair of 4-digit operands the
// four half products are worked out here with integer arithmetic and fed in;
// the combined result must equal the full integer product. It also counts how
// often each carry path of the combiner (carry of adder 1, of adder 2, both at
// once, and a carry rippling along the half-adder chain) was exercised and
// fails if one never was.
module tb_q_vedic_combine;
  import qvm_pkg::*;

  localparam int unsigned H = 2;

  qdigit_t [2*H-1:0] p_ll, p_hl, p_lh, p_hh;
  qdigit_t [4*H-1:0] s;
  int checks = 0, failures = 0;
  int n_c1 = 0, n_c2 = 0, n_both = 0, n_ripple = 0;

  q_vedic_combine dut (.p_ll(p_ll), .p_hl(p_hl), .p_lh(p_lh), .p_hh(p_hh), .s(s));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned half, al, ah, bl, bh, t, mid, c1, c2, top;
    half = 1 << (2*H);  // 4^H
    for (int unsigned x = 0; x < half*half; x++) begin
      for (int unsigned y = 0; y < half*half; y++) begin
        al = x % half; ah = x / half;
        bl = y % half; bh = y / half;
        p_ll = (4*H)'(al * bl);
        p_hl = (4*H)'(ah * bl);
        p_lh = (4*H)'(al * bh);
        p_hh = (4*H)'(ah * bh);
        #1;
        checks++;
        if (s != (8*H)'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d", x, y, s);
        end
        // carry paths, worked out from the integer partial products
        t   = ah*bl + al*bh;
        c1  = t / (half*half);
        mid = (ah*bh % half) * half + (al*bl / half);
        c2  = (t % (half*half) + mid) / (half*half);
        top = ah*bh / half;
        if (c1 != 0) n_c1++;
        if (c2 != 0) n_c2++;
        if (c1 != 0 && c2 != 0) n_both++;
        if ((top % 4) + c1 + c2 >= 4) n_ripple++;
      end
    end
    $display("carry of adder 1: %0d, adder 2: %0d, both: %0d, half-adder ripple: %0d",
             n_c1, n_c2, n_both, n_ripple);
    checks++;
    if (n_c1 == 0 || n_c2 == 0 || n_both == 0 || n_ripple == 0) begin
      failures++;
      $display("FAIL a carry path was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
