// Testbench of q_digit_mul: all 16 digit pairs, each product checked against
// the integer product split into high and low quaternary digits.
module tb_q_digit_mul;
  import qvm_pkg::*;

  qdigit_t a, b, p_lo, p_hi;
  int checks = 0, failures = 0;

  q_digit_mul dut (.a(a), .b(b), .p_lo(p_lo), .p_hi(p_hi));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = qdigit_t'(i);
        b = qdigit_t'(j);
        #1;
        checks++;
        if (int'(p_hi) * 4 + int'(p_lo) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d: hi=%0d lo=%0d", i, j, p_hi, p_lo);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
