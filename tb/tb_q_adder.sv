// Testbench of q_adder at its default size of 4 digits: every pair of 4-digit
// operands with carry in 0 and 1 (131072 sums), each checked against the
// integer sum; the carry out must be the bit above the 8-bit sum.
module tb_q_adder;
  import qvm_pkg::*;

  localparam int unsigned DIGITS = 4;

  qdigit_t [DIGITS-1:0] a, b, s;
  logic                 cin, cout;
  int checks = 0, failures = 0;

  q_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_sum;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        for (int c = 0; c < 2; c++) begin
          a   = (2*DIGITS)'(i);
          b   = (2*DIGITS)'(j);
          cin = 1'(c);
          #1;
          expect_sum = i + j + c;
          checks++;
          if ({cout, s} != 9'(expect_sum)) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d+%0d+%0d: got %0d", i, j, c, {cout, s});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
