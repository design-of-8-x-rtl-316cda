// Testbench of q_full_adder: all 32 combinations of two digits and a carry,
// checked against the integer sum.
module tb_q_full_adder;
  import qvm_pkg::*;

  qdigit_t a, b, s;
  logic    cin, cout;
  int checks = 0, failures = 0;

  q_full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

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
        for (int c = 0; c < 2; c++) begin
          a   = qdigit_t'(i);
          b   = qdigit_t'(j);
          cin = 1'(c);
          #1;
          checks++;
          if (int'(cout) * 4 + int'(s) != i + j + c) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: cout=%0d s=%0d", i, j, c, cout, s);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
