// Testbench of q_half_adder: all 16 digit pairs, sum digit and carry checked
// against the integer sum.
module tb_q_half_adder;
  import qvm_pkg::*;

  qdigit_t a, b, s;
  logic    cout;
  int checks = 0, failures = 0;

  q_half_adder dut (.a(a), .b(b), .s(s), .cout(cout));

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
        if (int'(cout) * 4 + int'(s) != i + j) begin
          failures++;
          $display("FAIL %0d+%0d: cout=%0d s=%0d", i, j, cout, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
