// Testbench of q_vedic4x4: every pair of 4-digit quaternary operands (65536
// products, the full range of two 8-bit binary operands), each checked against
// the integer product.
module tb_q_vedic4x4;
  import qvm_pkg::*;

  qdigit_t [3:0] a, b;
  qdigit_t [7:0] p;
  int checks = 0, failures = 0;

  q_vedic4x4 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (p != 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
