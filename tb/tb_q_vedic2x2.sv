// Testbench of q_vedic2x2: the worked example of the method (binary 10 x 10,
// whose result digits read 100), then every pair of 2-digit quaternary
// operands (256 products), each checked against the integer product.
module tb_q_vedic2x2;
  import qvm_pkg::*;

  qdigit_t [1:0] a, b;
  qdigit_t [3:0] p;
  int checks = 0, failures = 0;

  q_vedic2x2 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // digits 1,0 times 1,0: result digits 0,1,0,0 -> "100"
    a = {2'd1, 2'd0};
    b = {2'd1, 2'd0};
    #1;
    checks++;
    if (p != {2'd0, 2'd1, 2'd0, 2'd0}) begin
      failures++;
      $display("FAIL worked example: p digits %0d %0d %0d %0d", p[3], p[2], p[1], p[0]);
    end

    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (p != 8'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
