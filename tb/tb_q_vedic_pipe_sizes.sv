// Testbench of the smaller pipelined multipliers of the family: the top built
// with N = 4 (4 x 4 digits, from four q_vedic2x2) and with N = 2 (2 x 2 digits,
// from four q_digit_mul). Both run side by side on a stream that walks through
// every operand pair of the 4-digit version (65536 pairs) and, in step, every
// pair of the 2-digit version, with a bubble in every seventh cycle. Each
// result is checked against the integer product and must appear exactly two
// cycles after its pair entered.
module tb_q_vedic_pipe_sizes;
  import qvm_pkg::*;

  localparam int unsigned LATENCY = 2;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          in_valid;
  qdigit_t [3:0] a4, b4;
  qdigit_t [7:0] p4;
  qdigit_t [1:0] a2, b2;
  qdigit_t [3:0] p2;
  logic          v4, v2;

  int checks = 0, failures = 0;
  int cycle = 0;

  // expected results, indexed by the cycle at which the pair was captured
  int unsigned exp4 [int];
  int unsigned exp2 [int];

  q_vedic8x8_pipe #(.N(4)) dut4 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a4), .b(b4),
    .out_valid(v4), .p(p4)
  );
  q_vedic8x8_pipe #(.N(2)) dut2 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a2), .b(b2),
    .out_valid(v2), .p(p2)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    #1;
    if (rst_n) begin
      checks++;
      if (v4 !== exp4.exists(cycle - LATENCY) || v2 !== exp2.exists(cycle - LATENCY)) begin
        failures++;
        $display("FAIL cycle %0d: out_valid %b/%b wrong", cycle, v4, v2);
      end else if (v4) begin
        checks++;
        if (p4 != 16'(exp4[cycle - LATENCY]) || p2 != 8'(exp2[cycle - LATENCY])) begin
          failures++;
          $display("FAIL cycle %0d: p4=%0d expected %0d, p2=%0d expected %0d", cycle,
                   p4, exp4[cycle - LATENCY], p2, exp2[cycle - LATENCY]);
        end
      end
    end
  end

  initial begin
    int k;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a4 = '0; b4 = '0; a2 = '0; b2 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    k = 0;
    while (k < 65536) begin
      @(negedge clk);
      if (cycle % 7 == 3) begin
        in_valid = 1'b0;
      end else begin
        in_valid = 1'b1;
        a4 = 8'(k % 256);
        b4 = 8'(k / 256);
        a2 = 4'(k % 16);
        b2 = 4'((k / 16) % 16);
        exp4[cycle] = (k % 256) * (k / 256);
        exp2[cycle] = (k % 16) * ((k / 16) % 16);
        k++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 1) @(posedge clk);
    #2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
