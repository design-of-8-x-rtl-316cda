// End-to-end testbench of the pipelined 8x8 quaternary Vedic multiplier, at
// the top's own sizes (8-digit operands, 16-digit product).
//
// A stream of operand pairs is driven, one pair per clock while in_valid is
// high and with random gaps. Each pair is kept in a scoreboard with its entry
// cycle; every valid output must be the integer product of the oldest pair and
// must leave exactly two cycles after it entered (latency 2, one result per
// clock). The stream holds the decimal worked example 252 x 846 = 213192, the
// largest operands, zeros and random pairs. The testbench counts how often each
// mechanism of the design was exercised and fails if one never was:
//   back-to-back results (a result in every cycle of a burst), two pairs in
//   flight at once (both stages busy), bubbles, the carry of each of the two
//   8-digit adders, both carries at once, a carry rippling in the half-adder
//   chain, and a reset that flushes pairs in flight.
module tb_q_vedic8x8_pipe;
  import qvm_pkg::*;

  localparam int unsigned LATENCY = 2;
  localparam int unsigned NPAIRS  = 20000;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           in_valid, out_valid;
  qdigit_t [7:0]  a, b;
  qdigit_t [15:0] p;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // scoreboard
  typedef struct {
    longint unsigned prod;
    longint          t_in;
  } entry_t;
  entry_t sb[$];

  // mechanism counters
  int n_b2b = 0, n_inflight = 0, n_bubble = 0;
  int n_c1 = 0, n_c2 = 0, n_both = 0, n_ripple = 0, n_flush = 0, n_example = 0;
  logic prev_out_valid = 1'b0;

  q_vedic8x8_pipe dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .p(p)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NPAIRS * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // carry paths of the 8x8 combiner, from the integer half products
  function automatic void count_carries(longint unsigned x, longint unsigned y);
    longint unsigned half, al, ah, bl, bh, t, mid, c1, c2, top;
    half = 256;  // 4^4
    al = x % half; ah = x / half;
    bl = y % half; bh = y / half;
    t   = ah*bl + al*bh;
    c1  = t / 65536;
    mid = (ah*bh % half) * half + (al*bl / half);
    c2  = (t % 65536 + mid) / 65536;
    top = ah*bh / half;
    if (c1 != 0) n_c1++;
    if (c2 != 0) n_c2++;
    if (c1 != 0 && c2 != 0) n_both++;
    if ((top % 4) + c1 + c2 >= 4) n_ripple++;
  endfunction

  // output monitor, sampled just after each rising edge
  always @(posedge clk) begin
    cycle <= cycle + 1;
    #1;
    if (rst_n && out_valid) begin
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("FAIL cycle %0d: result with no pair in flight", cycle);
      end else begin
        entry_t e;
        e = sb.pop_front();
        if (longint'(p) != longint'(e.prod)) begin
          failures++;
          $display("FAIL cycle %0d: p=%0d expected %0d", cycle, p, e.prod);
        end
        checks++;
        if (cycle - e.t_in != LATENCY) begin
          failures++;
          $display("FAIL cycle %0d: latency %0d, expected %0d", cycle, cycle - e.t_in, LATENCY);
        end
      end
      if (prev_out_valid) n_b2b++;
    end
    // output register and stage-1 register both hold a pair
    if (rst_n && out_valid && sb.size() >= 1) n_inflight++;
    prev_out_valid = rst_n && out_valid;
  end

  task automatic drive(input longint unsigned x, input longint unsigned y, input logic v);
    @(negedge clk);
    in_valid = v;
    a = 16'(x);
    b = 16'(y);
    if (v) begin
      entry_t e;
      e.prod = x * y;
      e.t_in = cycle;   // captured at the next rising edge
      sb.push_back(e);
      count_carries(x, y);
    end else begin
      n_bubble++;
    end
  endtask

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a        = '0;
    b        = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // worked decimal example of the method
    drive(252, 846, 1'b1);
    n_example++;
    drive(65535, 65535, 1'b1);
    drive(0, 65535, 1'b1);
    drive(65535, 1, 1'b1);
    drive(0, 0, 1'b0);

    // random stream: a burst of back-to-back pairs with random gaps
    for (int k = 0; k < NPAIRS; k++) begin
      longint unsigned x, y;
      case ($urandom % 4)
        0: begin x = 65535 - ($urandom % 256); y = 65535 - ($urandom % 256); end
        1: begin x = $urandom % 256;           y = $urandom % 65536;        end
        default: begin x = $urandom % 65536;   y = $urandom % 65536;        end
      endcase
      drive(x, y, ($urandom % 8) != 0);
    end
    drive(0, 0, 1'b0);
    repeat (LATENCY + 1) @(posedge clk);

    checks++;
    if (sb.size() != 0) begin
      failures++;
      $display("FAIL %0d pairs never came out", sb.size());
    end

    // reset with pairs in flight: none of them may come out
    drive(1234, 5678, 1'b1);
    drive(4321, 8765, 1'b1);
    @(negedge clk);
    in_valid = 1'b0;
    rst_n    = 1'b0;
    sb.delete();
    n_flush++;
    #1;
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("FAIL reset did not clear out_valid");
    end
    @(negedge clk);
    rst_n = 1'b1;
    repeat (LATENCY + 2) @(posedge clk);
    #2;
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("FAIL a flushed pair came out after reset");
    end

    $display("back-to-back results %0d, cycles with both stages busy %0d, bubbles %0d",
             n_b2b, n_inflight, n_bubble);
    $display("adder-1 carry %0d, adder-2 carry %0d, both %0d, half-adder ripple %0d, flushes %0d, worked example %0d",
             n_c1, n_c2, n_both, n_ripple, n_flush, n_example);
    checks++;
    if (n_b2b == 0 || n_inflight == 0 || n_bubble == 0 || n_c1 == 0 || n_c2 == 0 ||
        n_both == 0 || n_ripple == 0 || n_flush == 0 || n_example == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
