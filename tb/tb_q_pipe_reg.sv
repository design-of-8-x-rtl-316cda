// Testbench of q_pipe_reg: checks that reset clears valid and data, that each
// word and valid bit come out exactly one clock later, for a random stream with
// gaps, and that a reset in mid-stream clears the register again.
module tb_q_pipe_reg;
  localparam int unsigned W = 64;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid, out_valid;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0;

  q_pipe_reg dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .d(d),
    .out_valid(out_valid), .q(q)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reset();
    checks++;
    if (out_valid !== 1'b0 || q !== '0) begin
      failures++;
      $display("FAIL register not cleared by reset");
    end
  endtask

  initial begin
    logic [W-1:0] prev_d;
    logic         prev_v;
    rst_n    = 1'b0;
    in_valid = 1'b1;
    d        = {$urandom, $urandom};
    #1;
    check_reset();
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      prev_d   = {$urandom, $urandom};
      prev_v   = 1'($urandom);
      d        = prev_d;
      in_valid = prev_v;
      @(posedge clk);
      #1;
      checks++;
      if (q !== prev_d || out_valid !== prev_v) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h, valid=%b expected %b",
                 k, q, prev_d, out_valid, prev_v);
      end
      @(negedge clk);
    end
    in_valid = 1'b1;
    rst_n    = 1'b0;
    #1;
    check_reset();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
