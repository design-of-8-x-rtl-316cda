// Pipeline register with a valid bit (the "B" buffers of the pipelined
// multipliers).
//
// On every rising clock edge q takes d and out_valid takes in_valid, so data
// move one stage per cycle and a new word may enter every cycle. There is no
// stall: the pipelined multiplier never has to hold a result. The reset is
// asynchronous and active low and clears both valid bit and data. The design
// only draws these buffers; their width, the valid bit and the reset are this
// design's own choices.
module q_pipe_reg #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] d,
  output logic         out_valid,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      q         <= '0;
    end else begin
      out_valid <= in_valid;
      q         <= d;
    end
  end
endmodule
