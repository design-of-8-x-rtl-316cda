// Two-stage pipelined quaternary Vedic multiplier, 8 x 8 digits by default (top).
//
// Operands a and b have N quaternary digits each; with the default N = 8 they
// hold 0..65535, the range of a 16-bit binary word, and the product p has 16
// digits. The multiplier is built like the 4x4 one a level up: four
// q_vedic4x4 multipliers form the products of the operand halves, and
// q_vedic_combine (H = N/2, two N-digit adders and a half-adder chain) sums
// them. N = 4 (four q_vedic2x2) and N = 2 (four q_digit_mul) give the smaller
// pipelined multipliers of the same family; other values are rejected.
//
// Pipeline: stage 1 is the four half-size multipliers, whose products are
// captured in a pipeline register; stage 2 is the summation, captured in the
// output register. A pair presented with in_valid at a rising edge appears on p
// with out_valid two rising edges later, and a new pair can be accepted every
// cycle, so the longest combinational path is the slower of the two stages
// instead of their sum. The two-stage split, the four 4x4 multipliers and the
// 8x8 size follow the design; the valid bit, the position of the registers
// (after the sub-products and after the sum, none on the inputs) and the
// asynchronous active-low reset are this design's own choices.
module q_vedic8x8_pipe
  import qvm_pkg::*;
#(
  parameter int unsigned N = 8   // operand digits: 8, 4 or 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  qdigit_t [N-1:0]  a,
  input  qdigit_t [N-1:0]  b,
  output logic             out_valid,
  output qdigit_t [2*N-1:0] p
);
  localparam int unsigned H = N/2; // digits per operand half

  // ---------------- stage 1: four half-size products ----------------
  qdigit_t [2*H-1:0] pp_ll, pp_hl, pp_lh, pp_hh;

  if (N == 8) begin : g_sub4x4
    q_vedic4x4 u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(pp_ll));
    q_vedic4x4 u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(pp_hl));
    q_vedic4x4 u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(pp_lh));
    q_vedic4x4 u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(pp_hh));
  end else if (N == 4) begin : g_sub2x2
    q_vedic2x2 u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(pp_ll));
    q_vedic2x2 u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(pp_hl));
    q_vedic2x2 u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(pp_lh));
    q_vedic2x2 u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(pp_hh));
  end else if (N == 2) begin : g_sub1x1
    q_digit_mul u_ll (.a(a[0]), .b(b[0]), .p_lo(pp_ll[0]), .p_hi(pp_ll[1]));
    q_digit_mul u_hl (.a(a[1]), .b(b[0]), .p_lo(pp_hl[0]), .p_hi(pp_hl[1]));
    q_digit_mul u_lh (.a(a[0]), .b(b[1]), .p_lo(pp_lh[0]), .p_hi(pp_lh[1]));
    q_digit_mul u_hh (.a(a[1]), .b(b[1]), .p_lo(pp_hh[0]), .p_hi(pp_hh[1]));
  end else begin : g_bad_size
    $error("q_vedic8x8_pipe: N must be 8, 4 or 2");
  end

  qdigit_t [2*H-1:0] r_ll, r_hl, r_lh, r_hh;
  logic              s1_valid;

  q_pipe_reg #(.W(4 * 2*H * DIGIT_W)) u_stage1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .d        ({pp_hh, pp_lh, pp_hl, pp_ll}),
    .out_valid(s1_valid),
    .q        ({r_hh, r_lh, r_hl, r_ll})
  );

  // ---------------- stage 2: summation ----------------
  qdigit_t [2*N-1:0] sum;

  q_vedic_combine #(.H(H)) u_combine (
    .p_ll(r_ll),
    .p_hl(r_hl),
    .p_lh(r_lh),
    .p_hh(r_hh),
    .s   (sum)
  );

  q_pipe_reg #(.W(2*N * DIGIT_W)) u_stage2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s1_valid),
    .d        (sum),
    .out_valid(out_valid),
    .q        (p)
  );
endmodule
