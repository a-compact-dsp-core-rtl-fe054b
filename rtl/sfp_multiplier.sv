// sfp_multiplier - static floating-point fractional multiplier, two pipeline stages.
//
// Two 16-bit fractions (sign bit, then fraction) give a 32-bit product that holds two
// copies of the sign bit. The redundant sign is dropped, so the kept word is
// P[30:15]; with the 1-bit output normaliser (<<1) it is P[29:14]. The bit just below
// the kept LSB is added, rounding the discarded bits to nearest (halves up). These
// follow the document's fractional multiplier with a 1-bit normaliser; the exact
// rounding rule and wrap-around on overflow (-1 x -1) are this design's choices.
//
// Timing: operands registered at the end of the issue cycle, full product registered
// one cycle later, rounded result registered one cycle after that: y_o carries the
// result three cycles after issue (latency 3), a new product may start every cycle.
module sfp_multiplier #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic         norm_i,
  output logic [W-1:0] y_o
);

  logic signed [W-1:0]   a_q, b_q;
  logic                  norm_q, norm_p;
  logic signed [2*W-1:0] prod_p;
  logic        [2*W-1:0] rounded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      b_q    <= '0;
      norm_q <= 1'b0;
      prod_p <= '0;
      norm_p <= 1'b0;
      y_o    <= '0;
    end else begin
      a_q    <= a_i;
      b_q    <= b_i;
      norm_q <= norm_i;
      prod_p <= a_q * b_q;
      norm_p <= norm_q;
      y_o    <= norm_p ? rounded[2*W-3:W-2] : rounded[2*W-2:W-1];
    end
  end

  // add one half LSB of the kept word
  always_comb begin
    if (norm_p) rounded = prod_p + ((2*W)'(1) << (W-3));
    else        rounded = prod_p + ((2*W)'(1) << (W-2));
  end

endmodule
