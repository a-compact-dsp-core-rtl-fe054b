// sfp_adder - static floating-point adder/subtractor with registered I/O.
//
// Operands are 16-bit fractions. Each may be pre-scaled by one bit (arithmetic shift
// right) so that two values whose static exponents differ by one line up. The sum is
// formed in 17 bits, so it cannot overflow, and the 1-bit output normaliser either
// returns sum[16:1] (divide by two, used when the result may exceed one) or sum[15:0].
// Pre-scale, normalise and subtract follow the document; truncation (no rounding) in
// the 1-bit shifts and wrap-around instead of saturation are this design's choices.
//
// Timing: operands and control are registered at the end of the issue cycle, the
// adder works in the next cycle and its result is registered, so y_o carries the
// result two cycles after issue (latency 2). Operands are taken every cycle.
module sfp_adder
  import dsplite_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  add_ctl_t     ctl_i,
  output logic [W-1:0] y_o
);

  logic [W-1:0] a_q, b_q;
  add_ctl_t     ctl_q;
  logic [W:0]   a_x, b_x, sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      ctl_q <= '0;
    end else begin
      a_q   <= a_i;
      b_q   <= b_i;
      ctl_q <= ctl_i;
    end
  end

  always_comb begin
    // sign-extend to W+1 bits, then optional 1-bit pre-scale
    a_x = ctl_q.scale_a ? {{2{a_q[W-1]}}, a_q[W-1:1]} : {a_q[W-1], a_q};
    b_x = ctl_q.scale_b ? {{2{b_q[W-1]}}, b_q[W-1:1]} : {b_q[W-1], b_q};
    sum = ctl_q.sub ? (a_x - b_x) : (a_x + b_x);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_o <= '0;
    else        y_o <= ctl_q.norm ? sum[W:1] : sum[W-1:0];
  end

endmodule
