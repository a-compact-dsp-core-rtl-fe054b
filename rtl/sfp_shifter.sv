// sfp_shifter - 16-bit barrel shifter with sign extension, registered I/O.
//
// Carries out the multi-bit shifts that the static exponent analysis inserts where a
// value must be rescaled by more than one bit. Right shifts fill with the sign bit
// (arith=1) or with zeros; left shifts fill with zeros. The document names a barrel
// shifter with sign-extension capability; offering both directions and a 4-bit amount
// is this design's choice.
//
// Timing: operand and control registered at the end of the issue cycle, shifted word
// registered one cycle later: latency 2, one new shift per cycle.
module sfp_shifter
  import dsplite_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a_i,
  input  shf_ctl_t     ctl_i,
  output logic [W-1:0] y_o
);

  logic [W-1:0] a_q, res;
  shf_ctl_t     ctl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      ctl_q <= '0;
      y_o   <= '0;
    end else begin
      a_q   <= a_i;
      ctl_q <= ctl_i;
      y_o   <= res;
    end
  end

  always_comb begin
    if (ctl_q.left)       res = a_q << ctl_q.amt;
    else if (ctl_q.arith) res = W'($signed(a_q) >>> ctl_q.amt);
    else                  res = a_q >> ctl_q.amt;
  end

endmodule
