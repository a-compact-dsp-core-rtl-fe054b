// siu_switch - the 4-by-4 switch of the stream interface unit.
//
// Four result buses enter: the load unit (I), the adder, the multiplier and the
// shifter. Four destinations leave: the adder, multiplier and shifter input queues
// and the store register (O). Each destination has its own source select from the
// microinstruction, so any result can reach any queue in the cycle it appears, and
// one result may fan out to several destinations. A destination whose select is
// SRC_NONE is not written. The source codes are this design's own. Purely
// combinational.
module siu_switch
  import dsplite_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]       in_bus_i,
  input  logic [W-1:0]       add_bus_i,
  input  logic [W-1:0]       mul_bus_i,
  input  logic [W-1:0]       shf_bus_i,
  input  src_e [3:0]         sel_i,     // 0 adder queue, 1 mult queue, 2 shifter queue, 3 O
  output logic [3:0][W-1:0]  dst_o,
  output logic [3:0]         dst_we_o
);

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      dst_we_o[d] = 1'b1;
      unique case (sel_i[d])
        SRC_IN:  dst_o[d] = in_bus_i;
        SRC_ADD: dst_o[d] = add_bus_i;
        SRC_MUL: dst_o[d] = mul_bus_i;
        SRC_SHF: dst_o[d] = shf_bus_i;
        default: begin
          dst_o[d]    = '0;
          dst_we_o[d] = 1'b0;
        end
      endcase
    end
  end

endmodule
