// addr_remapper - rotating virtual-to-physical address map of one memory module.
//
// Every memory of the core (SIU queues and I/O buffer) is addressed through one of
// these, so the same microprogram can run iteration after iteration while its data
// move through the memory. The physical address is the virtual address decremented by
// stride x iteration, modulo the bound register: with bound 8 and stride 1, virtual
// address 3 maps to 3, 2, 1, 0 in iterations 0 to 3, and a word written at virtual 3
// is found again at virtual 5 two iterations later. The stride, bound and iteration
// counter follow the document. Instead of multiplying stride by an iteration count,
// the counter is held as the running offset (stride x iteration mod bound), updated
// by one modular addition per iteration; this is this design's implementation.
//
// Interface: NP address ports share one offset. en_i=0 or bound_i=0 passes addresses
// through. The stride must be below the bound. Virtual addresses at or above the bound
// are passed through unchanged, so words such as coefficients can stay put in the
// same memory as rotating data; this rule is this design's choice. clear_i zeroes
// the offset (program start), step_i advances one iteration; both act at the clock
// edge, the mapping itself is combinational.
module addr_remapper #(
  parameter int unsigned AW = 4,
  parameter int unsigned NP = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en_i,
  input  logic [AW-1:0]         stride_i,
  input  logic [AW:0]           bound_i,
  input  logic                  clear_i,
  input  logic                  step_i,
  input  logic [NP-1:0][AW-1:0] vaddr_i,
  output logic [NP-1:0][AW-1:0] paddr_o
);

  logic [AW-1:0] offset_q;
  logic [AW:0]   next_sum;
  logic          active;

  assign active   = en_i && (bound_i != '0);
  assign next_sum = {1'b0, offset_q} + {1'b0, stride_i};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        offset_q <= '0;
    else if (clear_i)  offset_q <= '0;
    else if (step_i && active)
      offset_q <= (next_sum >= bound_i) ? AW'(next_sum - bound_i) : AW'(next_sum);
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      if (!active || {1'b0, vaddr_i[p]} >= bound_i)
                                     paddr_o[p] = vaddr_i[p];
      else if (vaddr_i[p] >= offset_q) paddr_o[p] = vaddr_i[p] - offset_q;
      else                           paddr_o[p] = AW'({1'b0, vaddr_i[p]} + bound_i - {1'b0, offset_q});
    end
  end

endmodule
