// siu_queue_mem - reduced static input queue of one functional unit.
//
// In the reduced input-queue stream interface unit every functional unit owns a small
// memory that buffers the operands it will consume. Data stay where they were written;
// the microinstruction picks them by address (a "static" queue, with pointer-like
// addressing instead of data movement). Two-operand units use two read ports and one
// write port, the shifter one of each, as in the core's block diagram; only one
// result per cycle can enter a queue, which the scheduler guarantees.
//
// Reads are combinational from a register array. A write is visible to a read of the
// same address in the same cycle (bypass), so a result can reach the input register
// of the next unit in the cycle it leaves the previous one (zero buffering delay).
// The bypass and the reset-to-zero contents are this design's choices.
module siu_queue_mem #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned NR    = 2,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  we_i,
  input  logic [AW-1:0]         wa_i,
  input  logic [W-1:0]          wd_i,
  input  logic [NR-1:0][AW-1:0] ra_i,
  output logic [NR-1:0][W-1:0]  rd_o,
  output logic [NR-1:0]         bypass_o   // read port served by the bypass this cycle
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we_i) begin
      mem[wa_i] <= wd_i;
    end
  end

  always_comb begin
    for (int p = 0; p < NR; p++) begin
      bypass_o[p] = we_i && (wa_i == ra_i[p]);
      rd_o[p]     = bypass_o[p] ? wd_i : mem[ra_i[p]];
    end
  end

endmodule
