// microcode_mem - microinstruction (program) memory of the core.
//
// Holds DEPTH microinstructions of W bits; each one controls every unit of the
// datapath for one clock slot. The host loads it over the 32-bit bus in halves
// (we_i[0] low half, we_i[1] high half). The single read port serves instruction
// fetch, or host read-back while the engine is idle; the caller picks the address.
// Read data are registered: one cycle from address to data. Depth 1024 x 64 bit (8 KB)
// is this design's reading of the program memory size.
module microcode_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [1:0]    we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [W/2-1:0] wdata_i,
  input  logic          re_i,
  input  logic [AW-1:0] raddr_i,
  output logic [W-1:0]  rdata_o
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i[0]) mem[waddr_i][W/2-1:0] <= wdata_i;
    if (we_i[1]) mem[waddr_i][W-1:W/2] <= wdata_i;
    if (re_i)    rdata_o <= mem[raddr_i];
  end

endmodule
