// load_store_unit - the I and O ports between the datapath and the I/O buffer.
//
// Load (I): the physical load address selects a word in the input half of the
// engine's I/O-buffer bank. The buffer reads synchronously; the word is registered
// again here and drives the I result bus two cycles after the microinstruction that
// named it (latency 2, like the other single-cycle units with registered I/O).
// Store (O): a result routed by the switch is captured in the O register together with
// its physical address, and written into the output half of the bank one cycle later.
// Splitting each bank into an input region and an output region follows the ping/pong
// drawing of the core (image block above, coefficient block below); the two-half
// layout and the latencies are this design's choices.
module load_store_unit #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 10   // address inside one half of a bank
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the microinstruction (already remapped)
  input  logic          ld_en_i,
  input  logic [AW-1:0] ld_addr_i,
  input  logic          st_en_i,
  input  logic [AW-1:0] st_addr_i,
  input  logic [W-1:0]  st_data_i,
  // engine side of the I/O buffer
  output logic          buf_re_o,
  output logic [AW:0]   buf_raddr_o,
  input  logic [W-1:0]  buf_rdata_i,
  output logic          buf_we_o,
  output logic [AW:0]   buf_waddr_o,
  output logic [W-1:0]  buf_wdata_o,
  // I result bus
  output logic [W-1:0]  i_bus_o
);

  logic          st_en_q;
  logic [AW-1:0] st_addr_q;
  logic [W-1:0]  o_q;

  assign buf_re_o    = ld_en_i;
  assign buf_raddr_o = {1'b0, ld_addr_i};   // input half

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_bus_o   <= '0;
      st_en_q   <= 1'b0;
      st_addr_q <= '0;
      o_q       <= '0;
    end else begin
      i_bus_o   <= buf_rdata_i;
      st_en_q   <= st_en_i;
      st_addr_q <= st_addr_i;
      o_q       <= st_data_i;
    end
  end

  assign buf_we_o    = st_en_q;
  assign buf_waddr_o = {1'b1, st_addr_q};   // output half
  assign buf_wdata_o = o_q;

endmodule
