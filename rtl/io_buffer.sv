// io_buffer - ping-pong I/O buffer between the datapath and the system bus.
//
// Two banks of DEPTH 16-bit words. bank_sel_i names the bank the datapath uses; the
// host (processor or system DMA, through the bus interface) reaches the other one, so
// the next data block can be filled and the previous results drained while the engine
// computes. Changing bank_sel_i swaps the roles. The ping-pong scheme follows the
// document; bank size (8 KB of data memory in all), one read and one write port per
// bank and synchronous reads are this design's choices.
//
// Timing: writes at the clock edge; read data one cycle after the address, from the
// bank that was selected when the address was given.
module io_buffer #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          bank_sel_i,
  // engine side
  input  logic          eng_re_i,
  input  logic [AW-1:0] eng_raddr_i,
  output logic [W-1:0]  eng_rdata_o,
  input  logic          eng_we_i,
  input  logic [AW-1:0] eng_waddr_i,
  input  logic [W-1:0]  eng_wdata_i,
  // host side
  input  logic          host_re_i,
  input  logic          host_we_i,
  input  logic [AW-1:0] host_addr_i,
  input  logic [W-1:0]  host_wdata_i,
  output logic [W-1:0]  host_rdata_o
);

  logic [1:0][W-1:0] rd;
  logic              sel_q;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic [W-1:0]  mem [DEPTH];
    logic          eng_owns, we, re;
    logic [AW-1:0] wa, ra;
    logic [W-1:0]  wd;

    assign eng_owns = (bank_sel_i == 1'(b));
    assign we = eng_owns ? eng_we_i    : host_we_i;
    assign wa = eng_owns ? eng_waddr_i : host_addr_i;
    assign wd = eng_owns ? eng_wdata_i : host_wdata_i;
    assign re = eng_owns ? eng_re_i    : host_re_i;
    assign ra = eng_owns ? eng_raddr_i : host_addr_i;

    always_ff @(posedge clk) begin
      if (we) mem[wa] <= wd;
      if (re) rd[b] <= mem[ra];
    end
  end

  always_ff @(posedge clk) sel_q <= bank_sel_i;

  assign eng_rdata_o  = sel_q ? rd[1] : rd[0];
  assign host_rdata_o = sel_q ? rd[0] : rd[1];

endmodule
