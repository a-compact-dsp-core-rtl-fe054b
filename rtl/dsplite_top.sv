// dsplite_top - the DSP-lite core: a compact, microcoded DSP for a host SoC.
//
// The core runs signal-processing kernels compiled ahead of time into a periodic
// schedule of 64-bit microinstructions. Its datapath (siu_engine) holds a static
// floating-point adder, a fractional multiplier, a barrel shifter and a load/store
// unit, fed by a stream interface unit of small per-unit input queues and a 4-by-4
// switch. The host (processor or DMA) talks to it only through an AMBA AHB slave:
// it loads the program, sets the address remappers, fills one bank of the ping-pong
// I/O buffer while the engine works on the other, starts a run and collects results.
// The organisation follows the document; the bus map and control protocol are this
// design's (see ahb_slave and system_controller).
//
// Timing: one microinstruction per HCLK cycle while busy; see siu_engine for the
// latencies of the units. AHB writes take no wait state, reads one.
module dsplite_top
  import dsplite_pkg::*;
(
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        HSEL,
  input  logic [15:0] HADDR,
  input  logic        HWRITE,
  input  logic [1:0]  HTRANS,
  input  logic [2:0]  HSIZE,
  input  logic [31:0] HWDATA,
  input  logic        HREADY,
  output logic [31:0] HRDATA,
  output logic        HREADYOUT,
  output logic [1:0]  HRESP
);

  logic                start, swap, busy, done, bank_sel;
  logic [UCODE_AW-1:0] pc_start;
  logic [UCODE_AW:0]   prog_len;
  logic [15:0]         iter_count;
  logic [31:0]         cycles;
  remap_cfg_a          remap_cfg;

  logic [1:0]          uc_we;
  logic [UCODE_AW-1:0] uc_waddr, uc_host_raddr, fetch_addr;
  logic [31:0]         uc_wdata;
  logic                uc_host_re, fetch_re;
  logic [UINST_W-1:0]  uc_rdata;

  logic                io_host_re, io_host_we;
  logic [IOBUF_AW-1:0] io_host_addr;
  word_t               io_host_wdata, io_host_rdata;

  logic                exec_valid, iter_clear, iter_step;
  logic [15:0]         iter_idx;

  logic                eng_re, eng_we;
  logic [IOBUF_AW-1:0] eng_raddr, eng_waddr;
  word_t               eng_rdata, eng_wdata;
  logic                bypass_evt, store_evt;

  ahb_slave u_ahb (
    .HCLK, .HRESETn, .HSEL, .HADDR, .HWRITE, .HTRANS, .HSIZE, .HWDATA, .HREADY,
    .HRDATA, .HREADYOUT, .HRESP,
    .start_o(start), .swap_o(swap), .pc_start_o(pc_start), .prog_len_o(prog_len),
    .iter_count_o(iter_count), .remap_cfg_o(remap_cfg),
    .busy_i(busy), .done_i(done), .bank_sel_i(bank_sel), .cycles_i(cycles),
    .uc_we_o(uc_we), .uc_waddr_o(uc_waddr), .uc_wdata_o(uc_wdata),
    .uc_re_o(uc_host_re), .uc_raddr_o(uc_host_raddr), .uc_rdata_i(uc_rdata),
    .io_re_o(io_host_re), .io_we_o(io_host_we), .io_addr_o(io_host_addr),
    .io_wdata_o(io_host_wdata), .io_rdata_i(io_host_rdata)
  );

  system_controller #(.PC_W(UCODE_AW), .ITER_W(16)) u_ctrl (
    .clk(HCLK), .rst_n(HRESETn),
    .start_i(start), .swap_i(swap),
    .pc_start_i(pc_start), .prog_len_i(prog_len), .iter_count_i(iter_count),
    .ucode_re_o(fetch_re), .ucode_raddr_o(fetch_addr),
    .exec_valid_o(exec_valid), .iter_clear_o(iter_clear), .iter_step_o(iter_step),
    .busy_o(busy), .done_o(done), .bank_sel_o(bank_sel),
    .iter_idx_o(iter_idx), .cycles_o(cycles)
  );

  // instruction fetch has the read port while the engine runs
  microcode_mem #(.DEPTH(UCODE_DEPTH), .W(UINST_W)) u_ucode (
    .clk(HCLK),
    .we_i(uc_we), .waddr_i(uc_waddr), .wdata_i(uc_wdata),
    .re_i   (busy ? fetch_re   : uc_host_re),
    .raddr_i(busy ? fetch_addr : uc_host_raddr),
    .rdata_o(uc_rdata)
  );

  io_buffer #(.DEPTH(IOBUF_DEPTH), .W(DATA_W)) u_iobuf (
    .clk(HCLK), .bank_sel_i(bank_sel),
    .eng_re_i(eng_re), .eng_raddr_i(eng_raddr), .eng_rdata_o(eng_rdata),
    .eng_we_i(eng_we), .eng_waddr_i(eng_waddr), .eng_wdata_i(eng_wdata),
    .host_re_i(io_host_re), .host_we_i(io_host_we), .host_addr_i(io_host_addr),
    .host_wdata_i(io_host_wdata), .host_rdata_o(io_host_rdata)
  );

  siu_engine u_engine (
    .clk(HCLK), .rst_n(HRESETn),
    .uinst_i(uinst_t'(uc_rdata)), .valid_i(exec_valid),
    .iter_clear_i(iter_clear), .iter_step_i(iter_step),
    .remap_cfg_i(remap_cfg),
    .buf_re_o(eng_re), .buf_raddr_o(eng_raddr), .buf_rdata_i(eng_rdata),
    .buf_we_o(eng_we), .buf_waddr_o(eng_waddr), .buf_wdata_o(eng_wdata),
    .bypass_o(bypass_evt), .store_o(store_evt)
  );

endmodule
