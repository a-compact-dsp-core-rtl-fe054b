// ahb_slave - AMBA AHB slave port of the DSP-lite core.
//
// The host processor and the system DMA reach the core only through this port. It
// decodes three regions of a 64 KB window (byte addresses, 32-bit word accesses):
//   0x0000 - 0x00FF  registers
//        0x00 CTRL        write: bit0 start, bit1 swap ping-pong banks (idle only)
//        0x04 STATUS      read:  bit0 busy, bit1 done, bit2 engine bank
//        0x08 PC_START    first microinstruction of the program
//        0x0C PROG_LEN    N, slots per iteration
//        0x10 ITER_COUNT  iterations to run
//        0x14 CYCLES      read: busy cycles of the last run
//        0x20 + 8k        remapper k stride (k = 0 adder queue, 1 multiplier queue,
//        0x24 + 8k        remapper k bound[10:0], enable bit 16     2 shifter queue,
//                                                                   3 load, 4 store)
//   0x2000 - 0x3FFF  microinstruction memory, entry = addr[12:3], addr[2] = high half
//   0x4000 - 0x5FFF  host-side I/O-buffer bank, word = addr[12:2], data in bits 15:0
// Writes complete with no wait state; reads take one wait state, during which the
// memories are read. HRESP is always OKAY. HSIZE is not decoded (every transfer is
// taken as a 32-bit word) and only HTRANS[1] is used (NONSEQ and SEQ alike). The document only names a standard AHB
// interface; this map, the register set and the wait-state policy are this design's.
module ahb_slave
  import dsplite_pkg::*;
(
  input  logic                 HCLK,
  input  logic                 HRESETn,
  input  logic                 HSEL,
  input  logic [15:0]          HADDR,
  input  logic                 HWRITE,
  input  logic [1:0]           HTRANS,
  input  logic [2:0]           HSIZE,
  input  logic [31:0]          HWDATA,
  input  logic                 HREADY,
  output logic [31:0]          HRDATA,
  output logic                 HREADYOUT,
  output logic [1:0]           HRESP,
  // control of the core
  output logic                 start_o,
  output logic                 swap_o,
  output logic [UCODE_AW-1:0]  pc_start_o,
  output logic [UCODE_AW:0]    prog_len_o,
  output logic [15:0]          iter_count_o,
  output remap_cfg_a           remap_cfg_o,
  input  logic                 busy_i,
  input  logic                 done_i,
  input  logic                 bank_sel_i,
  input  logic [31:0]          cycles_i,
  // microinstruction memory
  output logic [1:0]           uc_we_o,
  output logic [UCODE_AW-1:0]  uc_waddr_o,
  output logic [31:0]          uc_wdata_o,
  output logic                 uc_re_o,
  output logic [UCODE_AW-1:0]  uc_raddr_o,
  input  logic [UINST_W-1:0]   uc_rdata_i,
  // host side of the I/O buffer
  output logic                 io_re_o,
  output logic                 io_we_o,
  output logic [IOBUF_AW-1:0]  io_addr_o,
  output word_t                io_wdata_o,
  input  word_t                io_rdata_i
);

  typedef enum logic [1:0] {R_REG, R_UCODE, R_IOBUF, R_NONE} region_e;

  logic        dp_valid, dp_write, rd_wait_q;
  logic [15:0] dp_addr;
  region_e     dp_region;
  logic [31:0] reg_rdata_q;
  logic        rd_first;

  function automatic region_e decode(input logic [15:0] a);
    if (a[15:8] == 8'h00)       return R_REG;
    else if (a[15:13] == 3'b001) return R_UCODE;
    else if (a[15:13] == 3'b010) return R_IOBUF;
    else                         return R_NONE;
  endfunction

  // address phase -> data phase
  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      dp_valid <= 1'b0;
      dp_write <= 1'b0;
      dp_addr  <= '0;
    end else if (HREADY) begin
      dp_valid <= HSEL && HTRANS[1];
      dp_write <= HWRITE;
      dp_addr  <= HADDR;
    end
  end

  assign dp_region = decode(dp_addr);
  assign rd_first  = dp_valid && !dp_write && !rd_wait_q;
  assign HREADYOUT = !rd_first;
  assign HRESP     = 2'b00;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) rd_wait_q <= 1'b0;
    else          rd_wait_q <= rd_first;
  end

  // ------------------------------------------------------------------ registers
  logic wr_reg;
  assign wr_reg = dp_valid && dp_write && (dp_region == R_REG);

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      pc_start_o   <= '0;
      prog_len_o   <= (UCODE_AW+1)'(1);
      iter_count_o <= '0;
      remap_cfg_o  <= '0;
    end else if (wr_reg) begin
      unique case (dp_addr[7:2])
        6'h02: pc_start_o   <= HWDATA[UCODE_AW-1:0];
        6'h03: prog_len_o   <= HWDATA[UCODE_AW:0];
        6'h04: iter_count_o <= HWDATA[15:0];
        default: begin
          for (int k = 0; k < NUM_REMAP; k++) begin
            if (dp_addr[7:2] == 6'(8 + 2*k)) remap_cfg_o[k].stride <= HWDATA[IOREG_AW-1:0];
            if (dp_addr[7:2] == 6'(9 + 2*k)) begin
              remap_cfg_o[k].bound <= HWDATA[IOREG_AW:0];
              remap_cfg_o[k].en    <= HWDATA[16];
            end
          end
        end
      endcase
    end
  end

  assign start_o = wr_reg && (dp_addr[7:2] == 6'h00) && HWDATA[0];
  assign swap_o  = wr_reg && (dp_addr[7:2] == 6'h00) && HWDATA[1];

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) reg_rdata_q <= '0;
    else if (rd_first) begin
      reg_rdata_q <= '0;
      unique case (dp_addr[7:2])
        6'h01: reg_rdata_q <= {29'd0, bank_sel_i, done_i, busy_i};
        6'h02: reg_rdata_q <= 32'(pc_start_o);
        6'h03: reg_rdata_q <= 32'(prog_len_o);
        6'h04: reg_rdata_q <= 32'(iter_count_o);
        6'h05: reg_rdata_q <= cycles_i;
        default: begin
          for (int k = 0; k < NUM_REMAP; k++) begin
            if (dp_addr[7:2] == 6'(8 + 2*k)) reg_rdata_q <= 32'(remap_cfg_o[k].stride);
            if (dp_addr[7:2] == 6'(9 + 2*k))
              reg_rdata_q <= {15'd0, remap_cfg_o[k].en, 5'd0, remap_cfg_o[k].bound};
          end
        end
      endcase
    end
  end

  // ------------------------------------------------------------------ memories
  assign uc_we_o    = (dp_valid && dp_write && dp_region == R_UCODE) ?
                      (dp_addr[2] ? 2'b10 : 2'b01) : 2'b00;
  assign uc_waddr_o = dp_addr[12:3];
  assign uc_wdata_o = HWDATA;
  assign uc_re_o    = rd_first && dp_region == R_UCODE;
  assign uc_raddr_o = dp_addr[12:3];

  assign io_we_o    = dp_valid && dp_write && dp_region == R_IOBUF;
  assign io_re_o    = rd_first && dp_region == R_IOBUF;
  assign io_addr_o  = dp_addr[12:2];
  assign io_wdata_o = HWDATA[DATA_W-1:0];

  always_comb begin
    unique case (dp_region)
      R_REG:   HRDATA = reg_rdata_q;
      R_UCODE: HRDATA = dp_addr[2] ? uc_rdata_i[63:32] : uc_rdata_i[31:0];
      R_IOBUF: HRDATA = {{(32-DATA_W){io_rdata_i[DATA_W-1]}}, io_rdata_i};
      default: HRDATA = '0;
    endcase
  end

endmodule
