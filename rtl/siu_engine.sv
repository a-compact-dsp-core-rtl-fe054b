// siu_engine - SIU-based DSP datapath of the DSP-lite core.
//
// Four functional units run side by side: the SFP adder (latency 2), the SFP
// multiplier (latency 3), the barrel shifter (latency 2) and the load/store unit
// (load latency 2). The stream interface unit (SIU) feeds them: each SFPU unit reads
// its operands from its own small input-queue memory, and every result bus goes back
// through a 4-by-4 switch into whichever queues (or the store register) the program
// names. There is no register file and no instruction decoding: each cycle one 64-bit
// microinstruction gives all queue addresses, switch selects and unit controls, as
// produced by a compile-time schedule. At most one result per cycle may enter a queue.
//
// Every memory access goes through an address remapper, so a periodic program can
// reuse the same virtual addresses in every iteration while the physical locations
// rotate. The remappers use the iteration index of the cycle in which the access
// happens; the offset advances at the clock edge ending a cycle with iter_step_i.
//
// Cycle semantics of a microinstruction executed in cycle t (valid_i=1):
//   read fields  - queue words read in t, operation registered at the end of t,
//                  result on its bus in t+2 (adder, shifter, load) or t+3 (multiplier);
//   write fields - the value on the selected bus in t is written at the end of t
//                  (visible to reads in the same cycle through the queue bypass);
//   store fields - the selected bus value is captured in O at the end of t and written
//                  into the output half of the engine's I/O bank at the end of t+1.
// With valid_i=0 nothing is written or stored. The unit organisation follows the
// document; the cycle semantics and field layout are this design's choices.
module siu_engine
  import dsplite_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  uinst_t                uinst_i,
  input  logic                  valid_i,
  input  logic                  iter_clear_i,
  input  logic                  iter_step_i,
  input  remap_cfg_a            remap_cfg_i,
  // engine side of the I/O buffer
  output logic                  buf_re_o,
  output logic [IOBUF_AW-1:0]   buf_raddr_o,
  input  word_t                 buf_rdata_i,
  output logic                  buf_we_o,
  output logic [IOBUF_AW-1:0]   buf_waddr_o,
  output word_t                 buf_wdata_o,
  // observation
  output logic                  bypass_o,     // a queue read was served by the bypass
  output logic                  store_o       // a store was issued this cycle
);

  uinst_t u;
  assign u = valid_i ? uinst_i : '0;   // all-zero word is a no-op

  // ---------------------------------------------------------------- result buses
  word_t in_bus, add_bus, mul_bus, shf_bus;

  // ---------------------------------------------------------------- switch
  src_e [3:0]           sel;
  logic [3:0][DATA_W-1:0] dst;
  logic [3:0]           dst_we;

  always_comb begin
    sel[0] = u.add_wsel;
    sel[1] = u.mul_wsel;
    sel[2] = u.shf_wsel;
    unique case (u.st_sel)
      ST_ADD:  sel[3] = SRC_ADD;
      ST_MUL:  sel[3] = SRC_MUL;
      ST_SHF:  sel[3] = SRC_SHF;
      default: sel[3] = SRC_NONE;
    endcase
  end

  siu_switch #(.W(DATA_W)) u_switch (
    .in_bus_i (in_bus),
    .add_bus_i(add_bus),
    .mul_bus_i(mul_bus),
    .shf_bus_i(shf_bus),
    .sel_i    (sel),
    .dst_o    (dst),
    .dst_we_o (dst_we)
  );

  // ---------------------------------------------------------------- remappers
  logic [2:0][QAW_2R-1:0] add_va, add_pa, mul_va, mul_pa;
  logic [1:0][QAW_1R-1:0] shf_va, shf_pa;
  logic [0:0][IOREG_AW-1:0] ld_va, ld_pa, st_va, st_pa;

  assign add_va = {u.add_wa, u.add_ra1, u.add_ra0};
  assign mul_va = {u.mul_wa, u.mul_ra1, u.mul_ra0};
  assign shf_va = {u.shf_wa, u.shf_ra};
  assign ld_va  = IOREG_AW'(u.ld_va);
  assign st_va  = IOREG_AW'(u.st_va);

  addr_remapper #(.AW(QAW_2R), .NP(3)) u_rm_add (
    .clk, .rst_n,
    .en_i    (remap_cfg_i[RM_ADD].en),
    .stride_i(remap_cfg_i[RM_ADD].stride[QAW_2R-1:0]),
    .bound_i (remap_cfg_i[RM_ADD].bound[QAW_2R:0]),
    .clear_i (iter_clear_i), .step_i(iter_step_i),
    .vaddr_i (add_va), .paddr_o(add_pa)
  );
  addr_remapper #(.AW(QAW_2R), .NP(3)) u_rm_mul (
    .clk, .rst_n,
    .en_i    (remap_cfg_i[RM_MUL].en),
    .stride_i(remap_cfg_i[RM_MUL].stride[QAW_2R-1:0]),
    .bound_i (remap_cfg_i[RM_MUL].bound[QAW_2R:0]),
    .clear_i (iter_clear_i), .step_i(iter_step_i),
    .vaddr_i (mul_va), .paddr_o(mul_pa)
  );
  addr_remapper #(.AW(QAW_1R), .NP(2)) u_rm_shf (
    .clk, .rst_n,
    .en_i    (remap_cfg_i[RM_SHF].en),
    .stride_i(remap_cfg_i[RM_SHF].stride[QAW_1R-1:0]),
    .bound_i (remap_cfg_i[RM_SHF].bound[QAW_1R:0]),
    .clear_i (iter_clear_i), .step_i(iter_step_i),
    .vaddr_i (shf_va), .paddr_o(shf_pa)
  );
  addr_remapper #(.AW(IOREG_AW), .NP(1)) u_rm_ld (
    .clk, .rst_n,
    .en_i    (remap_cfg_i[RM_LD].en),
    .stride_i(remap_cfg_i[RM_LD].stride),
    .bound_i (remap_cfg_i[RM_LD].bound),
    .clear_i (iter_clear_i), .step_i(iter_step_i),
    .vaddr_i (ld_va), .paddr_o(ld_pa)
  );
  addr_remapper #(.AW(IOREG_AW), .NP(1)) u_rm_st (
    .clk, .rst_n,
    .en_i    (remap_cfg_i[RM_ST].en),
    .stride_i(remap_cfg_i[RM_ST].stride),
    .bound_i (remap_cfg_i[RM_ST].bound),
    .clear_i (iter_clear_i), .step_i(iter_step_i),
    .vaddr_i (st_va), .paddr_o(st_pa)
  );

  // ---------------------------------------------------------------- input queues
  logic [1:0][DATA_W-1:0] add_rd, mul_rd;
  logic [0:0][DATA_W-1:0] shf_rd;
  logic [1:0]             add_byp, mul_byp;
  logic [0:0]             shf_byp;

  siu_queue_mem #(.DEPTH(QDEPTH_2R), .NR(2), .W(DATA_W)) u_q_add (
    .clk, .rst_n,
    .we_i(dst_we[0]), .wa_i(add_pa[2]), .wd_i(dst[0]),
    .ra_i(add_pa[1:0]), .rd_o(add_rd), .bypass_o(add_byp)
  );
  siu_queue_mem #(.DEPTH(QDEPTH_2R), .NR(2), .W(DATA_W)) u_q_mul (
    .clk, .rst_n,
    .we_i(dst_we[1]), .wa_i(mul_pa[2]), .wd_i(dst[1]),
    .ra_i(mul_pa[1:0]), .rd_o(mul_rd), .bypass_o(mul_byp)
  );
  siu_queue_mem #(.DEPTH(QDEPTH_1R), .NR(1), .W(DATA_W)) u_q_shf (
    .clk, .rst_n,
    .we_i(dst_we[2]), .wa_i(shf_pa[1]), .wd_i(dst[2]),
    .ra_i(shf_pa[0:0]), .rd_o(shf_rd), .bypass_o(shf_byp)
  );

  assign bypass_o = |{add_byp, mul_byp, shf_byp};

  // ---------------------------------------------------------------- functional units
  sfp_adder #(.W(DATA_W)) u_add (
    .clk, .rst_n, .a_i(add_rd[0]), .b_i(add_rd[1]), .ctl_i(u.add_ctl), .y_o(add_bus)
  );
  sfp_multiplier #(.W(DATA_W)) u_mul (
    .clk, .rst_n, .a_i(mul_rd[0]), .b_i(mul_rd[1]), .norm_i(u.mul_norm), .y_o(mul_bus)
  );
  sfp_shifter #(.W(DATA_W)) u_shf (
    .clk, .rst_n, .a_i(shf_rd[0]), .ctl_i(u.shf_ctl), .y_o(shf_bus)
  );

  load_store_unit #(.W(DATA_W), .AW(IOREG_AW)) u_lsu (
    .clk, .rst_n,
    .ld_en_i    (valid_i),
    .ld_addr_i  (ld_pa[0]),
    .st_en_i    (dst_we[3]),
    .st_addr_i  (st_pa[0]),
    .st_data_i  (dst[3]),
    .buf_re_o,
    .buf_raddr_o,
    .buf_rdata_i,
    .buf_we_o,
    .buf_waddr_o,
    .buf_wdata_o,
    .i_bus_o    (in_bus)
  );

  assign store_o = dst_we[3];

endmodule
