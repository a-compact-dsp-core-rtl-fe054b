// tb_ahb_slave - single AHB transfers from a simple bus master. Checks register
// write/read-back, one-cycle start and swap pulses, status and cycle-count read
// paths, microinstruction half-word writes and read-back, I/O-buffer host writes
// and reads (sign-extended), no wait state on writes and exactly one on reads.
module tb_ahb_slave;
  import dsplite_pkg::*;
  logic clk = 0, rst_n = 0;
  logic HSEL, HWRITE, HREADYOUT;
  logic [15:0] HADDR;
  logic [1:0] HTRANS, HRESP;
  logic [2:0] HSIZE;
  logic [31:0] HWDATA, HRDATA;
  logic start, swap, busy, done, bank;
  logic [9:0] pc_start;
  logic [10:0] prog_len;
  logic [15:0] iter_count;
  logic [31:0] cycles;
  remap_cfg_a cfg;
  logic [1:0] uc_we;
  logic [9:0] uc_waddr, uc_raddr;
  logic [31:0] uc_wdata;
  logic uc_re;
  logic [63:0] uc_rdata;
  logic io_re, io_we;
  logic [10:0] io_addr;
  word_t io_wdata, io_rdata;
  logic [63:0] ucode [1024];
  word_t iomem [2048];
  int checks = 0, failures = 0, starts = 0, swaps = 0, waits = 0;

  ahb_slave dut (
    .HCLK(clk), .HRESETn(rst_n), .HSEL, .HADDR, .HWRITE, .HTRANS, .HSIZE, .HWDATA,
    .HREADY(HREADYOUT), .HRDATA, .HREADYOUT, .HRESP,
    .start_o(start), .swap_o(swap), .pc_start_o(pc_start), .prog_len_o(prog_len),
    .iter_count_o(iter_count), .remap_cfg_o(cfg), .busy_i(busy), .done_i(done),
    .bank_sel_i(bank), .cycles_i(cycles),
    .uc_we_o(uc_we), .uc_waddr_o(uc_waddr), .uc_wdata_o(uc_wdata), .uc_re_o(uc_re),
    .uc_raddr_o(uc_raddr), .uc_rdata_i(uc_rdata),
    .io_re_o(io_re), .io_we_o(io_we), .io_addr_o(io_addr), .io_wdata_o(io_wdata),
    .io_rdata_i(io_rdata));

  always #5 clk = ~clk;

  // memory models with synchronous reads
  always_ff @(posedge clk) begin
    if (uc_we[0]) ucode[uc_waddr][31:0]  <= uc_wdata;
    if (uc_we[1]) ucode[uc_waddr][63:32] <= uc_wdata;
    if (uc_re)    uc_rdata <= ucode[uc_raddr];
    if (io_we)    iomem[io_addr] <= io_wdata;
    if (io_re)    io_rdata <= iomem[io_addr];
  end
  always @(posedge clk) begin
    if (start) starts++;
    if (swap)  swaps++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic ahb_write(logic [15:0] a, logic [31:0] d);
    int w;
    w = 0;
    @(negedge clk);
    HSEL = 1; HTRANS = 2'b10; HWRITE = 1; HADDR = a;
    @(negedge clk);
    HSEL = 0; HTRANS = 2'b00; HWDATA = d;
    while (!HREADYOUT) begin w++; @(negedge clk); end
    check(w == 0, "write without wait state");
    @(posedge clk);
  endtask

  task automatic ahb_read(logic [15:0] a, output logic [31:0] d);
    int w;
    w = 0;
    @(negedge clk);
    HSEL = 1; HTRANS = 2'b10; HWRITE = 0; HADDR = a;
    @(negedge clk);
    HSEL = 0; HTRANS = 2'b00;
    while (!HREADYOUT) begin w++; @(negedge clk); end
    d = HRDATA;
    check(w == 1, "read with one wait state");
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] d;
    HSEL = 0; HWRITE = 0; HADDR = 0; HTRANS = 0; HSIZE = 3'b010; HWDATA = 0;
    busy = 0; done = 1; bank = 1; cycles = 32'd12345;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // registers
    ahb_write(16'h0008, 32'd37);   ahb_read(16'h0008, d); check(d == 37 && pc_start == 37, "PC_START");
    ahb_write(16'h000C, 32'd600);  ahb_read(16'h000C, d); check(d == 600 && prog_len == 600, "PROG_LEN");
    ahb_write(16'h0010, 32'd999);  ahb_read(16'h0010, d); check(d == 999 && iter_count == 999, "ITER_COUNT");
    for (int k = 0; k < NUM_REMAP; k++) begin
      ahb_write(16'(16'h20 + 8 * k), 32'(100 + k));
      ahb_write(16'(16'h24 + 8 * k), 32'h0001_0000 | 32'(200 + k));
    end
    for (int k = 0; k < NUM_REMAP; k++) begin
      ahb_read(16'(16'h20 + 8 * k), d); check(d == 32'(100 + k) && cfg[k].stride == 10'(100 + k), "stride");
      ahb_read(16'(16'h24 + 8 * k), d);
      check(d == (32'h0001_0000 | 32'(200 + k)) && cfg[k].en && cfg[k].bound == 11'(200 + k), "bound");
    end
    ahb_read(16'h0004, d); check(d == 32'b110, "STATUS");
    ahb_read(16'h0014, d); check(d == 32'd12345, "CYCLES");
    ahb_write(16'h0000, 32'h1); ahb_write(16'h0000, 32'h2); ahb_write(16'h0000, 32'h3);
    @(negedge clk);
    check(starts == 2 && swaps == 2, "start/swap pulses");
    // microinstruction memory
    for (int i = 0; i < 16; i++) begin
      ahb_write(16'(16'h2000 + 8 * (i * 37 % 1024)), 32'hA000_0000 + 32'(i));
      ahb_write(16'(16'h2004 + 8 * (i * 37 % 1024)), 32'h5000_0000 + 32'(i));
    end
    for (int i = 0; i < 16; i++) begin
      check(ucode[i * 37 % 1024] == {32'h5000_0000 + 32'(i), 32'hA000_0000 + 32'(i)}, "ucode write");
      ahb_read(16'(16'h2004 + 8 * (i * 37 % 1024)), d); check(d == 32'h5000_0000 + 32'(i), "ucode read high");
      ahb_read(16'(16'h2000 + 8 * (i * 37 % 1024)), d); check(d == 32'hA000_0000 + 32'(i), "ucode read low");
    end
    // I/O buffer
    for (int i = 0; i < 32; i++) ahb_write(16'(16'h4000 + 4 * (i * 61)), 32'(i * 1500 - 20000));
    for (int i = 0; i < 32; i++) begin
      check(iomem[i * 61] == 16'(i * 1500 - 20000), "io write");
      ahb_read(16'(16'h4000 + 4 * (i * 61)), d); check(d == 32'(i * 1500 - 20000), "io read");
    end
    check(HRESP == 2'b00, "OKAY response");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
