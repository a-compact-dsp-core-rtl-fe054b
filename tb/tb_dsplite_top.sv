// tb_dsplite_top - end-to-end run of the whole core at its default sizes, driven
// only through the AHB port, as a host processor would.
//
// Workload: the two-tap filter y[n] = a*x[n] + b*x[n-1] in 16-bit static floating
// point, compiled by hand into a software-pipelined schedule of N = 4 slots per
// iteration (iterations overlap: an output leaves two iterations after its input
// arrives). Per iteration: one load, a*x on the multiplier, b*x on the multiplier
// with its <<1 normaliser, the sum on the adder with a >>1 pre-scaler on the b term
// and the >>1 output normaliser, the sum stored, and the sum shifted right by two with
// sign extension on the barrel shifter and stored as well. The b*x product of one
// iteration waits in the adder's queue for the next iteration; the rotating address
// remapper of that queue lets the same microcode find it there. Loads and stores walk
// through the I/O buffer through their own remappers.
//
// Sequence: the host fills the free ping-pong bank (inputs and the two coefficients),
// loads both programs, swaps banks, runs a one-iteration program that moves the
// coefficients into the multiplier's queue, runs the filter for M+2 iterations while
// it uses the free bank itself, swaps back and checks every output against an
// integer model of the arithmetic, and checks the busy time 1 + 4*(M+2) + 3 cycles.
// Counted mechanisms: queue bypass, iteration steps (remapper rotation), stores,
// bank swaps, read wait states. Each must have happened.
module tb_dsplite_top;
  import dsplite_pkg::*;
  localparam int M = 24;          // filter inputs
  localparam int N = 4;           // slots per iteration
  logic clk = 0, rst_n = 0;
  logic HSEL, HWRITE, HREADYOUT;
  logic [15:0] HADDR;
  logic [1:0] HTRANS, HRESP;
  logic [2:0] HSIZE;
  logic [31:0] HWDATA, HRDATA;
  int checks = 0, failures = 0;
  int n_bypass = 0, n_step = 0, n_store = 0, n_swap = 0, n_wait = 0;
  logic prev_bank = 0;

  dsplite_top dut (
    .HCLK(clk), .HRESETn(rst_n), .HSEL, .HADDR, .HWRITE, .HTRANS, .HSIZE, .HWDATA,
    .HREADY(HREADYOUT), .HRDATA, .HREADYOUT, .HRESP);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (dut.bypass_evt && dut.exec_valid) n_bypass++;
    if (dut.iter_step) n_step++;
    if (dut.store_evt) n_store++;
    if (dut.bank_sel != prev_bank) n_swap++;
    if (!HREADYOUT) n_wait++;
    prev_bank <= dut.bank_sel;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic ahb_write(logic [15:0] a, logic [31:0] d);
    @(negedge clk);
    HSEL = 1; HTRANS = 2'b10; HWRITE = 1; HADDR = a;
    @(negedge clk);
    HSEL = 0; HTRANS = 2'b00; HWDATA = d;
    while (!HREADYOUT) @(negedge clk);
    @(posedge clk);
  endtask

  task automatic ahb_read(logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    HSEL = 1; HTRANS = 2'b10; HWRITE = 0; HADDR = a;
    @(negedge clk);
    HSEL = 0; HTRANS = 2'b00;
    while (!HREADYOUT) @(negedge clk);
    d = HRDATA;
    @(posedge clk);
  endtask

  task automatic write_uinst(int addr, uinst_t w);
    ahb_write(16'(16'h2000 + 8 * addr), w[31:0]);
    ahb_write(16'(16'h2004 + 8 * addr), w[63:32]);
  endtask

  task automatic run_and_wait(int pc, int len, int iters);
    logic [31:0] d;
    ahb_write(16'h0008, 32'(pc));
    ahb_write(16'h000C, 32'(len));
    ahb_write(16'h0010, 32'(iters));
    ahb_write(16'h0000, 32'h1);
    do ahb_read(16'h0004, d); while (d[0] || !d[1]);
  endtask

  // reference arithmetic, written independently of the RTL
  function automatic int mulq(int x, int y, bit norm);
    longint p;
    p = longint'(x) * longint'(y);
    return norm ? int'($signed(16'((p + 8192) >>> 14))) : int'($signed(16'((p + 16384) >>> 15)));
  endfunction

  int x [M + 2];
  int a_c, b_c;

  initial begin
    uinst_t w;
    logic [31:0] d;
    int y, z, A, Bp, s;
    HSEL = 0; HWRITE = 0; HADDR = 0; HTRANS = 0; HSIZE = 3'b010; HWDATA = 0;
    a_c = 16'sd19661;     //  0.6
    b_c = -16'sd9830;     // -0.3 (stored x2 would overflow, so the product is normalised)
    for (int i = 0; i < M + 2; i++) x[i] = (i < M) ? int'($signed(16'($urandom))) : 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // -- coefficient program, slots 0..3: load a, b into multiplier queue words 0, 1
    w = '0; w.ld_va = 6'd60; write_uinst(0, w);
    w = '0; w.ld_va = 6'd61; write_uinst(1, w);
    w = '0; w.mul_wsel = SRC_IN; w.mul_wa = 4'd0; write_uinst(2, w);
    w = '0; w.mul_wsel = SRC_IN; w.mul_wa = 4'd1; write_uinst(3, w);
    // -- filter program, slots 8..11 (iteration k)
    w = '0; w.ld_va = 6'd0;                                  // load x[k]
    w.st_sel = ST_ADD; w.st_va = 6'd0;                       // store y[k-2]
    w.shf_wsel = SRC_ADD; w.shf_wa = 3'd0; w.shf_ra = 3'd0;  // y[k-2] >>> 2 (bypass)
    w.shf_ctl = '{amt: 4'd2, left: 1'b0, arith: 1'b1};
    write_uinst(8, w);
    w = '0; w.add_wsel = SRC_MUL; w.add_wa = 4'd0;           // a*x[k-1] into adder queue
    write_uinst(9, w);
    w = '0; w.mul_wsel = SRC_IN; w.mul_wa = 4'd2;            // x[k] into multiplier queue
    w.mul_ra0 = 4'd0; w.mul_ra1 = 4'd2;                      // a*x[k] (bypass)
    w.add_wsel = SRC_MUL; w.add_wa = 4'd1;                   // 2b*x[k-1] into adder queue
    w.add_ra0 = 4'd0; w.add_ra1 = 4'd2;                      // a*x[k-1] + b*x[k-2] ...
    w.add_ctl = '{scale_a: 1'b0, scale_b: 1'b1, norm: 1'b1, sub: 1'b0};
    w.st_sel = ST_SHF; w.st_va = 6'd32;                      // store (y[k-2] >>> 2)
    write_uinst(10, w);
    w = '0; w.mul_ra0 = 4'd1; w.mul_ra1 = 4'd2; w.mul_norm = 1'b1;   // 2b*x[k]
    write_uinst(11, w);

    // -- data into the free bank (bank 1 after reset)
    for (int i = 0; i < M + 2; i++) ahb_write(16'(16'h4000 + 4 * i), 32'(x[i]));
    ahb_write(16'(16'h4000 + 4 * 60), 32'(a_c));
    ahb_write(16'(16'h4000 + 4 * 61), 32'(b_c));

    // -- remappers: adder queue rotates by one word per iteration; loads and stores
    //    advance one word per iteration (stride 1023 = -1 modulo 1024)
    ahb_write(16'h0020, 32'd1);    ahb_write(16'h0024, 32'h0001_0010);
    ahb_write(16'h0038, 32'd1023); ahb_write(16'h003C, 32'h0001_0400);
    ahb_write(16'h0040, 32'd1023); ahb_write(16'h0044, 32'h0001_0400);

    ahb_write(16'h0000, 32'h2);                               // swap: engine gets bank 1
    ahb_read(16'h0004, d); check(d[2] == 1'b1, "engine bank after swap");

    run_and_wait(0, N, 1);
    ahb_read(16'h0014, d); check(d == 32'(1 + N * 1 + 3), "coefficient program cycles");

    // filter run; the host uses the free bank meanwhile
    ahb_write(16'h0008, 32'd8);
    ahb_write(16'h000C, 32'(N));
    ahb_write(16'h0010, 32'(M + 2));
    ahb_write(16'h0000, 32'h1);
    ahb_write(16'h4000 + 4 * 5, 32'h0000_7abc);
    ahb_read(16'h4000 + 4 * 5, d); check(d[15:0] == 16'h7abc, "host bank usable while busy");
    ahb_read(16'h0004, d); check(d[0] == 1'b1, "busy during run");
    do ahb_read(16'h0004, d); while (d[0] || !d[1]);
    ahb_read(16'h0014, d); check(d == 32'(1 + N * (M + 2) + 3), "filter cycles = 1 + N*(M+2) + 3");

    ahb_write(16'h0000, 32'h2);                               // swap back
    for (int n = 1; n < M; n++) begin
      A  = mulq(a_c, x[n], 1'b0);
      Bp = mulq(b_c, x[n-1], 1'b1);
      s  = (A + (Bp >>> 1)) >>> 1;
      y  = int'($signed(16'(s)));
      z  = y >>> 2;
      ahb_read(16'(16'h4000 + 4 * (1024 + n + 2)), d);
      check(d == 32'(y), "y[n]");
      if (d != 32'(y) && failures < 10) $display("n=%0d y got %0d exp %0d", n, $signed(d), y);
      ahb_read(16'(16'h4000 + 4 * (1024 + 32 + n + 2)), d);
      check(d == 32'(z), "y[n] >>> 2");
    end

    $display("mechanisms: bypass=%0d iteration_steps=%0d stores=%0d swaps=%0d wait_states=%0d",
             n_bypass, n_step, n_store, n_swap, n_wait);
    check(n_bypass > 0, "bypass happened");
    check(n_step == 1 + M + 2, "one remapper step per iteration");
    check(n_store >= 2 * (M + 2), "stores");
    check(n_swap == 2, "two bank swaps");
    check(n_wait > 0, "read wait states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
