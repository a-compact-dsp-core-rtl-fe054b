// tb_dsplite_lattice - the core running a two-stage FIR lattice filter, one of the
// benchmark kernels of the design, end to end through the AHB port at default sizes.
// It also shows static floating-point scaling at work: every addition uses the
// adder's output normaliser, so each stage halves its outputs and no sum can
// overflow; the compiler would record this as an exponent of +1 per stage.
//
//   f1[n] = (x[n] + k1*x[n-1]) / 2         g1[n] = (k1*x[n] + x[n-1]) / 2
//   y[n]  = (f1[n] + k2*g1[n-1]) / 2
//
// Hand schedule, 9 slots per iteration, iterations do not overlap:
//   slot 0  load x[n]; multiply k1*x[n-1]
//   slot 1  multiply k2*g1[n-1]
//   slot 2  x[n] into multiplier-queue word 0 and adder-queue word 0 (one result, two queues)
//   slot 3  k1*x[n-1] into adder word 2; add x[n] + k1*x[n-1] (bypass); multiply k1*x[n]
//   slot 4  k2*g1[n-1] into adder word 3
//   slot 5  f1 into adder word 4; add f1 (bypass) + k2*g1[n-1]
//   slot 6  k1*x[n] into adder word 5; add it (bypass) + x[n-1]
//   slot 7  store y[n]
//   slot 8  g1[n] into multiplier-queue word 4
// k1*x[n] is issued one slot later than the multiplier allows, because in slot 5 the
// adder result f1 already takes the adder queue's only write port. Both queues rotate
// one word per iteration, so x[n] written at word 0 is read next iteration as x[n-1]
// at word 1, and g1[n] written at multiplier word 4 comes back as g1[n-1] at word 5.
// k1 and k2 sit at multiplier words 8 and 9, above the bound of 8, and stay put.
// Outputs are compared with an integer model of the arithmetic; the busy time must be
// 1 + 9*I + 3 cycles for I iterations.
// The lattice filter is one of the kernels the core was evaluated on, but its order,
// this schedule and its scaling are this testbench's own choices.
module tb_dsplite_lattice;
  import dsplite_pkg::*;
  localparam int M = 48;          // samples
  localparam int N = 9;           // slots per iteration
  logic clk = 0, rst_n = 0;
  logic HSEL, HWRITE, HREADYOUT;
  logic [15:0] HADDR;
  logic [1:0] HTRANS, HRESP;
  logic [2:0] HSIZE;
  logic [31:0] HWDATA, HRDATA;
  int checks = 0, failures = 0, n_bypass = 0, n_step = 0;

  dsplite_top dut (
    .HCLK(clk), .HRESETn(rst_n), .HSEL, .HADDR, .HWRITE, .HTRANS, .HSIZE, .HWDATA,
    .HREADY(HREADYOUT), .HRDATA, .HREADYOUT, .HRESP);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (dut.bypass_evt && dut.exec_valid) n_bypass++;
    if (dut.iter_step) n_step++;
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

  function automatic int mulq(int x, int y);
    longint p;
    p = longint'(x) * longint'(y);
    return int'($signed(16'((p + 16384) >>> 15)));
  endfunction

  // adder with the output normaliser on: the 17-bit sum halved, rounding down
  function automatic int addn(int x, int y);
    return (x + y) >>> 1;
  endfunction

  int x [M];
  int k [2];      // k1, k2 at multiplier-queue words 8, 9
  uinst_t prog [N];
  add_ctl_t halve;

  initial begin
    uinst_t w;
    logic [31:0] d;
    int y, f1, g1 [M];
    HSEL = 0; HWRITE = 0; HADDR = 0; HTRANS = 0; HSIZE = 3'b010; HWDATA = 0;
    k = '{16384, -9830};   // 0.5, -0.3
    halve = '{scale_a: 1'b0, scale_b: 1'b0, norm: 1'b1, sub: 1'b0};
    for (int i = 0; i < M; i++) x[i] = int'($signed(16'($urandom)));
    x[0] = 32767; x[1] = -32768; x[2] = -32768;   // full-scale steps
    repeat (3) @(negedge clk);
    rst_n = 1;

    // coefficient program at 0..3: load words 56, 57 into multiplier queue 8, 9
    for (int s = 0; s < 4; s++) begin
      w = '0;
      if (s < 2) w.ld_va = 6'(56 + s);
      if (s >= 2) begin w.mul_wsel = SRC_IN; w.mul_wa = 4'(8 + s - 2); end
      write_uinst(s, w);
    end

    // lattice program at 32..40
    foreach (prog[s]) prog[s] = '0;
    prog[0].ld_va = 6'd0;   prog[0].mul_ra0 = 4'd8; prog[0].mul_ra1 = 4'd1;      // k1*x[n-1]
    prog[1].mul_ra0 = 4'd9; prog[1].mul_ra1 = 4'd5;                              // k2*g1[n-1]
    prog[2].mul_wsel = SRC_IN; prog[2].mul_wa = 4'd0;                            // x[n]
    prog[2].add_wsel = SRC_IN; prog[2].add_wa = 4'd0;
    prog[3].add_wsel = SRC_MUL; prog[3].add_wa = 4'd2;                           // k1*x[n-1]
    prog[3].add_ra0 = 4'd0; prog[3].add_ra1 = 4'd2; prog[3].add_ctl = halve;     // f1
    prog[3].mul_ra0 = 4'd8; prog[3].mul_ra1 = 4'd0;                              // k1*x[n]
    prog[4].add_wsel = SRC_MUL; prog[4].add_wa = 4'd3;                           // k2*g1[n-1]
    prog[5].add_wsel = SRC_ADD; prog[5].add_wa = 4'd4;                           // f1
    prog[5].add_ra0 = 4'd4; prog[5].add_ra1 = 4'd3; prog[5].add_ctl = halve;     // y
    prog[6].add_wsel = SRC_MUL; prog[6].add_wa = 4'd5;                           // k1*x[n]
    prog[6].add_ra0 = 4'd5; prog[6].add_ra1 = 4'd1; prog[6].add_ctl = halve;     // g1
    prog[7].st_sel = ST_ADD; prog[7].st_va = 6'd0;                               // store y[n]
    prog[8].mul_wsel = SRC_ADD; prog[8].mul_wa = 4'd4;                           // g1 history
    for (int s = 0; s < N; s++) write_uinst(32 + s, prog[s]);

    for (int i = 0; i < M; i++) ahb_write(16'(16'h4000 + 4 * i), 32'(x[i]));
    for (int c = 0; c < 2; c++) ahb_write(16'(16'h4000 + 4 * (56 + c)), 32'(k[c]));

    // remappers: adder queue rotates in 16 words, multiplier queue in words 0..7,
    // load/store walk one word per iteration
    ahb_write(16'h0020, 32'd1);    ahb_write(16'h0024, 32'h0001_0010);
    ahb_write(16'h0028, 32'd1);    ahb_write(16'h002C, 32'h0001_0008);
    ahb_write(16'h0038, 32'd1023); ahb_write(16'h003C, 32'h0001_0400);
    ahb_write(16'h0040, 32'd1023); ahb_write(16'h0044, 32'h0001_0400);
    ahb_write(16'h0000, 32'h2);

    run_and_wait(0, 4, 1);
    run_and_wait(32, N, M);
    ahb_read(16'h0014, d); check(d == 32'(1 + N * M + 3), "busy cycles = 1 + 9*M + 3");
    ahb_write(16'h0000, 32'h2);

    for (int n = 0; n < M; n++) begin
      int xm1, gm1;
      xm1 = (n >= 1) ? x[n-1] : 0;
      gm1 = (n >= 1) ? g1[n-1] : 0;
      f1 = addn(x[n], mulq(k[0], xm1));
      g1[n] = addn(mulq(k[0], x[n]), xm1);
      y = addn(f1, mulq(k[1], gm1));
      ahb_read(16'(16'h4000 + 4 * (1024 + n)), d);
      check(d == 32'(y), "y[n]");
      if (d != 32'(y) && failures < 10) $display("n=%0d got %0d exp %0d", n, $signed(d), y);
    end
    check(n_bypass > 0, "bypass happened");
    check(n_step == 1 + M, "iteration steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
