// tb_dsplite_biquad - the core running a second-order IIR section (biquad), one of
// the benchmark kernels of the design, end to end through the AHB port at default
// sizes.
//
//   y[n] = b0*x[n] + b1*x[n-1] + b2*x[n-2] + a1*y[n-1] + a2*y[n-2]
//
// The schedule below was written by hand: 13 slots per iteration, iterations do not
// overlap. Five products go through the single multiplier, four sums through the
// adder, and every product and partial sum passes through the adder's input queue,
// which accepts only one word per cycle; the schedule interleaves them so that no two
// land in the same slot. The input and output histories live in the multiplier's
// queue, whose remapper rotates one word per iteration (bound 8) so that x[n] written
// at virtual word 0 is read back as x[n-1] at word 1 and x[n-2] at word 2, and y[n]
// written at word 4 as y[n-1] at 5 and y[n-2] at 6. The five coefficients sit at
// words 8..12, above the bound, where they do not rotate. Coefficients keep the
// output below one in magnitude, so no step overflows. Outputs are compared with an
// integer model; the busy time must be 1 + 13*I + 3 cycles for I iterations.
module tb_dsplite_biquad;
  import dsplite_pkg::*;
  localparam int M = 40;          // samples
  localparam int N = 13;          // slots per iteration
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

  function automatic int add16(int x, int y);
    return int'($signed(16'(x + y)));
  endfunction

  // a mul-queue read pair
  function automatic uinst_t mul_issue(uinst_t w, int ra0, int ra1);
    w.mul_ra0 = 4'(ra0); w.mul_ra1 = 4'(ra1);
    return w;
  endfunction

  int x [M];
  int coef [5];   // b0, b1, b2, a1, a2 at multiplier-queue words 8..12
  uinst_t prog [N];

  initial begin
    uinst_t w;
    logic [31:0] d;
    int y [M];
    HSEL = 0; HWRITE = 0; HADDR = 0; HTRANS = 0; HSIZE = 3'b010; HWDATA = 0;
    coef = '{6554, 4915, 3277, 9830, -6554};   // 0.2 0.15 0.1 0.3 -0.2
    for (int i = 0; i < M; i++) x[i] = int'($signed(16'($urandom)));
    repeat (3) @(negedge clk);
    rst_n = 1;

    // coefficient program at 0..6: load words 56..60 into multiplier queue 8..12
    for (int s = 0; s < 7; s++) begin
      w = '0;
      if (s < 5) w.ld_va = 6'(56 + s);
      if (s >= 2) begin w.mul_wsel = SRC_IN; w.mul_wa = 4'(8 + s - 2); end
      write_uinst(s, w);
    end

    // biquad program at 16..28
    foreach (prog[s]) prog[s] = '0;
    prog[0].ld_va = 6'd0;                 prog[0]  = mul_issue(prog[0], 9, 1);    // b1*x[n-1]
                                          prog[1]  = mul_issue(prog[1], 10, 2);   // b2*x[n-2]
    prog[2].mul_wsel = SRC_IN;  prog[2].mul_wa = 4'd0;                            // x[n]
                                          prog[2]  = mul_issue(prog[2], 8, 0);    // b0*x[n]
    prog[3].add_wsel = SRC_MUL; prog[3].add_wa = 4'd0;                            // b1*x[n-1]
    prog[4].add_wsel = SRC_MUL; prog[4].add_wa = 4'd1;                            // b2*x[n-2]
    prog[4].add_ra0 = 4'd0; prog[4].add_ra1 = 4'd1;                               // S1
                                          prog[4]  = mul_issue(prog[4], 12, 6);   // a2*y[n-2]
    prog[5].add_wsel = SRC_MUL; prog[5].add_wa = 4'd2;                            // b0*x[n]
    prog[6].add_wsel = SRC_ADD; prog[6].add_wa = 4'd3;                            // S1
    prog[6].add_ra0 = 4'd3; prog[6].add_ra1 = 4'd2;                               // S2
                                          prog[6]  = mul_issue(prog[6], 11, 5);   // a1*y[n-1]
    prog[7].add_wsel = SRC_MUL; prog[7].add_wa = 4'd4;                            // a2*y[n-2]
    prog[8].add_wsel = SRC_ADD; prog[8].add_wa = 4'd5;                            // S2
    prog[8].add_ra0 = 4'd5; prog[8].add_ra1 = 4'd4;                               // S3
    prog[9].add_wsel = SRC_MUL; prog[9].add_wa = 4'd6;                            // a1*y[n-1]
    prog[10].add_wsel = SRC_ADD; prog[10].add_wa = 4'd7;                          // S3
    prog[10].add_ra0 = 4'd7; prog[10].add_ra1 = 4'd6;                             // y[n]
    prog[12].mul_wsel = SRC_ADD; prog[12].mul_wa = 4'd4;                          // y[n] history
    prog[12].st_sel = ST_ADD; prog[12].st_va = 6'd0;                              // store y[n]
    for (int s = 0; s < N; s++) write_uinst(16 + s, prog[s]);

    for (int i = 0; i < M; i++) ahb_write(16'(16'h4000 + 4 * i), 32'(x[i]));
    for (int c = 0; c < 5; c++) ahb_write(16'(16'h4000 + 4 * (56 + c)), 32'(coef[c]));

    // remappers: multiplier queue rotates in words 0..7; load/store walk one word
    ahb_write(16'h0028, 32'd1);    ahb_write(16'h002C, 32'h0001_0008);
    ahb_write(16'h0038, 32'd1023); ahb_write(16'h003C, 32'h0001_0400);
    ahb_write(16'h0040, 32'd1023); ahb_write(16'h0044, 32'h0001_0400);
    ahb_write(16'h0000, 32'h2);

    run_and_wait(0, 7, 1);
    run_and_wait(16, N, M);
    ahb_read(16'h0014, d); check(d == 32'(1 + N * M + 3), "busy cycles = 1 + 13*M + 3");
    ahb_write(16'h0000, 32'h2);

    for (int n = 0; n < M; n++) begin
      int xm1, xm2, ym1, ym2, s1, s2, s3;
      xm1 = (n >= 1) ? x[n-1] : 0;  xm2 = (n >= 2) ? x[n-2] : 0;
      ym1 = (n >= 1) ? y[n-1] : 0;  ym2 = (n >= 2) ? y[n-2] : 0;
      s1 = add16(mulq(coef[1], xm1), mulq(coef[2], xm2));
      s2 = add16(s1, mulq(coef[0], x[n]));
      s3 = add16(s2, mulq(coef[4], ym2));
      y[n] = add16(s3, mulq(coef[3], ym1));
      ahb_read(16'(16'h4000 + 4 * (1024 + n)), d);
      check(d == 32'(y[n]), "y[n]");
      if (d != 32'(y[n]) && failures < 10) $display("n=%0d got %0d exp %0d", n, $signed(d), y[n]);
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
