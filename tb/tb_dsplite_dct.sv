// tb_dsplite_dct - the core computing an 8x8 two-dimensional DCT, the benchmark of
// the design, end to end through the AHB port at default sizes.
//
// One iteration of a 48-slot program computes an 8-point DCT-II of one row with the
// even/odd factorisation: 22 multiplications and 28 additions. Every addition uses
// the adder's output normaliser. The static scaling is therefore fixed: each 1-D pass
// yields the orthonormal DCT divided by 4, and the 2-D result is the orthonormal 2-D
// DCT divided by 16, so no step can overflow for inputs in [-1, 1).
//   s_n = (x_n + x_7-n)/2, d_n = (x_n - x_7-n)/2                   n = 0..3
//   a0 = (s0+s3)/2, a1 = (s1+s2)/2, a2 = (s0-s3)/2, a3 = (s1-s2)/2
//   X0 = c4*(a0+a1)/2,   X4 = c4*(a0-a1)/2
//   X2 = (c2*a2 + c6*a3)/2,   X6 = (c6*a2 - c2*a3)/2
//   X1 = ((c1 d0 + c3 d1)/2 + (c5 d2 + c7 d3)/2)/2, and likewise X3, X5, X7
// with ck = cos(k*pi/16) in Q1.15, held in multiplier-queue words 9..15.
// The schedule was produced by a list scheduler. It issues the operation with the
// longest remaining path first, gives every result a slot in which the write port of
// each consuming queue (and the store port, for an output) is free, and allocates
// queue words by lifetime: 16 adder-queue words, and 9 multiplier-queue words for
// data. Its words are listed below as 64-bit constants; the field layout is the one
// of the microinstruction record.
//
// Sequence: a one-iteration program loads the seven coefficients. The row pass runs
// the DCT program for 8 iterations, with the load and store remappers advancing 8
// words per iteration (stride 1016 modulo 1024). The host then transposes the
// result, as the system DMA would when it moves a block, and the column pass runs the
// same program again. The outputs are compared bit for bit with an integer model of
// the same operations, and with a floating-point 2-D DCT. The busy time of each pass
// must be 1 + 48*8 + 3 cycles.
// The 8x8 DCT with 16-bit static floating point is the design's main benchmark. The
// factorisation, the schedule and the host transposition are this testbench's own.
module tb_dsplite_dct;
  import dsplite_pkg::*;
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

  // adder: optional >>1 on A, add or subtract, optional >>1 on the 17-bit result
  function automatic int addm(int x, int y, bit sa, bit sub, bit norm);
    int s;
    s = (sa ? (x >>> 1) : x) + (sub ? -y : y);
    return norm ? (s >>> 1) : int'($signed(16'(s)));
  endfunction

  localparam int N = 48;
  logic [63:0] prog [N];
  int ck [8];

  // bit-accurate model of the 1-D program
  function automatic void dct8(input int x [8], output int X [8]);
    int s [4], d [4], a [4], p [4], u, v;
    int terms [8][4], sgn [8][4];
    terms[1] = '{1, 3, 5, 7}; sgn[1] = '{1, 1, 1, 1};
    terms[3] = '{3, 7, 1, 5}; sgn[3] = '{1, -1, -1, -1};
    terms[5] = '{5, 1, 7, 3}; sgn[5] = '{1, -1, 1, 1};
    terms[7] = '{7, 5, 3, 1}; sgn[7] = '{1, -1, 1, -1};
    for (int n = 0; n < 4; n++) begin
      s[n] = addm(x[n], x[7-n], 1'b0, 1'b0, 1'b1);
      d[n] = addm(x[n], x[7-n], 1'b0, 1'b1, 1'b1);
    end
    a[0] = addm(s[0], s[3], 1'b0, 1'b0, 1'b1);  a[1] = addm(s[1], s[2], 1'b0, 1'b0, 1'b1);
    a[2] = addm(s[0], s[3], 1'b0, 1'b1, 1'b1);  a[3] = addm(s[1], s[2], 1'b0, 1'b1, 1'b1);
    X[0] = mulq(ck[4], addm(a[0], a[1], 1'b0, 1'b0, 1'b1));
    X[4] = mulq(ck[4], addm(a[0], a[1], 1'b0, 1'b1, 1'b1));
    X[2] = addm(mulq(ck[2], a[2]), mulq(ck[6], a[3]), 1'b0, 1'b0, 1'b1);
    X[6] = addm(mulq(ck[6], a[2]), mulq(ck[2], a[3]), 1'b0, 1'b1, 1'b1);
    for (int k = 1; k < 8; k += 2) begin
      for (int i = 0; i < 4; i++) p[i] = mulq(ck[terms[k][i]], d[i]);
      u = addm(p[0], p[1], 1'b0, sgn[k][0] * sgn[k][1] < 0, 1'b1);
      v = addm(p[2], p[3], 1'b0, sgn[k][2] * sgn[k][3] < 0, 1'b1);
      X[k] = addm(u, v, 1'b0, sgn[k][2] < 0, 1'b1);
    end
  endfunction

  initial begin
    logic [31:0] d;
    int blk [8][8], mid [8][8], res [8][8], row [8], out [8];
    real max_err;
    HSEL = 0; HWRITE = 0; HADDR = 0; HTRANS = 0; HSIZE = 3'b010; HWDATA = 0;
    for (int k = 1; k < 8; k++) begin
      ck[k] = int'($rtoi($floor($cos(3.14159265358979 * real'(k) / 16.0) * 32768.0 + 0.5)));
      if (ck[k] > 32767) ck[k] = 32767;
    end
    ck[0] = 0;
    foreach (blk[r, c]) blk[r][c] = int'($signed(16'($urandom)));
    blk[0] = '{32767, 32767, 32767, 32767, 32767, 32767, 32767, 32767};
    repeat (3) @(negedge clk);
    rst_n = 1;

    // coefficient program at 0..8: load words 1..7 into multiplier queue 9..15
    for (int s = 0; s < 9; s++) begin
      uinst_t w;
      w = '0;
      if (s < 7) w.ld_va = 6'(s + 1);
      if (s >= 2) begin w.mul_wsel = SRC_IN; w.mul_wa = 4'(9 + s - 2); end
      write_uinst(s, w);
    end
    prog[ 0] = 64'h0000000000000000;
    prog[ 1] = 64'h0000000000000100;
    prog[ 2] = 64'h0002000000000200;
    prog[ 3] = 64'h0012000000000300;
    prog[ 4] = 64'h0022000000000400;
    prog[ 5] = 64'h0032000000000500;
    prog[ 6] = 64'h3442600000000600;
    prog[ 7] = 64'h2552600000000700;
    prog[ 8] = 64'h16625e0080000000;
    prog[ 9] = 64'h07727a2280000000;
    prog[10] = 64'h1684722000000000;
    prog[11] = 64'h0096124480000000;
    prog[12] = 64'h00a6166680000000;
    prog[13] = 64'h0016164000000000;
    prog[14] = 64'h0066000000000000;
    prog[15] = 64'h07b65e6000000000;
    prog[16] = 64'h00c6000000000000;
    prog[17] = 64'h25045a0000000000;
    prog[18] = 64'h0076000000000000;
    prog[19] = 64'h34245a4000000000;
    prog[20] = 64'h8256600000000000;
    prog[21] = 64'h0334400000000000;
    prog[22] = 64'h8246400880000000;
    prog[23] = 64'h03d4726000000000;
    prog[24] = 64'hd2245e2000000000;
    prog[25] = 64'hd200760a80000000;
    prog[26] = 64'h00061e4c80000000;
    prog[27] = 64'h003618ce80000000;
    prog[28] = 64'h6b265a6000000000;
    prog[29] = 64'h008618e000000000;
    prog[30] = 64'ha964562000000080;
    prog[31] = 64'h00b6000000000000;
    prog[32] = 64'hc794720000000084;
    prog[33] = 64'h69a654a000000000;
    prog[34] = 64'h00741c8000000000;
    prog[35] = 64'h00c6000000000041;
    prog[36] = 64'h15665ca000000000;
    prog[37] = 64'h6996548000000000;
    prog[38] = 64'h7114600000000000;
    prog[39] = 64'h4056600000000042;
    prog[40] = 64'h3266400000000043;
    prog[41] = 64'h8b04600000000000;
    prog[42] = 64'hac14600000000000;
    prog[43] = 64'h5624600000000000;
    prog[44] = 64'h0134400000000000;
    prog[45] = 64'h2300400000000046;
    prog[46] = 64'h0000000000000045;
    prog[47] = 64'h0000000000000047;
    for (int s = 0; s < N; s++) write_uinst(128 + s, uinst_t'(prog[s]));

    for (int k = 1; k < 8; k++) ahb_write(16'(16'h4000 + 4 * k), 32'(ck[k]));
    ahb_write(16'h0000, 32'h2);
    run_and_wait(0, 9, 1);
    ahb_write(16'h0000, 32'h2);
    // load and store walk 8 words per iteration
    ahb_write(16'h0038, 32'd1016); ahb_write(16'h003C, 32'h0001_0400);
    ahb_write(16'h0040, 32'd1016); ahb_write(16'h0044, 32'h0001_0400);

    for (int pass = 0; pass < 2; pass++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          ahb_write(16'(16'h4000 + 4 * (8 * r + c)), 32'(pass == 0 ? blk[r][c] : mid[c][r]));
      ahb_write(16'h0000, 32'h2);
      run_and_wait(128, N, 8);
      ahb_read(16'h0014, d); check(d == 32'(1 + N * 8 + 3), "busy cycles = 1 + 48*8 + 3");
      ahb_write(16'h0000, 32'h2);
      for (int r = 0; r < 8; r++) begin
        for (int c = 0; c < 8; c++) row[c] = (pass == 0) ? blk[r][c] : mid[c][r];
        dct8(row, out);
        for (int k = 0; k < 8; k++) begin
          ahb_read(16'(16'h4000 + 4 * (1024 + 8 * r + k)), d);
          check(int'($signed(d[15:0])) == out[k], "DCT output");
          if (int'($signed(d[15:0])) != out[k] && failures < 10)
            $display("pass %0d row %0d k %0d got %0d exp %0d", pass, r, k, $signed(d[15:0]), out[k]);
          if (pass == 0) mid[r][k] = out[k]; else res[r][k] = out[k];
        end
      end
    end
    // res[c][v]: column c, vertical frequency v; against the orthonormal 2-D DCT / 16
    max_err = 0.0;
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        real acc, e;
        acc = 0.0;
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++)
            acc += real'(blk[y][x]) * $cos(real'((2 * x + 1) * u) * 3.14159265358979 / 16.0)
                                    * $cos(real'((2 * y + 1) * v) * 3.14159265358979 / 16.0);
        acc = acc * (u == 0 ? 0.70710678 : 1.0) * (v == 0 ? 0.70710678 : 1.0) / 4.0 / 16.0;
        e = acc - real'(res[u][v]); if (e < 0.0) e = -e; if (e > max_err) max_err = e;
      end
    $display("8x8 DCT: largest difference from the scaled floating-point DCT %0.2f LSB", max_err);
    check(max_err < 4.0, "2-D DCT within 4 LSB of the floating-point DCT / 16");
    check(n_bypass > 0, "bypass happened");
    check(n_step == 1 + 16, "iteration steps");
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
