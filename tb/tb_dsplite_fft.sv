// tb_dsplite_fft - the core running radix-2 FFT butterflies, the inner operation of
// the complex FFT benchmark, end to end through the AHB port at default sizes.
//
// One iteration of a 19-slot program computes one decimation-in-time butterfly on
// complex A, B and twiddle W, all 16-bit fractions, loaded as six words:
//   t  = W*B, each part halved:  tr = (Wr*Br - Wi*Bi)/2,  ti = (Wr*Bi + Wi*Br)/2
//   X  = (A/2 + t)/2             Y  = (A/2 - t)/2
// so both outputs are (A +- W*B)/4 and can never overflow. In static floating-point
// terms the compiler would add 2 to the exponent of the data at every stage. The
// adder's input pre-scaler, its subtract mode and its output normaliser all take
// part. Slots:
//   0..5   load Ar, Ai, Br, Bi, Wr, Wi (they arrive two slots later)
//   6..9   multiply Wr*Br, Wi*Bi, Wr*Bi, Wi*Br (the first two read W by bypass)
//   11     tr = (p1 - p2)/2       12  ti = (p3 + p4)/2 (p4 by bypass)
//   13..16 Xr, Xi, Yr, Yi from A pre-scaled by 1/2 and t
//   15..18 store Xr, Xi, Yr, Yi
// tr is issued in slot 11 rather than 10 so that it does not reach the adder's queue
// in the same slot as p4: that queue has a single write port.
// The load remapper uses stride 1018 and the store remapper stride 1020 (both
// modulo 1024), so that every iteration advances six words through the inputs and
// four through the outputs.
//
// Part 1 runs 32 random butterflies. Part 2 computes a complete 8-point FFT as three
// runs of four butterflies. Between stages the host reorders the data, as the host
// or DMA of the system would. Every output is compared bit for bit with an integer
// model of the arithmetic. The final spectrum is also compared with a floating-point
// DFT divided by 64, within a few least significant bits. Busy times are checked to be
// 1 + 19*I + 3 cycles.
// The complex FFT is one of the kernels the core was evaluated on; its size, this
// butterfly schedule and the host reordering are this testbench's own choices.
module tb_dsplite_fft;
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

  // bit-accurate model of one butterfly: returns Xr, Xi, Yr, Yi
  task automatic bfly_model(input int ar, ai, br, bi, wr, wi, output int o [4]);
    int tr, ti;
    tr = addm(mulq(wr, br), mulq(wi, bi), 1'b0, 1'b1, 1'b1);
    ti = addm(mulq(wr, bi), mulq(wi, br), 1'b0, 1'b0, 1'b1);
    o[0] = addm(ar, tr, 1'b1, 1'b0, 1'b1);
    o[1] = addm(ai, ti, 1'b1, 1'b0, 1'b1);
    o[2] = addm(ar, tr, 1'b1, 1'b1, 1'b1);
    o[3] = addm(ai, ti, 1'b1, 1'b1, 1'b1);
  endtask

  localparam int N = 19;
  uinst_t prog [N];
  int n_sub = 0;
  always @(posedge clk)
    if (dut.exec_valid && dut.u_engine.u.add_ctl.sub) n_sub++;

  // write I butterflies (6 input words each) into the host bank, run them, and read
  // the 4 results of each back
  task automatic run_bflies(input int nb, input int in_w [], output int out_w []);
    logic [31:0] d;
    out_w = new[4 * nb];
    for (int i = 0; i < 6 * nb; i++) ahb_write(16'(16'h4000 + 4 * i), 32'(in_w[i]));
    ahb_write(16'h0000, 32'h2);
    run_and_wait(64, N, nb);
    ahb_read(16'h0014, d); check(d == 32'(1 + N * nb + 3), "busy cycles = 1 + 19*I + 3");
    ahb_write(16'h0000, 32'h2);
    for (int i = 0; i < 4 * nb; i++) begin
      ahb_read(16'(16'h4000 + 4 * (1024 + i)), d);
      out_w[i] = int'($signed(d[15:0]));
    end
  endtask

  function automatic int rnd_half();   // random fraction in [-0.5, 0.5)
    return int'($signed(16'($urandom))) >>> 1;
  endfunction

  initial begin
    int in_w [], out_w [], o [4];
    int xr [8], xi [8], mr [8], mi [8];
    add_ctl_t c;
    real max_err;
    HSEL = 0; HWRITE = 0; HADDR = 0; HTRANS = 0; HSIZE = 3'b010; HWDATA = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // butterfly program at 64..82
    foreach (prog[s]) prog[s] = '0;
    for (int s = 0; s < 6; s++) prog[s].ld_va = 6'(s);
    prog[2].add_wsel = SRC_IN; prog[2].add_wa = 4'd0;                       // Ar
    prog[3].add_wsel = SRC_IN; prog[3].add_wa = 4'd1;                       // Ai
    prog[4].mul_wsel = SRC_IN; prog[4].mul_wa = 4'd0;                       // Br
    prog[5].mul_wsel = SRC_IN; prog[5].mul_wa = 4'd1;                       // Bi
    prog[6].mul_wsel = SRC_IN; prog[6].mul_wa = 4'd2;                       // Wr
    prog[7].mul_wsel = SRC_IN; prog[7].mul_wa = 4'd3;                       // Wi
    prog[6].mul_ra0 = 4'd2; prog[6].mul_ra1 = 4'd0;                         // p1 = Wr*Br
    prog[7].mul_ra0 = 4'd3; prog[7].mul_ra1 = 4'd1;                         // p2 = Wi*Bi
    prog[8].mul_ra0 = 4'd2; prog[8].mul_ra1 = 4'd1;                         // p3 = Wr*Bi
    prog[9].mul_ra0 = 4'd3; prog[9].mul_ra1 = 4'd0;                         // p4 = Wi*Br
    prog[9].add_wsel  = SRC_MUL; prog[9].add_wa  = 4'd2;                    // p1
    prog[10].add_wsel = SRC_MUL; prog[10].add_wa = 4'd3;                    // p2
    prog[11].add_wsel = SRC_MUL; prog[11].add_wa = 4'd4;                    // p3
    prog[12].add_wsel = SRC_MUL; prog[12].add_wa = 4'd5;                    // p4
    c = '{scale_a: 1'b0, scale_b: 1'b0, norm: 1'b1, sub: 1'b1};
    prog[11].add_ra0 = 4'd2; prog[11].add_ra1 = 4'd3; prog[11].add_ctl = c; // tr
    c.sub = 1'b0;
    prog[12].add_ra0 = 4'd4; prog[12].add_ra1 = 4'd5; prog[12].add_ctl = c; // ti
    prog[13].add_wsel = SRC_ADD; prog[13].add_wa = 4'd6;                    // tr
    prog[14].add_wsel = SRC_ADD; prog[14].add_wa = 4'd7;                    // ti
    c.scale_a = 1'b1;
    prog[13].add_ra0 = 4'd0; prog[13].add_ra1 = 4'd6; prog[13].add_ctl = c; // Xr
    prog[14].add_ra0 = 4'd1; prog[14].add_ra1 = 4'd7; prog[14].add_ctl = c; // Xi
    c.sub = 1'b1;
    prog[15].add_ra0 = 4'd0; prog[15].add_ra1 = 4'd6; prog[15].add_ctl = c; // Yr
    prog[16].add_ra0 = 4'd1; prog[16].add_ra1 = 4'd7; prog[16].add_ctl = c; // Yi
    for (int s = 15; s < 19; s++) begin
      prog[s].st_sel = ST_ADD; prog[s].st_va = 6'(s - 15);
    end
    for (int s = 0; s < N; s++) write_uinst(64 + s, prog[s]);

    // load walks 6 words and store 4 words per iteration
    ahb_write(16'h0038, 32'd1018); ahb_write(16'h003C, 32'h0001_0400);
    ahb_write(16'h0040, 32'd1020); ahb_write(16'h0044, 32'h0001_0400);

    // part 1: random butterflies, full-scale corners first
    in_w = new[6 * 32];
    foreach (in_w[i]) in_w[i] = int'($signed(16'($urandom)));
    for (int i = 0; i < 5; i++) in_w[i] = 32767;
    in_w[5] = -32768;
    for (int i = 6; i < 12; i++) in_w[i] = -32768;
    run_bflies(32, in_w, out_w);
    for (int b = 0; b < 32; b++) begin
      bfly_model(in_w[6*b], in_w[6*b+1], in_w[6*b+2], in_w[6*b+3], in_w[6*b+4], in_w[6*b+5], o);
      for (int k = 0; k < 4; k++) begin
        check(out_w[4*b+k] == o[k], "random butterfly");
        if (out_w[4*b+k] != o[k] && failures < 10)
          $display("bfly %0d out %0d got %0d exp %0d", b, k, out_w[4*b+k], o[k]);
      end
    end

    // part 2: 8-point FFT, input in bit-reversed order, three stages of 4 butterflies
    for (int i = 0; i < 8; i++) begin
      xr[i] = rnd_half(); xi[i] = rnd_half();
    end
    for (int i = 0; i < 8; i++) begin
      int r;
      r = int'({i[0], i[1], i[2]});
      mr[r] = xr[i]; mi[r] = xi[i];
    end
    for (int h = 1; h < 8; h *= 2) begin
      int pos [4];
      int nb;
      nb = 0;
      in_w = new[24];
      for (int i = 0; i < 8; i++) begin
        if ((i / h) % 2 == 0) begin
          real ang;
          int wr, wi;
          ang = -3.14159265358979 * real'(i % h) / real'(h);
          wr = int'($rtoi($floor($cos(ang) * 32767.0 + 0.5)));
          wi = int'($rtoi($floor($sin(ang) * 32767.0 + 0.5)));
          in_w[6*nb]   = mr[i];   in_w[6*nb+1] = mi[i];
          in_w[6*nb+2] = mr[i+h]; in_w[6*nb+3] = mi[i+h];
          in_w[6*nb+4] = wr;      in_w[6*nb+5] = wi;
          pos[nb] = i;
          nb++;
        end
      end
      run_bflies(4, in_w, out_w);
      for (int b = 0; b < 4; b++) begin
        int i;
        i = pos[b];
        bfly_model(in_w[6*b], in_w[6*b+1], in_w[6*b+2], in_w[6*b+3], in_w[6*b+4], in_w[6*b+5], o);
        for (int k = 0; k < 4; k++) check(out_w[4*b+k] == o[k], "FFT butterfly");
        mr[i] = out_w[4*b];   mi[i] = out_w[4*b+1];
        mr[i+h] = out_w[4*b+2]; mi[i+h] = out_w[4*b+3];
      end
    end
    // against a floating-point DFT, scaled by 1/4 per stage
    max_err = 0.0;
    for (int k = 0; k < 8; k++) begin
      real sr, si, e;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < 8; n++) begin
        real ang;
        ang = -2.0 * 3.14159265358979 * real'(k * n) / 8.0;
        sr += real'(xr[n]) * $cos(ang) - real'(xi[n]) * $sin(ang);
        si += real'(xr[n]) * $sin(ang) + real'(xi[n]) * $cos(ang);
      end
      e = sr / 64.0 - real'(mr[k]); if (e < 0.0) e = -e; if (e > max_err) max_err = e;
      e = si / 64.0 - real'(mi[k]); if (e < 0.0) e = -e; if (e > max_err) max_err = e;
    end
    $display("8-point FFT: largest difference from the scaled DFT %0.2f LSB", max_err);
    check(max_err < 4.0, "FFT within 4 LSB of the scaled DFT");
    check(n_bypass > 0, "bypass happened");
    check(n_sub > 0, "subtract mode used");
    check(n_step == 32 + 3 * 4, "iteration steps");
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
