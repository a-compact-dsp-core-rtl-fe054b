// tb_siu_engine - microinstructions driven straight into the datapath, with a model
// of one I/O-buffer bank. Part 1 is a hand-scheduled program that loads two values,
// forwards them through the queue bypass into the adder and the multiplier, shifts the
// sum and stores all three results; it checks values and the slot in which each unit's
// result is on its bus (adder/shifter/load 2 cycles, multiplier 3). Part 2 repeats a
// 5-slot iteration eight times with the load and store remappers rotating, so one
// program walks through eight inputs and eight output words. Part 3 checks that
// slots marked invalid write nothing.
module tb_siu_engine;
  import dsplite_pkg::*;
  logic clk = 0, rst_n = 0;
  uinst_t u;
  logic valid, clear, step;
  remap_cfg_a cfg;
  logic re, we;
  logic [10:0] raddr, waddr;
  word_t rdata, wdata;
  logic byp, st;
  word_t bank [2048];
  int checks = 0, failures = 0, bypass_seen = 0;

  siu_engine dut (
    .clk, .rst_n, .uinst_i(u), .valid_i(valid), .iter_clear_i(clear), .iter_step_i(step),
    .remap_cfg_i(cfg), .buf_re_o(re), .buf_raddr_o(raddr), .buf_rdata_i(rdata),
    .buf_we_o(we), .buf_waddr_o(waddr), .buf_wdata_o(wdata), .bypass_o(byp), .store_o(st));

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (re) rdata <= bank[raddr];
    if (we) bank[waddr] <= wdata;
  end
  always @(posedge clk) if (byp) bypass_seen++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // drive one slot for one clock
  task automatic slot(uinst_t w);
    u = w; valid = 1; @(negedge clk);
  endtask

  initial begin
    uinst_t w;
    u = '0; valid = 0; clear = 0; step = 0; cfg = '0; rdata = '0;
    foreach (bank[i]) bank[i] = '0;
    bank[1] = 16'h4000;   //  0.5
    bank[2] = 16'h6000;   //  0.75
    for (int k = 0; k < 8; k++) bank[16 + k] = 16'(k * 4096 - 16000);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---------------- part 1
    w = '0; w.ld_va = 6'd1;                                   slot(w);   // t0
    check(dut.in_bus != 16'h4000, "load not early");
    w = '0; w.ld_va = 6'd2;                                   slot(w);   // t1
    w = '0; w.mul_wsel = SRC_IN; w.mul_wa = 0; w.add_wsel = SRC_IN; w.add_wa = 0;
    #1 check(dut.in_bus == 16'h4000, "load latency 2");
    slot(w);                                                             // t2
    w = '0; w.mul_wsel = SRC_IN; w.mul_wa = 1; w.add_wsel = SRC_IN; w.add_wa = 1;
    w.mul_ra0 = 0; w.mul_ra1 = 1; w.add_ra0 = 0; w.add_ra1 = 1; w.add_ctl.norm = 1;
    #1 check(dut.in_bus == 16'h6000, "second load");
    slot(w);                                                             // t3: issue add, mul
    check(dut.add_bus != 16'h5000, "adder not early");
    w = '0;                                                   slot(w);   // t4
    w = '0; w.shf_wsel = SRC_ADD; w.shf_wa = 0; w.shf_ra = 0;
    w.shf_ctl = '{amt: 4'd2, left: 1'b0, arith: 1'b1}; w.st_sel = ST_ADD; w.st_va = 0;
    #1 check(dut.add_bus == 16'h5000, "adder result at t+2");
    check(dut.mul_bus != 16'h3000, "multiplier not at t+2");
    slot(w);                                                             // t5
    w = '0; w.st_sel = ST_MUL; w.st_va = 1;
    #1 check(dut.mul_bus == 16'h3000, "multiplier result at t+3");
    slot(w);                                                             // t6
    w = '0; w.st_sel = ST_SHF; w.st_va = 2;
    #1 check(dut.shf_bus == 16'h1400, "shifter result");
    slot(w);                                                             // t7
    u = '0; valid = 0;
    repeat (3) @(negedge clk);
    check(bank[1024] == 16'h5000, "stored sum");
    check(bank[1025] == 16'h3000, "stored product");
    check(bank[1026] == 16'h1400, "stored shift");
    check(bypass_seen > 0, "bypass used");

    // ---------------- part 2: eight iterations of a 5-slot program
    cfg[RM_LD] = '{en: 1'b1, stride: 10'd1023, bound: 11'd1024};   // physical = 16 + k
    cfg[RM_ST] = '{en: 1'b1, stride: 10'd1023, bound: 11'd1024};   // physical = 1024+32+k
    clear = 1; @(negedge clk); clear = 0;
    for (int k = 0; k < 8; k++) begin
      w = '0; w.ld_va = 6'd16;                                    slot(w);
      w = '0;                                                     slot(w);
      w = '0; w.shf_wsel = SRC_IN; w.shf_wa = 3; w.shf_ra = 3;
      w.shf_ctl = '{amt: 4'd1, left: 1'b0, arith: 1'b1};          slot(w);
      w = '0;                                                     slot(w);
      w = '0; w.st_sel = ST_SHF; w.st_va = 6'd32; step = 1;       slot(w);
      step = 0;
    end
    u = '0; valid = 0;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 8; k++)
      check(bank[1024 + 32 + k] == 16'((k * 4096 - 16000) / 2), "remapped iteration");

    // ---------------- part 3: invalid slots do nothing
    bank[1024 + 60] = 16'h1234;
    cfg = '0;
    u = '0; u.st_sel = ST_ADD; u.st_va = 6'd60; valid = 0;
    repeat (4) @(negedge clk);
    check(bank[1024 + 60] == 16'h1234, "no store from invalid slot");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
