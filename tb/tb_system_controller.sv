// tb_system_controller - runs of N slots x I iterations: checks the fetch address
// sequence, one execute cycle per fetch one cycle later, one iteration step per
// iteration on the last slot, the busy time 1 + N*I + 3, done, and the bank swap.
module tb_system_controller;
  logic clk = 0, rst_n = 0;
  logic start, swap;
  logic [9:0] pc_start;
  logic [10:0] prog_len;
  logic [15:0] iter_count;
  logic re, evalid, clear, step, busy, done, bank;
  logic [9:0] raddr;
  logic [15:0] iter_idx;
  logic [31:0] cycles;
  int checks = 0, failures = 0;

  system_controller dut (
    .clk, .rst_n, .start_i(start), .swap_i(swap), .pc_start_i(pc_start),
    .prog_len_i(prog_len), .iter_count_i(iter_count),
    .ucode_re_o(re), .ucode_raddr_o(raddr), .exec_valid_o(evalid),
    .iter_clear_o(clear), .iter_step_o(step), .busy_o(busy), .done_o(done),
    .bank_sel_o(bank), .iter_idx_o(iter_idx), .cycles_o(cycles));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic run(int base, int n, int iters);
    int fetches, execs, steps, clears, busy_cycles, k;
    bit prev_re;
    fetches = 0; execs = 0; steps = 0; clears = 0; busy_cycles = 0; k = 0; prev_re = 0;
    pc_start = 10'(base); prog_len = 11'(n); iter_count = 16'(iters);
    @(negedge clk);
    start = 1;
    #1 if (clear) clears++;
    busy_cycles = 1;
    @(negedge clk);
    start = 0;
    while (busy) begin
      busy_cycles++;
      if (re) begin
        check(int'(raddr) == base + (fetches % n), "fetch address");
        fetches++;
      end
      if (evalid) execs++;
      check(evalid == prev_re, "execute one cycle after fetch");
      prev_re = re;
      if (step) begin
        steps++;
        check((execs % n) == 0, "step on last slot");
      end
      @(negedge clk);
    end
    check(fetches == n * iters, "fetch count");
    check(execs == n * iters, "execute count");
    check(steps == iters, "iteration steps");
    check(clears == 1, "clear at start");
    check(busy_cycles == 1 + n * iters + 3, "busy cycles");
    check(cycles == 32'(1 + n * iters + 3), "cycle counter");
    check(done, "done");
  endtask

  initial begin
    start = 0; swap = 0; pc_start = 0; prog_len = 1; iter_count = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 4, 5);
    run(100, 7, 3);
    run(1020, 4, 1);     // address wraps inside the memory
    run(8, 1, 6);
    check(bank == 0, "bank after reset");
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    check(bank == 1, "bank after swap");
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
