// tb_addr_remapper - the rotating-address example (bound 8, stride 1: virtual 3 ->
// physical 3, 2, 1, 0 over four iterations; virtual 5 in iteration 2 -> 3), then
// random strides and bounds against physical = (virtual - stride*iteration) mod bound,
// and addresses at or above the bound passing through unchanged.
module tb_addr_remapper;
  logic clk = 0, rst_n = 0;
  logic en, clear, step;
  logic [3:0] stride;
  logic [4:0] bound;
  logic [1:0][3:0] va, pa;
  int checks = 0, failures = 0;

  addr_remapper #(.AW(4), .NP(2)) dut (
    .clk, .rst_n, .en_i(en), .stride_i(stride), .bound_i(bound),
    .clear_i(clear), .step_i(step), .vaddr_i(va), .paddr_o(pa));

  always #5 clk = ~clk;

  task automatic expect_pa(int p, int e);
    checks++;
    if (int'(pa[p]) != e) begin
      failures++;
      if (failures < 10) $display("va=%0d got %0d exp %0d", va[p], pa[p], e);
    end
  endtask

  task automatic next_iter();
    step = 1; @(negedge clk); step = 0;
  endtask

  initial begin
    en = 1; clear = 0; step = 0; stride = 1; bound = 8; va = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    clear = 1; @(negedge clk); clear = 0;
    // Figure example
    va[0] = 3; va[1] = 5; #1; expect_pa(0, 3); expect_pa(1, 5);
    next_iter(); #1; expect_pa(0, 2); expect_pa(1, 4);
    next_iter(); #1; expect_pa(0, 1); expect_pa(1, 3);
    next_iter(); #1; expect_pa(0, 0); expect_pa(1, 2);
    next_iter(); #1; expect_pa(0, 7);
    // disabled: pass-through
    en = 0; va[0] = 9; #1; expect_pa(0, 9);
    en = 1;
    // random configurations
    for (int c = 0; c < 200; c++) begin
      int b, s, it;
      b = 1 + ($urandom % 16);
      s = $urandom % b;
      bound = 5'(b); stride = 4'(s);
      clear = 1; @(negedge clk); clear = 0;
      it = 0;
      for (int k = 0; k < 20; k++) begin
        va[0] = 4'($urandom % b);
        va[1] = 4'($urandom);
        #1;
        expect_pa(0, ((int'(va[0]) - s * it) % b + b * 64) % b);
        expect_pa(1, (int'(va[1]) >= b) ? int'(va[1]) : ((int'(va[1]) - s * it) % b + b * 64) % b);
        if ($urandom % 2) begin next_iter(); it++; end
        else @(negedge clk);
      end
    end
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
