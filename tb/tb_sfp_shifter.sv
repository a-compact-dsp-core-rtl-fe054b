// tb_sfp_shifter - left, logical-right and sign-extending right shifts of random
// words; results checked two cycles after issue against a bit-loop model.
module tb_sfp_shifter;
  import dsplite_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] a, y;
  shf_ctl_t ctl;
  int checks = 0, failures = 0;
  logic [15:0] expq[$];

  sfp_shifter dut (.clk, .rst_n, .a_i(a), .ctl_i(ctl), .y_o(y));

  always #5 clk = ~clk;

  function automatic logic [15:0] model(logic [15:0] x, shf_ctl_t c);
    logic [15:0] r;
    r = x;
    for (int k = 0; k < int'(c.amt); k++) begin
      if (c.left) r = {r[14:0], 1'b0};
      else        r = {c.arith ? r[15] : 1'b0, r[15:1]};
    end
    return r;
  endfunction

  initial begin
    a = 0; ctl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2002; i++) begin
      @(negedge clk);
      if (expq.size() == 2) begin
        logic [15:0] e;
        e = expq.pop_front();
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h exp %h", y, e);
        end
      end
      a = 16'($urandom); ctl = 6'($urandom);
      expq.push_back(model(a, ctl));
    end
    checks++; if (model(16'h8000, '{amt:4'd3, left:1'b0, arith:1'b1}) != 16'hF000) failures++;
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
