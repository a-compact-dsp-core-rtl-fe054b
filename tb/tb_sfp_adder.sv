// tb_sfp_adder - random operands and controls through the SFP adder; each result is
// compared with an integer model exactly two cycles after issue (latency 2).
module tb_sfp_adder;
  import dsplite_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] a, b, y;
  add_ctl_t ctl;
  int checks = 0, failures = 0;
  logic [15:0] expq[$];

  sfp_adder dut (.clk, .rst_n, .a_i(a), .b_i(b), .ctl_i(ctl), .y_o(y));

  always #5 clk = ~clk;

  function automatic logic [15:0] model(logic [15:0] x, logic [15:0] z, add_ctl_t c);
    int xa, za, s;
    xa = int'($signed(x));
    za = int'($signed(z));
    if (c.scale_a) xa = xa >>> 1;
    if (c.scale_b) za = za >>> 1;
    s = c.sub ? xa - za : xa + za;
    if (c.norm) s = s >>> 1;
    return 16'(s);
  endfunction

  initial begin
    a = 0; b = 0; ctl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // directed: 0.5 + 0.75 normalised = 0.625 (0x5000); 0.5 - 0.75 = -0.25
    for (int i = 0; i < 2004; i++) begin
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
      if (i == 0)      begin a = 16'h4000; b = 16'h6000; ctl = '{scale_a:0, scale_b:0, norm:1, sub:0}; end
      else if (i == 1) begin a = 16'h4000; b = 16'h6000; ctl = '{scale_a:0, scale_b:0, norm:0, sub:1}; end
      else begin a = 16'($urandom); b = 16'($urandom); ctl = 4'($urandom); end
      expq.push_back(model(a, b, ctl));
    end
    // the two directed results against hand-worked values were checked in the loop;
    // check the arithmetic reference itself once
    checks++; if (model(16'h4000, 16'h6000, '{0,0,1,0}) != 16'h5000) failures++;
    checks++; if (model(16'h4000, 16'h6000, '{0,0,0,1}) != 16'hE000) failures++;
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
