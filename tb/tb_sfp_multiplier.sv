// tb_sfp_multiplier - fractional products with and without the <<1 normaliser,
// compared with an integer rounding model exactly three cycles after issue.
module tb_sfp_multiplier;
  logic clk = 0, rst_n = 0;
  logic [15:0] a, b, y;
  logic norm;
  int checks = 0, failures = 0;
  logic [15:0] expq[$];

  sfp_multiplier dut (.clk, .rst_n, .a_i(a), .b_i(b), .norm_i(norm), .y_o(y));

  always #5 clk = ~clk;

  function automatic logic [15:0] model(logic [15:0] x, logic [15:0] z, logic n);
    longint p;
    p = longint'($signed(x)) * longint'($signed(z));
    if (n) return 16'((p + 64'sd8192) >>> 14);
    else   return 16'((p + 64'sd16384) >>> 15);
  endfunction

  initial begin
    a = 0; b = 0; norm = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3003; i++) begin
      @(negedge clk);
      if (expq.size() == 3) begin
        logic [15:0] e;
        e = expq.pop_front();
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h exp %h", y, e);
        end
      end
      if (i == 0)      begin a = 16'h4000; b = 16'h4000; norm = 0; end  // 0.5*0.5
      else if (i == 1) begin a = 16'h4000; b = 16'h4000; norm = 1; end
      else if (i == 2) begin a = 16'hC000; b = 16'h6000; norm = 0; end  // -0.5*0.75
      else begin a = 16'($urandom); b = 16'($urandom); norm = 1'($urandom); end
      expq.push_back(model(a, b, norm));
    end
    // hand-worked values
    checks++; if (model(16'h4000, 16'h4000, 0) != 16'h2000) failures++;
    checks++; if (model(16'h4000, 16'h4000, 1) != 16'h4000) failures++;
    checks++; if (model(16'hC000, 16'h6000, 0) != 16'hD000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
