// tb_microcode_mem - writes 64-bit words as two 32-bit halves to random addresses
// and reads them back one cycle after the read address.
module tb_microcode_mem;
  logic clk = 0;
  logic [1:0] we;
  logic [9:0] wa, ra;
  logic [31:0] wd;
  logic re;
  logic [63:0] rd;
  logic [63:0] model [1024];
  logic        valid [1024];
  int checks = 0, failures = 0;

  microcode_mem #(.DEPTH(1024), .W(64)) dut (
    .clk, .we_i(we), .waddr_i(wa), .wdata_i(wd), .re_i(re), .raddr_i(ra), .rdata_o(rd));

  always #5 clk = ~clk;

  initial begin
    we = 0; wa = 0; wd = 0; re = 0; ra = 0;
    foreach (valid[i]) valid[i] = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      wa = 10'($urandom); wd = 32'($urandom);
      we = 2'b01; @(negedge clk);
      model[wa][31:0] = wd;
      wd = 32'($urandom); we = 2'b10; @(negedge clk);
      model[wa][63:32] = wd;
      valid[wa] = 1;
      we = 0;
    end
    for (int a = 0; a < 1024; a++) begin
      if (!valid[a]) continue;
      re = 1; ra = 10'(a);
      @(negedge clk);
      checks++;
      if (rd !== model[a]) begin failures++; if (failures < 10) $display("addr %0d got %h exp %h", a, rd, model[a]); end
    end
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
