// tb_siu_queue_mem - random writes and reads on a 2-read/1-write queue memory,
// checked against an array model; same-cycle write/read of one address must return
// the new word (bypass).
module tb_siu_queue_mem;
  logic clk = 0, rst_n = 0;
  logic we;
  logic [3:0] wa;
  logic [15:0] wd;
  logic [1:0][3:0] ra;
  logic [1:0][15:0] rd;
  logic [1:0] byp;
  logic [15:0] model [16];
  int checks = 0, failures = 0, bypasses = 0;

  siu_queue_mem #(.DEPTH(16), .NR(2), .W(16)) dut (
    .clk, .rst_n, .we_i(we), .wa_i(wa), .wd_i(wd), .ra_i(ra), .rd_o(rd), .bypass_o(byp));

  always #5 clk = ~clk;

  initial begin
    we = 0; wa = 0; wd = 0; ra = '0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 4'($urandom); wd = 16'($urandom);
      ra[0] = 4'($urandom);
      ra[1] = (i % 4 == 0) ? wa : 4'($urandom);
      #1;
      for (int p = 0; p < 2; p++) begin
        logic [15:0] e;
        e = (we && wa == ra[p]) ? wd : model[ra[p]];
        checks++;
        if (rd[p] !== e || byp[p] !== (we && wa == ra[p])) begin
          failures++;
          if (failures < 10) $display("port %0d: got %h exp %h", p, rd[p], e);
        end
        if (we && wa == ra[p]) bypasses++;
      end
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    checks++;
    if (bypasses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
