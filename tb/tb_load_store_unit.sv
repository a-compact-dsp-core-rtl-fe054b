// tb_load_store_unit - loads from a bank model appear on the I bus two cycles after
// the request; stores reach the output half of the bank one cycle after the request.
module tb_load_store_unit;
  logic clk = 0, rst_n = 0;
  logic ld_en, st_en;
  logic [9:0] ld_addr, st_addr;
  logic [15:0] st_data, i_bus, rdata, wdata;
  logic re, we;
  logic [10:0] raddr, waddr;
  logic [15:0] bank [2048];
  int checks = 0, failures = 0;
  logic [15:0] ldq[$];
  typedef struct { logic v; logic [10:0] a; logic [15:0] d; } st_t;
  st_t stq[$];

  load_store_unit #(.W(16), .AW(10)) dut (
    .clk, .rst_n, .ld_en_i(ld_en), .ld_addr_i(ld_addr), .st_en_i(st_en), .st_addr_i(st_addr),
    .st_data_i(st_data), .buf_re_o(re), .buf_raddr_o(raddr), .buf_rdata_i(rdata),
    .buf_we_o(we), .buf_waddr_o(waddr), .buf_wdata_o(wdata), .i_bus_o(i_bus));

  always #5 clk = ~clk;
  // synchronous-read bank, like the I/O buffer
  always_ff @(posedge clk) if (re) rdata <= bank[raddr];

  initial begin
    foreach (bank[i]) bank[i] = 16'(i * 7 + 3);
    ld_en = 0; st_en = 0; ld_addr = 0; st_addr = 0; st_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (ldq.size() == 2) begin
        logic [15:0] e;
        e = ldq.pop_front();
        checks++;
        if (i_bus !== e) begin failures++; if (failures < 10) $display("ld got %h exp %h", i_bus, e); end
      end
      if (stq.size() == 1) begin
        st_t s;
        s = stq.pop_front();
        checks++;
        if (we !== s.v || (s.v && (waddr !== s.a || wdata !== s.d))) begin
          failures++; if (failures < 10) $display("st mismatch");
        end
      end
      ld_en = 1; ld_addr = 10'($urandom);
      st_en = 1'($urandom); st_addr = 10'($urandom); st_data = 16'($urandom);
      ldq.push_back(bank[{1'b0, ld_addr}]);
      stq.push_back('{st_en, {1'b1, st_addr}, st_data});
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
