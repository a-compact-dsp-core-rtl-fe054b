// tb_io_buffer - ping-pong behaviour: the host fills the free bank, the banks are
// swapped, the engine reads what the host wrote and writes results, the banks are
// swapped back and the host reads those results; the engine's bank is never touched
// by host writes. Reads return data one cycle after the address.
module tb_io_buffer;
  logic clk = 0;
  logic sel;
  logic ere, ewe, hre, hwe;
  logic [10:0] eraddr, ewaddr, haddr;
  logic [15:0] erdata, ewdata, hwdata, hrdata;
  int checks = 0, failures = 0;

  io_buffer #(.DEPTH(2048), .W(16)) dut (
    .clk, .bank_sel_i(sel),
    .eng_re_i(ere), .eng_raddr_i(eraddr), .eng_rdata_o(erdata),
    .eng_we_i(ewe), .eng_waddr_i(ewaddr), .eng_wdata_i(ewdata),
    .host_re_i(hre), .host_we_i(hwe), .host_addr_i(haddr),
    .host_wdata_i(hwdata), .host_rdata_o(hrdata));

  always #5 clk = ~clk;

  function automatic logic [15:0] pat(int a, int k);
    return 16'(a * 31 + k * 1000 + 5);
  endfunction

  task automatic check(logic [15:0] got, logic [15:0] e);
    checks++;
    if (got !== e) begin failures++; if (failures < 10) $display("got %h exp %h", got, e); end
  endtask

  initial begin
    sel = 0; ere = 0; ewe = 0; hre = 0; hwe = 0; eraddr = 0; ewaddr = 0; haddr = 0;
    ewdata = 0; hwdata = 0;
    // engine owns bank 0: it writes a pattern there while the host fills bank 1
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      ewe = 1; ewaddr = 11'(a); ewdata = pat(a, 0);
      hwe = 1; haddr  = 11'(a); hwdata = pat(a, 1);
    end
    @(negedge clk); ewe = 0; hwe = 0;
    // host reads bank 1 back
    for (int a = 0; a < 64; a++) begin
      hre = 1; haddr = 11'(a); @(negedge clk); check(hrdata, pat(a, 1));
    end
    hre = 0;
    // swap: engine now sees the host's data, host sees the engine's
    sel = 1;
    for (int a = 0; a < 64; a++) begin
      ere = 1; eraddr = 11'(a); hre = 1; haddr = 11'(a);
      @(negedge clk);
      check(erdata, pat(a, 1));
      check(hrdata, pat(a, 0));
    end
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
