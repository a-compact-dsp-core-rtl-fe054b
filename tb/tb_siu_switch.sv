// tb_siu_switch - every source/destination combination of the 4-by-4 switch with
// random bus values, including fan-out of one bus to several destinations.
module tb_siu_switch;
  import dsplite_pkg::*;
  logic [15:0] in_b, add_b, mul_b, shf_b;
  src_e [3:0] sel;
  logic [3:0][15:0] dst;
  logic [3:0] we;
  int checks = 0, failures = 0;

  siu_switch dut (.in_bus_i(in_b), .add_bus_i(add_b), .mul_bus_i(mul_b), .shf_bus_i(shf_b),
                  .sel_i(sel), .dst_o(dst), .dst_we_o(we));

  initial begin
    for (int i = 0; i < 2000; i++) begin
      in_b = 16'($urandom); add_b = 16'($urandom); mul_b = 16'($urandom); shf_b = 16'($urandom);
      for (int d = 0; d < 4; d++) sel[d] = src_e'($urandom % 5);
      #1;
      for (int d = 0; d < 4; d++) begin
        logic [15:0] e;
        logic ew;
        ew = 1;
        case (int'(sel[d]))
          1: e = in_b;
          2: e = add_b;
          3: e = mul_b;
          4: e = shf_b;
          default: begin e = dst[d]; ew = 0; end
        endcase
        checks++;
        if (we[d] !== ew || (ew && dst[d] !== e)) begin
          failures++;
          if (failures < 10) $display("dst %0d sel %0d got %h exp %h", d, sel[d], dst[d], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
