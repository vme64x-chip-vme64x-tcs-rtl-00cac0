// tb_geo_addr: exhaustive check of slot recognition over every GA pin code
// and every value of A[23:19], including the amnesia address 0x1E.
module tb_geo_addr;
  timeunit 1ns;
  timeprecision 1ps;
  logic [4:0]   nga, ga_int;
  logic [23:19] a;
  logic         geo_addr_ok, base_addr_match;
  int checks = 0, failures = 0;

  geo_addr dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 32; g++) begin
      for (int s = 0; s < 32; s++) begin
        int  slot;
        bit  exp_ok, exp_match;
        nga = 5'(g); a = 5'(s);
        #1;
        slot      = 31 - g;                  // pins are active low
        exp_ok    = (g != 31);               // at least one pin grounded
        exp_match = exp_ok ? (s == slot) : (s == 30);
        checks++;
        if (ga_int !== 5'(slot) || geo_addr_ok !== exp_ok || base_addr_match !== exp_match) begin
          failures++;
          $display("FAIL nga=%b a=%h: ga=%h ok=%b match=%b", nga, a, ga_int, geo_addr_ok, base_addr_match);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
