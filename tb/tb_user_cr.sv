// tb_user_cr: reads all sixteen user-CR bytes for every card number and
// checks chip id (with the card number in the low nibble of byte 1),
// version, serial number "TCS" and the zero tail.
module tb_user_cr;
  timeunit 1ns;
  timeprecision 1ps;
  logic [5:2] addr;
  logic [3:0] card_nr;
  logic       rd_en;
  logic [7:0] data;
  logic       oe;
  int checks = 0, failures = 0;

  user_cr dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp [16];
    for (int c = 0; c < 16; c++) begin
      exp = '{8'h00, 8'h01, 8'h50, 8'h11, 8'h00, 8'h00, 8'h10, 8'h12,
              8'h54, 8'h43, 8'h53, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
      exp[2] = 8'h50 | 8'(c);
      for (int i = 0; i < 16; i++) begin
        addr = 4'(i); card_nr = 4'(c); rd_en = (i + c) % 2 == 0;
        #1;
        checks++;
        if (data !== exp[i] || oe !== rd_en) begin
          failures++;
          $display("FAIL card %0d word %0d: %h expected %h", c, i, data, exp[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
