// tb_addr_in_latch: checks that the address latch follows its inputs while
// the gate is high and holds the last value while it is low.
module tb_addr_in_latch;
  timeunit 1ns;
  timeprecision 1ps;
  logic        gate;
  logic [31:1] a, a_in;
  logic [5:0]  am, am_in;
  int checks = 0, failures = 0;

  addr_in_latch dut (.gate, .a, .am, .a_in, .am_in);

  task automatic check(input logic [31:1] ea, input logic [5:0] eam, input string what);
    checks++;
    if (a_in !== ea || am_in !== eam) begin
      failures++;
      $display("FAIL %s: a_in=%h am_in=%h expected %h %h", what, a_in, am_in, ea, eam);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:1] held_a;
    logic [5:0]  held_am;
    for (int i = 0; i < 50; i++) begin
      gate = 1'b1;
      a  = 31'($urandom);
      am = 6'($urandom);
      #1 check(a, am, "transparent");
      held_a = a; held_am = am;
      gate = 1'b0;
      #1;
      for (int j = 0; j < 4; j++) begin
        a  = 31'($urandom);
        am = 6'($urandom);
        #1 check(held_a, held_am, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
