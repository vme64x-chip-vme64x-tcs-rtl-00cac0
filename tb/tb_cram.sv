// tb_cram: writes all 512 CRAM bytes, reads them back in random order with
// the one-clock registered-address latency, and checks random mixed
// read/write traffic against a reference array.
module tb_cram;
  timeunit 1ns;
  timeprecision 1ps;
  logic       clk = 0;
  logic [8:0] addr = '0;
  logic       ld_en = 0, rd_en = 0;
  logic [7:0] din = '0, dout;
  logic       oe;
  logic [7:0] model [512];
  int checks = 0, failures = 0;

  cram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int ad, input logic [7:0] v);
    @(negedge clk);
    addr = 9'(ad); din = v; ld_en = 1; rd_en = 0;
    model[ad] = v;
    @(negedge clk);
    ld_en = 0;
  endtask

  task automatic rd(input int ad);
    @(negedge clk);
    addr = 9'(ad); rd_en = 1; ld_en = 0;
    @(negedge clk);   // address registered at the edge in between
    checks++;
    if (dout !== model[ad] || oe !== 1'b1) begin
      failures++;
      $display("FAIL read %h: %h expected %h", ad, dout, model[ad]);
    end
    rd_en = 0;
  endtask

  initial begin
    for (int i = 0; i < 512; i++) wr(i, 8'($urandom));
    for (int i = 0; i < 512; i++) rd($urandom % 512);
    for (int i = 0; i < 1000; i++)
      if ($urandom % 2) wr($urandom % 512, 8'($urandom)); else rd($urandom % 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
