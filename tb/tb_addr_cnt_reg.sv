// tb_addr_cnt_reg: checks the stored address, the D16 (+2 bytes per beat) and
// D32 (+4 bytes per beat) block-transfer counters with their wrap-around, and
// that the stored address is shown whenever counting is off.
module tb_addr_cnt_reg;
  timeunit 1ns;
  timeprecision 1ps;
  logic        clk = 0, rst_n = 0;
  logic        ld = 0, cnt_step = 0, cnt_en = 0, d16_eo = 0, d32_eo = 0;
  logic [24:1] a = '0, a_i;
  logic [5:0]  am = '0, am_i;
  int checks = 0, failures = 0;

  addr_cnt_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [24:1] ea, input string what);
    checks++;
    if (a_i !== ea) begin
      failures++;
      $display("FAIL %s: a_i=%h expected %h", what, {a_i, 1'b0}, {ea, 1'b0});
    end
  endtask

  // One block transfer: load, then `beats` steps; byte address model.
  task automatic blt(input logic [24:0] byte_addr, input int width, input int beats);
    logic [24:0] exp_addr;
    @(negedge clk);
    a = byte_addr[24:1]; am = 6'($urandom);
    d16_eo = (width == 16); d32_eo = (width == 32);
    ld = 1; cnt_en = 0;
    @(negedge clk);
    ld = 0; d16_eo = 0; d32_eo = 0;   // flags must stay frozen
    check(byte_addr[24:1], "after load");
    checks++;
    if (am_i !== am) begin failures++; $display("FAIL am_i"); end
    exp_addr = byte_addr;
    cnt_en = 1;
    #1 check(exp_addr[24:1], "count enabled, no step yet");
    for (int k = 0; k < beats; k++) begin
      cnt_step = 1;
      @(negedge clk);
      cnt_step = 0;
      if (width == 16)
        exp_addr = {exp_addr[24:11], exp_addr[10:0] + 11'd2};
      else if (width == 32)
        exp_addr = {exp_addr[24:12], exp_addr[11:0] + 12'd4};
      check(exp_addr[24:1], $sformatf("D%0d beat %0d", width, k));
      @(negedge clk);
    end
    cnt_en = 0;
    #1 check(byte_addr[24:1], "count disabled shows register");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    blt(25'h0123400, 16, 10);
    blt(25'h0ABCDE0, 32, 10);
    blt(25'h00007FC, 16, 4);    // wraps inside the 2 KiB window (A[10:1])
    blt(25'h1FFFFF8, 32, 6);    // wraps inside the 4 KiB window (A[11:2])
    blt(25'h0000FFC, 32, 4);    // wraps inside the 4 KiB window
    blt(25'h0555550, 8, 3);     // neither flag: address stays
    for (int i = 0; i < 20; i++) begin
      int w;
      w = ($urandom % 2) ? 16 : 32;
      // D32 transfers are longword aligned (A1 = 0)
      blt(25'($urandom) & ((w == 32) ? 25'h1FFFFFC : 25'h1FFFFFE), w, 1 + $urandom % 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
