// tb_csr: exercises the CSR registers through their strobes: ADER write and
// read-back and the A31-A25 / AM fields, the bit set / bit clear semantics
// of RESET mode, module enable and BERR flag (set has priority over clear,
// BERR from the board sets the flag), SYSRESET*, and BAR read-back with and
// without a geographical address.
module tb_csr;
  timeunit 1ns;
  timeprecision 1ps;
  import vme64x_pkg::*;
  logic        clk = 0, nsysres = 0;
  logic [7:0]  din = '0, dout;
  csr_sel_t    rd = '0, wr = '0;
  logic [4:0]  ga = 5'd7;
  logic        geo_addr_ok = 1, nberr = 1;
  logic        oe, reset_mode, mod_enabled, berr_flag;
  logic [31:25] ader0_a, ader1_a;
  logic [5:0]  ader0_am, ader1_am;
  int checks = 0, failures = 0;

  csr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic write(input csr_sel_t s, input logic [7:0] v);
    @(negedge clk);
    wr = s; din = v;
    @(negedge clk);
    wr = '0;
    @(negedge clk);          // status flags follow one clock later
  endtask

  function automatic csr_sel_t sel_ader(input int f, input int b);
    csr_sel_t s = '0;
    if (f == 0) s.ader0[b] = 1'b1; else s.ader1[b] = 1'b1;
    return s;
  endfunction

  function automatic csr_sel_t sel(input string n);
    csr_sel_t s = '0;
    case (n)
      "bsr":  begin s.bsr = 1; s.bscr = 1; end
      "bcr":  begin s.bcr = 1; s.bscr = 1; end
      "bar":  s.bar = 1;
    endcase
    return s;
  endfunction

  task automatic read(input csr_sel_t s, input logic [7:0] exp, input string what);
    @(negedge clk);
    rd = s;
    #1;
    check8(dout, exp, what);
    check8({7'd0, oe}, 8'd1, {what, " oe"});
    rd = '0;
    #1 check8({7'd0, oe}, 8'd0, {what, " oe off"});
  endtask

  function automatic logic [7:0] bscr_exp(input bit rm, input bit me, input bit bf);
    return {rm, 2'b00, me, bf, 3'b000};
  endfunction

  initial begin
    logic [7:0] v [2][4];
    repeat (2) @(negedge clk);
    nsysres = 1;
    read(sel("bsr"), 8'h00, "BSCR after reset");
    // ADER registers
    for (int f = 0; f < 2; f++)
      for (int b = 0; b < 4; b++) begin
        v[f][b] = 8'($urandom);
        write(sel_ader(f, b), v[f][b]);
      end
    for (int f = 0; f < 2; f++)
      for (int b = 0; b < 4; b++)
        read(sel_ader(f, b), v[f][b], $sformatf("ADER%0d byte %0d", f, b));
    check8({1'b0, ader0_a}, {1'b0, v[0][3][7:1]}, "ader0_a");
    check8({2'b0, ader0_am}, {2'b0, v[0][0][7:2]}, "ader0_am");
    check8({1'b0, ader1_a}, {1'b0, v[1][3][7:1]}, "ader1_a");
    check8({2'b0, ader1_am}, {2'b0, v[1][0][7:2]}, "ader1_am");
    // module enable
    write(sel("bsr"), 8'h10);
    read(sel("bcr"), bscr_exp(0, 1, 0), "enable set");
    write(sel("bcr"), 8'h10);
    read(sel("bsr"), bscr_exp(0, 1, 0), "set has priority over clear");
    write(sel("bsr"), 8'h00);
    read(sel("bsr"), bscr_exp(0, 0, 0), "held clear bit acts once set bit is withdrawn");
    write(sel("bcr"), 8'h00);
    read(sel("bsr"), bscr_exp(0, 0, 0), "enable stays cleared");
    write(sel("bsr"), 8'h10);
    write(sel("bsr"), 8'h00);
    read(sel("bsr"), bscr_exp(0, 1, 0), "enable held after set bit withdrawn");
    write(sel("bcr"), 8'h10);
    read(sel("bsr"), bscr_exp(0, 0, 0), "enable cleared");
    // reset mode and BERR flag
    write(sel("bcr"), 8'h00);
    write(sel("bsr"), 8'h88);
    read(sel("bsr"), bscr_exp(1, 0, 1), "reset mode + berr flag set");
    write(sel("bsr"), 8'h00);
    write(sel("bcr"), 8'h80);
    read(sel("bsr"), bscr_exp(0, 0, 1), "reset mode cleared");
    write(sel("bcr"), 8'h08);
    read(sel("bsr"), bscr_exp(0, 0, 0), "berr flag cleared");
    write(sel("bcr"), 8'h00);
    @(negedge clk); nberr = 0; @(negedge clk); nberr = 1; @(negedge clk);
    read(sel("bsr"), bscr_exp(0, 0, 1), "berr flag from board BERR");
    write(sel("bsr"), 8'h90);
    read(sel("bsr"), bscr_exp(1, 1, 1), "all set");
    // BAR
    ga = 5'h0B; geo_addr_ok = 1;
    read(sel("bar"), 8'h58, "BAR geographical");
    geo_addr_ok = 0;
    read(sel("bar"), 8'hF0, "BAR amnesia");
    // SYSRESET clears everything
    @(negedge clk); nsysres = 0; @(negedge clk); nsysres = 1;
    read(sel("bsr"), 8'h00, "BSCR after SYSRESET");
    read(sel_ader(0, 3), 8'h00, "ADER after SYSRESET");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
