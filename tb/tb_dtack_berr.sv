// tb_dtack_berr: checks DTACK* timing (one clock after DSSYNC of a selected
// data phase, released with DSCYC), that unselected phases get no DTACK, the
// BERR flip-flop (set by BERR_EXT, held, cleared when DSCYC falls, DTACK
// withheld meanwhile), NVME_OE and VME_DIR.
module tb_dtack_berr;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  logic dscyc = 0, dssync = 0, write_i = 0, berr_ext = 0;
  logic single_access = 0, blt_access = 0, base_addr_2f = 0;
  logic berr, nberr, ndtack, nvme_oe, vme_dir;
  int checks = 0, failures = 0;

  dtack_berr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  // One data phase: `kind` 0 none, 1 single, 2 blt, 3 CR/CSR;
  // berr_at < 0: no bus error, else BERR_EXT pulsed at that clock.
  task automatic phase(input int kind, input bit wr, input int berr_at);
    bit sel = kind != 0;
    @(negedge clk);
    single_access = kind == 1; blt_access = kind == 2; base_addr_2f = kind == 3;
    write_i = wr;
    dscyc = 1;
    #1;
    expect1(nvme_oe, !sel, "nvme_oe");
    expect1(vme_dir, !wr, "vme_dir");
    @(negedge clk);
    dssync = 1;
    expect1(ndtack, 1, "no dtack before dssync");
    for (int c = 0; c < 6; c++) begin
      if (c == berr_at) berr_ext = 1;
      @(negedge clk);
      berr_ext = 0;
      if (berr_at >= 0 && c >= berr_at) begin
        expect1(nberr, 0, "berr held");
        expect1(ndtack, 1, "dtack withheld during berr");
      end else begin
        expect1(nberr, 1, "no berr");
        expect1(ndtack, !sel, "dtack one clock after dssync");
      end
    end
    dscyc = 0; dssync = 0;
    #1 expect1(nberr, 1, "berr cleared by dscyc");
    @(negedge clk);
    expect1(ndtack, 1, "dtack released");
    expect1(nvme_oe, 1, "nvme_oe released");
    single_access = 0; blt_access = 0; base_addr_2f = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++)
      phase($urandom % 4, $urandom % 2, ($urandom % 3 == 0) ? int'($urandom % 6) : -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
